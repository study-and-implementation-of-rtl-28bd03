// seq_iterator: controller of the sequence loader.
//
// A `start` pulse (from the sequence register) makes the iterator raise
// `active`, which enables the decoder and so the selected sequence block, and
// walk `pos` from 0 through that block's entries. For each entry it issues a
// parallel-interface write of the block's address/data and holds it until the
// register controller acknowledges; the position advances on the ack, so the
// next write starts the following cycle. After the entry flagged `last` is
// acknowledged, or at once if the selected slot holds no sequence, it drops
// `active` (stopping the blocks) and pulses `done` for one cycle, which
// reverts the sequence register to its default value.
//
// Timing with a slave that acks one cycle after a request (two-cycle writes):
// `done` is high 2*N+1 cycles after the `start` cycle for an N-entry sequence
// (2 cycles for an empty slot).
// The role (give the blocks their position, stop them, revert the register)
// follows the design; the block-level clock of the original is replaced by a
// clock enable through `pos`, and the handshake is this design's own.
module seq_iterator
  import seq_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  // selected sequence block (ORed outputs of all blocks)
  input  logic     seq_valid,
  input  logic     seq_last,
  input  addr_t    blk_addr,
  input  data_t    blk_data,
  output logic     active,
  output pos_t     pos,
  // parallel interface master
  output par_req_t m_req,
  input  par_rsp_t m_rsp,
  output logic     done,
  output logic     busy
);
  typedef enum logic [1:0] {IT_IDLE, IT_RUN, IT_FINISH} it_state_t;
  it_state_t state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IT_IDLE;
      pos   <= '0;
    end else begin
      unique case (state)
        IT_IDLE: if (start) begin
          pos   <= '0;
          state <= IT_RUN;
        end
        IT_RUN: begin
          if (!seq_valid) state <= IT_FINISH;
          else if (m_rsp.ack) begin
            if (seq_last) state <= IT_FINISH;
            else          pos   <= pos + 1'b1;
          end
        end
        IT_FINISH: state <= IT_IDLE;
        default:   state <= IT_IDLE;
      endcase
    end
  end

  always_comb begin
    active      = (state == IT_RUN);
    busy        = (state != IT_IDLE);
    done        = (state == IT_FINISH);
    m_req.req   = (state == IT_RUN) && seq_valid;
    m_req.we    = 1'b1;
    m_req.addr  = blk_addr;
    m_req.wdata = blk_data;
  end

  // An acknowledge may only answer a request.
  a_ack_needs_req: assert property (@(posedge clk) disable iff (!rst_n)
    m_rsp.ack |-> m_req.req);
endmodule
