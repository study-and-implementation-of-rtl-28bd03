// jtag_par_bridge: turns JTAG data-register scans into parallel-interface
// register accesses.
//
// This is how JTAG reaches the PHY registers: the TAP never touches a register
// itself; its commands are translated into parallel-bus transfers, address
// first, then data. Three private instructions select a data register here:
//   PAR_ADDR  (16 bits) capture returns the current address, update loads it.
//   PAR_WRITE (16 bits) update writes the shifted value at that address.
//   PAR_READ  (18 bits) update starts a read at that address; a later capture
//             returns {error, pending, read data} and clears `error`.
// `pending` is 1 while a transfer launched by an update has not yet been
// acknowledged; an update that arrives while one is pending is dropped and
// sets `error`. The parallel request is raised in the clk cycle after the
// TCK edge that leaves Update-DR and held until its ack.
//
// The address-then-data order follows the design; the instruction set,
// register lengths and the pending/error status are this design's choices.
module jtag_par_bridge
  import seq_pkg::*;
  import jtag_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  ir_t      ir,
  input  logic     tdi_s,
  input  logic     dr_capture,
  input  logic     dr_shift,
  input  logic     dr_update,
  output logic     par_tdo,
  output par_req_t m_req,
  input  par_rsp_t m_rsp,
  output logic     pending
);
  logic [PAR_READ_LEN-1:0] sr;
  addr_t                   addr_q;
  data_t                   rdata_q;
  logic                    err;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr      <= '0;
      addr_q  <= '0;
      rdata_q <= '0;
      err     <= 1'b0;
      m_req   <= '0;
    end else begin
      if (m_req.req && m_rsp.ack) begin
        m_req.req <= 1'b0;
        if (!m_req.we) rdata_q <= m_rsp.rdata;
      end
      if (dr_capture && is_par_instr(ir)) begin
        unique case (ir)
          IR_PAR_ADDR:  sr <= PAR_READ_LEN'(addr_q);
          IR_PAR_WRITE: sr <= PAR_READ_LEN'(m_req.wdata);
          default: begin
            sr  <= {err, m_req.req, rdata_q};
            err <= 1'b0;
          end
        endcase
      end
      if (dr_shift && is_par_instr(ir)) begin
        if (ir == IR_PAR_READ) sr <= {tdi_s, sr[PAR_READ_LEN-1:1]};
        else sr <= {2'b00, tdi_s, sr[DATA_W-1:1]};
      end
      if (dr_update && is_par_instr(ir)) begin
        if (ir == IR_PAR_ADDR) addr_q <= sr[ADDR_W-1:0];
        else if (m_req.req) err <= 1'b1;
        else begin
          m_req.req   <= 1'b1;
          m_req.we    <= (ir == IR_PAR_WRITE);
          m_req.addr  <= addr_q;
          if (ir == IR_PAR_WRITE) m_req.wdata <= sr[DATA_W-1:0];
        end
      end
    end
  end

  assign par_tdo = sr[0];
  assign pending = m_req.req;
endmodule
