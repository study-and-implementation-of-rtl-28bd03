// seq_loader: self-configuration module placed beside the PHY's parallel
// register controller.
//
// Instead of shifting every register write of a rate-change routine through
// JTAG, the tester writes one sequence number into the sequence register
// (slave port s_*). The loader then replays the stored routine on its own
// parallel master port (m_*), one register write per entry, and reverts the
// sequence register to its default value when it is finished.
//
// Inside, in the order of the design: the sequence register (seq_reg), the
// 5-to-32 decoder (seq_decoder), one seq_block per stored sequence, whose
// outputs are ORed onto one bus, and the iterator (seq_iterator) that steps
// the position and runs the handshake. Sequence slots from NUM_SEQ to 31 hold
// nothing; selecting one ends at once.
//
// Timing: the write to the sequence register completes in two cycles; the
// first sequence write is requested two cycles after that write's request
// cycle ends, and each sequence write then takes two cycles against a slave
// that acks one cycle after the request.
module seq_loader
  import seq_pkg::*;
#(
  parameter int N_SEQ = NUM_SEQ
) (
  input  logic     clk,
  input  logic     rst_n,
  input  par_req_t s_req,
  output par_rsp_t s_rsp,
  output par_req_t m_req,
  input  par_rsp_t m_rsp,
  output logic     busy,
  output logic     done
);
  sel_t              sel;
  logic              start;
  logic              reg_busy;
  data_t             reg_value;
  logic              active;
  pos_t              pos;
  logic [MAX_SEQ-1:0] en;

  logic  [N_SEQ-1:0] b_valid, b_last;
  addr_t [N_SEQ-1:0] b_addr;
  data_t [N_SEQ-1:0] b_data;
  logic              seq_valid, seq_last;
  addr_t             seq_addr_w;
  data_t             seq_data_w;
  logic              it_busy;

  seq_reg u_reg (
    .clk, .rst_n, .s_req, .s_rsp, .done,
    .sel, .start, .busy(reg_busy), .value(reg_value)
  );

  seq_decoder #(.SEL_W(SEL_W)) u_dec (.en(active), .sel, .onehot(en));

  for (genvar i = 0; i < N_SEQ; i++) begin : g_seq
    seq_block #(.SEQ_ID(i)) u_blk (
      .en(en[i]), .pos,
      .valid(b_valid[i]), .last(b_last[i]), .addr(b_addr[i]), .data(b_data[i])
    );
  end

  always_comb begin
    seq_valid  = |b_valid;
    seq_last   = |b_last;
    seq_addr_w = '0;
    seq_data_w = '0;
    for (int i = 0; i < N_SEQ; i++) begin
      seq_addr_w |= b_addr[i];
      seq_data_w |= b_data[i];
    end
  end

  seq_iterator u_it (
    .clk, .rst_n, .start,
    .seq_valid, .seq_last, .blk_addr(seq_addr_w), .blk_data(seq_data_w),
    .active, .pos, .m_req, .m_rsp, .done, .busy(it_busy)
  );

  assign busy = reg_busy | it_busy;

  // Exactly one block may answer while a sequence runs.
  a_onehot_blocks: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(b_valid));
endmodule
