// seq_reg: the sequence register, a parallel-interface slave.
//
// The tester starts a sequence by writing this register: the written value is
// stored and its low 5 bits select the sequence; a one-cycle `start` pulse
// follows the write. While the sequence runs (`busy`) the register reads back
// the written value and further writes are acknowledged but ignored. When the
// iterator reports `done`, the register returns to SEQ_REG_DEFAULT, so a read
// of the default value tells the tester that the sequence was loaded.
//
// Every access is acknowledged one cycle after its request (two-cycle
// transfer); read data is the current value. The start-on-write and
// revert-to-default behaviour follows the design; the register width, the
// default value 0xFFFF and ignoring writes while busy are choices of this
// design.
module seq_reg
  import seq_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  par_req_t s_req,
  output par_rsp_t s_rsp,
  input  logic     done,
  output sel_t     sel,
  output logic     start,
  output logic     busy,
  output data_t    value
);
  logic ack_q;
  logic wr;

  assign wr = s_req.req && !ack_q && s_req.we && !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack_q <= 1'b0;
      value <= SEQ_REG_DEFAULT;
      busy  <= 1'b0;
      start <= 1'b0;
    end else begin
      ack_q <= s_req.req && !ack_q;
      start <= wr;
      if (wr) begin
        value <= s_req.wdata;
        busy  <= 1'b1;
      end else if (done) begin
        value <= SEQ_REG_DEFAULT;
        busy  <= 1'b0;
      end
    end
  end

  assign sel         = value[SEL_W-1:0];
  assign s_rsp.ack   = ack_q;
  assign s_rsp.rdata = value;
endmodule
