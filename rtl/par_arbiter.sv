// par_arbiter: two masters sharing the parallel interface of the PHY
// register controller.
//
// Master 0 is the sequence loader, master 1 the host path (JTAG or direct).
// When the bus is free the loader wins, so a running sequence is not
// interleaved with host writes; once a transfer is granted it keeps the bus
// until its ack, so a request is never taken away half way. A host request
// that is waiting raises `host_stall`. Grant is combinational from the
// requests and one flop of ownership, so an uncontested request passes
// through with no added cycle.
//
// The loader and the host reaching the same register controller follows the
// design; fixed priority to the loader is this design's choice.
module par_arbiter
  import seq_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  par_req_t m0_req,
  output par_rsp_t m0_rsp,
  input  par_req_t m1_req,
  output par_rsp_t m1_rsp,
  output par_req_t s_req,
  input  par_rsp_t s_rsp,
  output logic     host_stall
);
  logic locked, owner, gnt;

  always_comb begin
    if (locked)           gnt = owner;
    else if (m0_req.req)  gnt = 1'b0;
    else                  gnt = m1_req.req;

    s_req = gnt ? m1_req : m0_req;

    m0_rsp.rdata = s_rsp.rdata;
    m1_rsp.rdata = s_rsp.rdata;
    m0_rsp.ack   = s_rsp.ack && !gnt;
    m1_rsp.ack   = s_rsp.ack && gnt;

    host_stall = m1_req.req && !gnt;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked <= 1'b0;
      owner  <= 1'b0;
    end else if (s_req.req && !s_rsp.ack) begin
      locked <= 1'b1;
      owner  <= gnt;
    end else begin
      locked <= 1'b0;
    end
  end
endmodule
