// par_checker: protocol assertions for one point of the parallel interface.
//
// Rules: an ack answers a request; a request, once raised, stays up with the
// same direction, address and write data until it is acknowledged; ack is
// never high two cycles in a row. No outputs: it only watches.
module par_checker
  import seq_pkg::*;
(
  input logic     clk,
  input logic     rst_n,
  input par_req_t req,
  input par_rsp_t rsp
);
  a_ack_has_req: assert property (@(posedge clk) disable iff (!rst_n)
    rsp.ack |-> req.req);
  a_req_held: assert property (@(posedge clk) disable iff (!rst_n)
    req.req && !rsp.ack |=> req.req && $stable(req.we) && $stable(req.addr)
                            && (!req.we || $stable(req.wdata)));
  a_ack_single: assert property (@(posedge clk) disable iff (!rst_n)
    rsp.ack |=> !rsp.ack);
endmodule
