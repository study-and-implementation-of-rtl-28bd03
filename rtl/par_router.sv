// par_router: host side of the parallel register bus.
//
// The tester reaches the PHY registers either through JTAG (translated by
// jtag_par_bridge) or, in simulation, directly over the parallel interface,
// which gives the same result much faster. `host_sel` picks the path: 0 for
// JTAG, 1 for the direct port; it must only change while neither path has a
// request outstanding. Accesses of the selected host to SEQ_REG_ADDR go to the
// sequence register of the loader (r_*); all other addresses go toward the
// PHY register controller through the arbiter (p_*). The unselected host sees
// no acknowledge. Purely combinational.
//
// The two access paths come from the design; the address of the sequence
// register and the routing by address are this design's choices.
module par_router
  import seq_pkg::*;
(
  input  logic     host_sel,
  input  par_req_t j_req,
  output par_rsp_t j_rsp,
  input  par_req_t d_req,
  output par_rsp_t d_rsp,
  output par_req_t r_req,
  input  par_rsp_t r_rsp,
  output par_req_t p_req,
  input  par_rsp_t p_rsp
);
  par_req_t h_req;
  par_rsp_t h_rsp;
  logic     to_reg;

  always_comb begin
    h_req  = host_sel ? d_req : j_req;
    to_reg = (h_req.addr == SEQ_REG_ADDR);

    r_req     = h_req;
    r_req.req = h_req.req && to_reg;
    p_req     = h_req;
    p_req.req = h_req.req && !to_reg;

    h_rsp = to_reg ? r_rsp : p_rsp;

    j_rsp = host_sel ? '0 : h_rsp;
    d_rsp = host_sel ? h_rsp : '0;
  end
endmodule
