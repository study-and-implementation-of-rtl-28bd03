// seq_top: test-access subsystem of the PHY with the sequence loader.
//
// A SerDes PHY is configured through its internal parallel register bus. On
// the tester that bus is reached only through JTAG, one slow serial scan per
// register, and protocol rate-change routines of dozens of writes are sent
// this way again at every rate change. Here the routines are stored inside:
// the tester writes one sequence number to the sequence register and the
// loader replays the whole routine at parallel-bus speed, then reverts the
// register to its default value so the tester can poll for completion.
//
// Structure:
//   jtag_tap + jtag_par_bridge  JTAG pins -> parallel transfers
//   par_router                  picks JTAG or the direct parallel host port
//                               (host_sel), sends SEQ_REG_ADDR to the loader
//   seq_loader                  sequence register, decoder, sequence blocks,
//                               iterator
//   par_arbiter                 loader (priority) and host share phy_*
// phy_req/phy_rsp connect to the PHY's register controller, which is outside
// this design; its slave is expected to follow the parallel handshake (see
// seq_pkg). Single clock `clk`; TCK is sampled in it and must be slower than
// clk/4. Reset `rst_n` is asynchronous, active low.
module seq_top
  import seq_pkg::*;
  import jtag_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  // JTAG pins
  input  logic     tck,
  input  logic     tms,
  input  logic     tdi,
  input  logic     trst_n,
  output logic     tdo,
  // direct parallel host port (used when host_sel = 1)
  input  logic     host_sel,
  input  par_req_t host_req,
  output par_rsp_t host_rsp,
  // to the PHY register controller
  output par_req_t phy_req,
  input  par_rsp_t phy_rsp,
  // status
  output logic     seq_busy,
  output logic     seq_done,
  output logic     host_stall,
  output logic     jtag_pending
);
  ir_t        ir;
  tap_state_t tap_state;
  logic       tdi_s, dr_capture, dr_shift, dr_update, par_tdo;

  par_req_t j_req, r_req, p_req, l_req;
  par_rsp_t j_rsp, r_rsp, p_rsp, l_rsp;

  jtag_tap u_tap (
    .clk, .rst_n, .tck, .tms, .tdi, .trst_n, .tdo,
    .ir, .state(tap_state), .tdi_s, .dr_capture, .dr_shift, .dr_update, .par_tdo
  );

  jtag_par_bridge u_bridge (
    .clk, .rst_n, .ir, .tdi_s, .dr_capture, .dr_shift, .dr_update, .par_tdo,
    .m_req(j_req), .m_rsp(j_rsp), .pending(jtag_pending)
  );

  par_router u_router (
    .host_sel,
    .j_req, .j_rsp,
    .d_req(host_req), .d_rsp(host_rsp),
    .r_req, .r_rsp,
    .p_req, .p_rsp
  );

  seq_loader u_loader (
    .clk, .rst_n,
    .s_req(r_req), .s_rsp(r_rsp),
    .m_req(l_req), .m_rsp(l_rsp),
    .busy(seq_busy), .done(seq_done)
  );

  par_arbiter u_arb (
    .clk, .rst_n,
    .m0_req(l_req), .m0_rsp(l_rsp),
    .m1_req(p_req), .m1_rsp(p_rsp),
    .s_req(phy_req), .s_rsp(phy_rsp),
    .host_stall
  );

  par_checker u_chk_phy (.clk, .rst_n, .req(phy_req), .rsp(phy_rsp));
endmodule
