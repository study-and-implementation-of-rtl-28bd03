// par_router_tb: the host-side router, combinational. With random requests on
// both host ports and random responses from both destinations, checks that
// host_sel picks the JTAG (0) or direct (1) request, that only accesses to
// the sequence register address reach the loader and all others the PHY
// path, that the selected host gets the response of the destination it
// addressed, and that the other host sees no acknowledge.
module par_router_tb;
  import seq_pkg::*;

  logic     host_sel;
  par_req_t j_req, d_req, r_req, p_req;
  par_rsp_t j_rsp, d_rsp, r_rsp, p_rsp;
  int checks = 0, failures = 0;

  par_router dut (.host_sel, .j_req, .j_rsp, .d_req, .d_rsp, .r_req, .r_rsp, .p_req, .p_rsp);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      par_req_t h;
      par_rsp_t hr;
      logic to_reg;
      host_sel = 1'($urandom);
      j_req = par_req_t'({$urandom, $urandom});
      d_req = par_req_t'({$urandom, $urandom});
      if ($urandom % 3 == 0) j_req.addr = SEQ_REG_ADDR;
      if ($urandom % 3 == 0) d_req.addr = SEQ_REG_ADDR;
      r_rsp = par_rsp_t'($urandom);
      p_rsp = par_rsp_t'($urandom);
      #1;
      h      = host_sel ? d_req : j_req;
      to_reg = h.addr == 16'hFFF0;
      hr     = to_reg ? r_rsp : p_rsp;
      check(r_req.req == (h.req && to_reg) && p_req.req == (h.req && !to_reg),
            $sformatf("route sel=%0d addr=%h req=%0d -> r%0d p%0d", host_sel, h.addr, h.req,
                      r_req.req, p_req.req));
      check(r_req.addr == h.addr && p_req.addr == h.addr && r_req.wdata == h.wdata &&
            p_req.we == h.we, "request fields");
      if (host_sel) check(d_rsp == hr && j_rsp.ack == 0, "direct response");
      else          check(j_rsp == hr && d_rsp.ack == 0, "jtag response");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
