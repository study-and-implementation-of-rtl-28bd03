// par_arbiter_tb: two masters (loader on port 0, host on port 1) issuing
// random streams of transfers into the behavioural register controller,
// which acks after a varying delay. Checks that every transfer of each
// master completes exactly once and in order (addresses carry a master tag
// and a sequence number), that no transfer is taken over before its ack
// (protocol checker), that when both request on a free bus the loader wins,
// and that host_stall is raised whenever the host waits. Counts contested
// grants and stalls and fails if none occurred.
module par_arbiter_tb;
  import seq_pkg::*;

  logic     clk = 0, rst_n = 0;
  par_req_t m0_req, m1_req, s_req;
  par_rsp_t m0_rsp, m1_rsp, s_rsp;
  logic     host_stall;
  int checks = 0, failures = 0;
  int n0 = 0, n1 = 0, contested = 0, stalls = 0;
  bit done0 = 0, done1 = 0;
  localparam int N = 60;

  par_arbiter dut (.clk, .rst_n, .m0_req, .m0_rsp, .m1_req, .m1_rsp, .s_req, .s_rsp, .host_stall);
  phy_reg_model #(.LAT(1)) u_phy (.clk, .rst_n, .req(s_req), .rsp(s_rsp));
  par_checker u_chk (.clk, .rst_n, .req(s_req), .rsp(s_rsp));

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Free-bus priority and stall flag, sampled every cycle.
  logic busy_q;
  always @(posedge clk) if (rst_n) begin
    if (!busy_q && m0_req.req && m1_req.req) begin
      contested++;
      check(s_req.addr == m0_req.addr, "loader did not win a free bus");
    end
    if (m1_req.req && !(s_req.req && s_req.addr == m1_req.addr)) begin
      stalls++;
      check(host_stall, "host waiting without host_stall");
    end
    busy_q <= s_req.req && !s_rsp.ack;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : master0
    par_req_t t;
    int gap;
    m0_req = '0;
    wait (rst_n);
    for (int i = 0; i < N; i++) begin
      t.req = 1; t.we = 1; t.addr = 16'h1000 + 16'(i); t.wdata = 16'(i);
      m0_req <= t;
      do @(posedge clk); while (!m0_rsp.ack);
      n0++;
      gap = $urandom % 3;
      if (gap > 0 || i == N - 1) begin
        m0_req <= '0;
        repeat (gap) @(posedge clk);
      end
    end
    done0 = 1;
  end

  initial begin : master1
    par_req_t t;
    int gap;
    m1_req = '0;
    wait (rst_n);
    for (int i = 0; i < N; i++) begin
      t.req = 1; t.we = 1; t.addr = 16'h8000 + 16'(i); t.wdata = 16'(i) ^ 16'hFFFF;
      m1_req <= t;
      do @(posedge clk); while (!m1_rsp.ack);
      n1++;
      gap = $urandom % 4;
      if (gap > 0 || i == N - 1) begin
        m1_req <= '0;
        repeat (gap) @(posedge clk);
      end
    end
    done1 = 1;
  end

  initial begin
    busy_q = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    fork
      forever begin
        @(posedge clk);
        u_phy.lat = 1 + ($urandom % 3);
      end
    join_none
    wait (done0 && done1);
    repeat (4) @(posedge clk);
    begin
      int i0, i1;
      i0 = 0; i1 = 0;
      check(u_phy.wr_addr.size() == 2 * N, $sformatf("%0d writes", u_phy.wr_addr.size()));
      for (int k = 0; k < u_phy.wr_addr.size(); k++) begin
        if (u_phy.wr_addr[k][15]) begin
          check(u_phy.wr_addr[k] == 16'h8000 + 16'(i1) && u_phy.wr_data[k] == (16'(i1) ^ 16'hFFFF),
                $sformatf("host write %0d: %h/%h", i1, u_phy.wr_addr[k], u_phy.wr_data[k]));
          i1++;
        end else begin
          check(u_phy.wr_addr[k] == 16'h1000 + 16'(i0) && u_phy.wr_data[k] == 16'(i0),
                $sformatf("loader write %0d: %h/%h", i0, u_phy.wr_addr[k], u_phy.wr_data[k]));
          i0++;
        end
      end
      check(i0 == N && i1 == N && n0 == N && n1 == N, "transfer counts");
    end
    $display("contested=%0d stalls=%0d", contested, stalls);
    check(contested > 0, "no contested grant happened");
    check(stalls > 0, "no host stall happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
