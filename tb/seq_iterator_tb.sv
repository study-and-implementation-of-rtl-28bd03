// seq_iterator_tb: the iterator against a sequence given by the testbench
// itself (entry k = address 0x4000+3k, data ~k*0x101) and the behavioural
// register controller. For lengths 1, 2, 5 and 40 and for an empty slot it
// checks the written addresses and data in order, that `active` is high
// exactly while the sequence runs, and the timing: done comes 2N+1 cycles
// after start for an N-entry sequence (two-cycle writes back to back), and
// 2 cycles after start for an empty slot. It repeats one length with a slower
// controller (ack after 3 cycles) to check that the iterator waits for ack.
module seq_iterator_tb;
  import seq_pkg::*;

  logic     clk = 0, rst_n = 0;
  logic     start;
  logic     seq_valid, seq_last;
  addr_t    blk_addr;
  data_t    blk_data;
  logic     active, done, busy;
  pos_t     pos;
  par_req_t m_req;
  par_rsp_t m_rsp;
  int       len;
  int checks = 0, failures = 0;

  seq_iterator dut (
    .clk, .rst_n, .start, .seq_valid, .seq_last, .blk_addr, .blk_data,
    .active, .pos, .m_req, .m_rsp, .done, .busy
  );

  always #5 clk = ~clk;

  phy_reg_model #(.LAT(1)) u_phy (.clk, .rst_n, .req(m_req), .rsp(m_rsp));

  // Sequence source, gated by `active` as the decoder would.
  always_comb begin
    seq_valid = active && (32'(pos) < len);
    seq_last  = seq_valid && (32'(pos) == len - 1);
    blk_addr  = seq_valid ? 16'h4000 + 16'(3 * 32'(pos)) : '0;
    blk_data  = seq_valid ? ~(16'(pos) * 16'h0101) : '0;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run(int n, bit s);
    int cyc, act_cyc;
    len = n;
    u_phy.lat = s ? 3 : 1;
    u_phy.clear_log();
    start <= 1;
    @(posedge clk);
    start <= 0;
    cyc = 0; act_cyc = 0;
    do begin
      @(posedge clk);
      cyc++;
      if (active) act_cyc++;
    end while (!done && cyc < 1000);
    if (!s) check(cyc == (n == 0 ? 2 : 2 * n + 1),
                  $sformatf("len %0d: done after %0d cycles", n, cyc));
    else    check(cyc == (n == 0 ? 2 : 4 * n + 1),
                  $sformatf("len %0d slow: done after %0d cycles", n, cyc));
    check(act_cyc == cyc - 1,
          $sformatf("active for %0d cycles", act_cyc));
    begin
      int got;
      got = u_phy.wr_addr.size();
      check(got == n, $sformatf("len %0d: %0d writes", n, got));
      for (int k = 0; k < n && k < got; k++) begin
        addr_t a; data_t d;
        a = u_phy.wr_addr[k];
        d = u_phy.wr_data[k];
        check(a == 16'h4000 + 16'(3 * k) && d == ~(16'(k) * 16'h0101),
              $sformatf("entry %0d: %h/%h", k, a, d));
      end
    end
    @(posedge clk);
    check(!busy && !active, "iterator not idle after done");
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; len = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run(1, 0);
    run(2, 0);
    run(5, 0);
    run(40, 0);
    run(0, 0);
    run(6, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
