// seq_top_tb: end-to-end test of the complete subsystem at its default
// parameters, with the tester's JTAG master (jtag_host) on the pins, a
// direct parallel host and the behavioural PHY register controller.
//
// It walks through the design's flow:
//   1. JTAG identification (IDCODE) and a single PHY register write and read
//      through the JTAG-to-parallel translation.
//   2. The old way: a type-2 routine (sequence 12) sent register by register
//      through JTAG, timed.
//   3. The new way over JTAG: the sequence number written to the sequence
//      register, the register polled until it reverts to 0xFFFF, timed; the
//      writes that reach the PHY must be identical to step 2, and the run
//      must take a fraction of its time.
//      The same comparison is made for a type-1 routine (sequence 3).
//   4. Direct parallel mode: every one of the 32 sequence numbers run, each
//      checked write by write against the sequence layout recomputed here and
//      for its timing (done 2N+1 cycles after the register write is acked).
//   5. A direct PHY write issued while a sequence runs (stalls until the
//      sequence is over), and a second sequence-register write while busy
//      (ignored).
// Each mechanism is counted; one that never happened is a failure.
module seq_top_tb;
  import seq_pkg::*;
  import jtag_pkg::*;

  logic     clk = 0, rst_n = 0;
  logic     tck, tms, tdi, trst_n, tdo;
  logic     host_sel;
  par_req_t host_req, phy_req;
  par_rsp_t host_rsp, phy_rsp;
  logic     seq_busy, seq_done, host_stall, jtag_pending;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_jtag_wr = 0, n_jtag_rd = 0, n_seq_t1 = 0, n_seq_t2 = 0, n_seq_empty = 0;
  int n_busy_seen = 0, n_revert = 0, n_stall_cyc = 0, n_ignored = 0, n_mode_sw = 0;

  seq_top dut (
    .clk, .rst_n, .tck, .tms, .tdi, .trst_n, .tdo,
    .host_sel, .host_req, .host_rsp, .phy_req, .phy_rsp,
    .seq_busy, .seq_done, .host_stall, .jtag_pending
  );
  jtag_host #(.HALF(4)) host (.clk, .tck, .tms, .tdi, .trst_n, .tdo);
  phy_reg_model #(.LAT(1)) u_phy (.clk, .rst_n, .req(phy_req), .rsp(phy_rsp));

  always #5 clk = ~clk;
  always @(posedge clk) if (host_stall) n_stall_cyc++;

  function automatic int exp_len(int id);
    return id < 12 ? 32 : (id < 24 ? 16 : 0);
  endfunction
  function automatic logic [15:0] exp_addr(int id, int k);
    return (id < 12 ? 16'h1000 : 16'h2000) + 16'(k);
  endfunction
  function automatic logic [15:0] exp_data(int id, int k);
    return {3'b000, 5'(id), 8'(k * 37 + id * 11) ^ 8'h5A};
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic set_mode(bit sel);
    if (host_sel !== sel) n_mode_sw++;
    host_sel = sel;
    @(posedge clk);
  endtask

  // ---- JTAG accesses ----
  logic [IR_W-1:0] cur_ir = '1;
  task automatic j_ir(ir_t v);
    logic [63:0] d;
    if (cur_ir != v) host.scan_ir(64'(v), IR_W, d);
    cur_ir = v;
  endtask
  task automatic j_write(addr_t a, data_t v);
    logic [63:0] d;
    j_ir(IR_PAR_ADDR);
    host.scan_dr(64'(a), 16, d);
    j_ir(IR_PAR_WRITE);
    host.scan_dr(64'(v), 16, d);
    n_jtag_wr++;
  endtask
  task automatic j_read(addr_t a, output data_t v);
    logic [63:0] d;
    j_ir(IR_PAR_ADDR);
    host.scan_dr(64'(a), 16, d);
    j_ir(IR_PAR_READ);
    host.scan_dr(64'h0, 18, d);       // update launches the read
    host.scan_dr(64'h0, 18, d);       // capture returns it
    check(d[17:16] == 2'b00, $sformatf("JTAG read status %b", d[17:16]));
    v = d[15:0];
    n_jtag_rd++;
  endtask

  // ---- direct parallel accesses ----
  task automatic d_access(bit we, addr_t a, data_t wd, output data_t rd);
    par_req_t t;
    t.req = 1; t.we = we; t.addr = a; t.wdata = wd;
    host_req <= t;
    do @(posedge clk); while (!host_rsp.ack);
    rd = host_rsp.rdata;
    host_req <= '0;
    @(posedge clk);
  endtask

  task automatic check_log(int id, int from, string tag);
    int n;
    n = exp_len(id);
    check(u_phy.wr_addr.size() == from + n,
          $sformatf("%s seq %0d: %0d writes, expected %0d", tag, id, u_phy.wr_addr.size() - from, n));
    for (int k = 0; k < n && from + k < u_phy.wr_addr.size(); k++)
      check(u_phy.wr_addr[from + k] == exp_addr(id, k) && u_phy.wr_data[from + k] == exp_data(id, k),
            $sformatf("%s seq %0d entry %0d: %h/%h", tag, id, k,
                      u_phy.wr_addr[from + k], u_phy.wr_data[from + k]));
  endtask

  task automatic count_seq(int id);
    if (id < 12) n_seq_t1++;
    else if (id < 24) n_seq_t2++;
    else n_seq_empty++;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] d;
    data_t v;
    int t0, t_jtag_routine, t_jtag_loader, polls;
    host_sel = 0; host_req = '0;
    repeat (4) @(posedge clk);
    rst_n <= 1;
    repeat (4) @(posedge clk);

    // 1. identification, one register write and read through JTAG
    host.reset();
    host.scan_dr(64'h0, 32, d);
    check(d[31:0] == IDCODE_VALUE, $sformatf("IDCODE %h", d[31:0]));
    j_write(16'h0300, 16'hCAFE);
    j_read(16'h0300, v);
    check(v == 16'hCAFE, $sformatf("JTAG readback %h", v));
    check(u_phy.wr_addr.size() == 1 && u_phy.wr_addr[0] == 16'h0300, "JTAG write did not reach PHY");

    // 2. routine sent register by register through JTAG
    u_phy.clear_log();
    t0 = host.tck_count;
    for (int k = 0; k < exp_len(12); k++) j_write(exp_addr(12, k), exp_data(12, k));
    repeat (8) @(posedge clk);
    t_jtag_routine = host.tck_count - t0;
    check_log(12, 0, "JTAG routine");

    // 3. the same routine through the sequence register, over JTAG
    u_phy.clear_log();
    t0 = host.tck_count;
    j_write(SEQ_REG_ADDR, 16'd12);
    polls = 0;
    do begin
      j_read(SEQ_REG_ADDR, v);
      polls++;
      if (v == 16'd12) n_busy_seen++;
    end while (v != SEQ_REG_DEFAULT && polls < 50);
    t_jtag_loader = host.tck_count - t0;
    check(v == SEQ_REG_DEFAULT, "sequence register did not revert");
    n_revert++;
    count_seq(12);
    check_log(12, 0, "loader via JTAG");
    $display("type-2 routine: %0d TCK register by register, %0d TCK through the loader (%0d%%)",
             t_jtag_routine, t_jtag_loader, 100 * t_jtag_loader / t_jtag_routine);
    check(t_jtag_loader * 5 < t_jtag_routine, "loader not faster than JTAG writes");

    // a type-1 routine both ways; the loader run is polled while busy
    u_phy.clear_log();
    t0 = host.tck_count;
    for (int k = 0; k < exp_len(3); k++) j_write(exp_addr(3, k), exp_data(3, k));
    repeat (8) @(posedge clk);
    t_jtag_routine = host.tck_count - t0;
    check_log(3, 0, "JTAG routine");
    u_phy.clear_log();
    t0 = host.tck_count;
    j_write(SEQ_REG_ADDR, 16'd3);
    j_read(SEQ_REG_ADDR, v);
    if (v == 16'd3) n_busy_seen++;
    while (v != SEQ_REG_DEFAULT) j_read(SEQ_REG_ADDR, v);
    t_jtag_loader = host.tck_count - t0;
    n_revert++;
    count_seq(3);
    check_log(3, 0, "loader via JTAG");
    $display("type-1 routine: %0d TCK register by register, %0d TCK through the loader (%0d%%)",
             t_jtag_routine, t_jtag_loader, 100 * t_jtag_loader / t_jtag_routine);
    check(t_jtag_loader * 10 < t_jtag_routine, "type-1 loader run not under 10% of JTAG writes");

    // 4. every sequence number through the direct parallel port
    set_mode(1);
    for (int id = 0; id < 32; id++) begin
      int cyc;
      u_phy.clear_log();
      d_access(1, SEQ_REG_ADDR, data_t'(id), v);
      cyc = 1;                      // d_access spent one cycle after the ack
      while (!seq_done && cyc < 1000) begin
        @(posedge clk);
        cyc++;
      end
      check(cyc == (exp_len(id) == 0 ? 2 : 2 * exp_len(id) + 1),
            $sformatf("seq %0d: done %0d cycles after the register write", id, cyc));
      @(posedge clk);
      d_access(0, SEQ_REG_ADDR, '0, v);
      check(v == SEQ_REG_DEFAULT, $sformatf("seq %0d: register %h after done", id, v));
      n_revert++;
      count_seq(id);
      check_log(id, 0, "direct");
    end

    // 5. host write during a sequence stalls; second start is ignored
    u_phy.clear_log();
    begin
      int s0;
      s0 = n_stall_cyc;
      d_access(1, SEQ_REG_ADDR, 16'd7, v);
      d_access(0, SEQ_REG_ADDR, '0, v);
      check(v == 16'd7, $sformatf("busy readback %h", v));
      if (v == 16'd7) n_busy_seen++;
      d_access(1, SEQ_REG_ADDR, 16'd15, v);           // ignored
      d_access(1, 16'h0500, 16'h1234, v);             // waits for the loader
      check(n_stall_cyc > s0, "host write did not stall");
      wait (!seq_busy);
      repeat (4) @(posedge clk);
      check(u_phy.wr_addr.size() == exp_len(7) + 1, $sformatf("%0d writes", u_phy.wr_addr.size()));
      if (u_phy.wr_addr.size() == exp_len(7) + 1) begin
        check(u_phy.wr_addr[exp_len(7)] == 16'h0500 && u_phy.wr_data[exp_len(7)] == 16'h1234,
              "stalled host write not after the sequence");
        u_phy.wr_addr.pop_back();
        u_phy.wr_data.pop_back();
      end
      check_log(7, 0, "during stall");
      n_ignored++;
      count_seq(7);
      d_access(0, SEQ_REG_ADDR, '0, v);
      check(v == SEQ_REG_DEFAULT, "register after ignored write");
      n_revert++;
    end
    set_mode(0);
    j_read(16'h0500, v);
    check(v == 16'h1234, $sformatf("JTAG read after mode switch %h", v));

    $display("mechanisms: jtag_wr=%0d jtag_rd=%0d type1=%0d type2=%0d empty=%0d busy_seen=%0d revert=%0d stall_cycles=%0d ignored=%0d mode_switches=%0d",
             n_jtag_wr, n_jtag_rd, n_seq_t1, n_seq_t2, n_seq_empty, n_busy_seen, n_revert,
             n_stall_cyc, n_ignored, n_mode_sw);
    check(n_jtag_wr > 0, "no JTAG write");
    check(n_jtag_rd > 0, "no JTAG read");
    check(n_seq_t1 > 0, "no type-1 sequence");
    check(n_seq_t2 > 0, "no type-2 sequence");
    check(n_seq_empty > 0, "no empty slot selected");
    check(n_busy_seen > 0, "register never seen busy");
    check(n_revert > 0, "register never reverted");
    check(n_stall_cyc > 0, "no host stall");
    check(n_ignored > 0, "no write while busy");
    check(n_mode_sw > 1, "access mode not switched both ways");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
