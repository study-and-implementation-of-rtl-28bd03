// seq_loader_tb: the whole sequence loader against the behavioural PHY
// register controller. For every one of the 32 sequence numbers it writes
// the sequence register, then checks:
//   - the exact list of register writes that reach the PHY, against the
//     sequence layout recomputed here (sequences 0-11: 32 writes from 0x1000;
//     12-23: 16 writes from 0x2000; 24-31: none; data = {3'b0, id,
//     (37k + 11id) ^ 0x5A});
//   - timing: `done` arrives 2N+1 cycles after the register write is
//     acknowledged (two-cycle writes back to back), 2 for an empty slot;
//   - the register reads back the sequence number while busy and its default
//     0xFFFF afterwards;
//   - a second write while a sequence runs is ignored.
// A last run repeats one sequence with a slower controller (ack after 3
// cycles).
module seq_loader_tb;
  import seq_pkg::*;

  logic     clk = 0, rst_n = 0;
  par_req_t s_req, m_req;
  par_rsp_t s_rsp, m_rsp;
  logic     busy, done;
  int checks = 0, failures = 0;

  seq_loader dut (.clk, .rst_n, .s_req, .s_rsp, .m_req, .m_rsp, .busy, .done);
  phy_reg_model #(.LAT(1)) u_phy (.clk, .rst_n, .req(m_req), .rsp(m_rsp));

  always #5 clk = ~clk;

  function automatic int exp_len(int id);
    return id < 12 ? 32 : (id < 24 ? 16 : 0);
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic reg_access(input bit we, input data_t wd, output data_t rd);
    s_req.req <= 1; s_req.we <= we; s_req.addr <= SEQ_REG_ADDR; s_req.wdata <= wd;
    do @(posedge clk); while (!s_rsp.ack);
    rd = s_rsp.rdata;
    s_req.req <= 0;
  endtask

  task automatic run(int id, int lat, bit poke);
    data_t rd;
    int cyc, n, got;
    n = exp_len(id);
    u_phy.lat = lat;
    u_phy.clear_log();
    reg_access(1, data_t'(id), rd);
    cyc = 0;
    while (!done && cyc < 2000) begin
      @(posedge clk);
      cyc++;
      if (poke && cyc == 4) begin
        // second write while busy; the done pulse cannot occur during it
        data_t rd2;
        reg_access(1, data_t'((id + 1) % 24), rd2);
        check(rd2 == data_t'(id), $sformatf("busy readback %h exp %h", rd2, id));
        cyc += 2;
      end
    end
    if (lat == 1)
      check(cyc == (n == 0 ? 2 : 2 * n + 1), $sformatf("seq %0d: done after %0d cycles", id, cyc));
    else
      check(cyc == (lat + 1) * n + 1, $sformatf("seq %0d lat %0d: done after %0d cycles", id, lat, cyc));
    got = u_phy.wr_addr.size();
    check(got == n, $sformatf("seq %0d: %0d writes, expected %0d", id, got, n));
    for (int k = 0; k < n && k < got; k++) begin
      logic [15:0] ea, ed;
      ea = (id < 12 ? 16'h1000 : 16'h2000) + 16'(k);
      ed = {3'b000, 5'(id), 8'(k * 37 + id * 11) ^ 8'h5A};
      check(u_phy.wr_addr[k] == ea && u_phy.wr_data[k] == ed,
            $sformatf("seq %0d entry %0d: %h/%h exp %h/%h", id, k,
                      u_phy.wr_addr[k], u_phy.wr_data[k], ea, ed));
    end
    @(posedge clk);
    reg_access(0, '0, rd);
    check(rd == 16'hFFFF && !busy, $sformatf("seq %0d: register %h after done", id, rd));
    @(posedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s_req = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int id = 0; id < 32; id++) run(id, 1, 0);
    run(5, 1, 1);
    run(14, 1, 1);
    run(20, 3, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
