// jtag_par_bridge_tb: the JTAG-to-parallel translation, driven with the TAP
// enables directly (one capture, one enable per shifted bit, one update) and
// answered by the behavioural PHY register controller. Checks: PAR_ADDR loads
// the address and captures it back; PAR_WRITE writes the shifted data at that
// address (address first, then data) and captures the last write data;
// PAR_READ starts a read and the next capture returns {error, pending, data};
// with a slow controller a capture right after the update shows `pending`,
// an update during a pending transfer is dropped and reported by `error`,
// and `error` clears once captured. Standard instructions start nothing.
module jtag_par_bridge_tb;
  import seq_pkg::*;
  import jtag_pkg::*;

  logic     clk = 0, rst_n = 0;
  ir_t      ir;
  logic     tdi_s, dr_capture, dr_shift, dr_update, par_tdo, pending;
  par_req_t m_req;
  par_rsp_t m_rsp;
  int checks = 0, failures = 0;

  jtag_par_bridge dut (
    .clk, .rst_n, .ir, .tdi_s, .dr_capture, .dr_shift, .dr_update, .par_tdo,
    .m_req, .m_rsp, .pending
  );
  phy_reg_model #(.LAT(1)) u_phy (.clk, .rst_n, .req(m_req), .rsp(m_rsp));

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // which: 0 capture, 1 shift, 2 update
  task automatic pulse(int which);
    dr_capture <= (which == 0);
    dr_shift   <= (which == 1);
    dr_update  <= (which == 2);
    @(posedge clk);
    dr_capture <= 0; dr_shift <= 0; dr_update <= 0;
    repeat (3) @(posedge clk);
  endtask

  task automatic dr_scan(input ir_t instr, input logic [31:0] din, input int len,
                         output logic [31:0] dout);
    ir <= instr;
    @(posedge clk);
    pulse(0);
    dout = '0;
    for (int i = 0; i < len; i++) begin
      dout[i] = par_tdo;
      tdi_s  <= din[i];
      pulse(1);
    end
    pulse(2);
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] dout;
    ir = IR_IDCODE; tdi_s = 0; dr_capture = 0; dr_shift = 0; dr_update = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);

    // address, then data
    dr_scan(IR_PAR_ADDR, 32'h1234, 16, dout);
    dr_scan(IR_PAR_ADDR, 32'h0, 16, dout);
    check(dout[15:0] == 16'h1234, $sformatf("address capture %h", dout[15:0]));
    dr_scan(IR_PAR_ADDR, 32'h1234, 16, dout);
    dr_scan(IR_PAR_WRITE, 32'hBEEF, 16, dout);
    repeat (4) @(posedge clk);
    check(u_phy.wr_addr.size() == 1, $sformatf("%0d writes", u_phy.wr_addr.size()));
    check(u_phy.wr_addr[0] == 16'h1234 && u_phy.wr_data[0] == 16'hBEEF,
          $sformatf("write %h/%h", u_phy.wr_addr[0], u_phy.wr_data[0]));
    dr_scan(IR_PAR_ADDR, 32'h0ABC, 16, dout);
    dr_scan(IR_PAR_WRITE, 32'h7001, 16, dout);
    check(dout[15:0] == 16'hBEEF, $sformatf("write capture %h", dout[15:0]));
    repeat (4) @(posedge clk);
    check(u_phy.wr_addr.size() == 2 && u_phy.wr_addr[1] == 16'h0ABC && u_phy.wr_data[1] == 16'h7001,
          "second write");

    // read back
    dr_scan(IR_PAR_ADDR, 32'h1234, 16, dout);
    dr_scan(IR_PAR_READ, 32'h0, 18, dout);
    repeat (4) @(posedge clk);
    dr_scan(IR_PAR_READ, 32'h0, 18, dout);
    check(dout[17:0] == {2'b00, 16'hBEEF}, $sformatf("read 1234 -> %h", dout[17:0]));
    dr_scan(IR_PAR_ADDR, 32'h0ABC, 16, dout);
    dr_scan(IR_PAR_READ, 32'h0, 18, dout);
    repeat (4) @(posedge clk);
    dr_scan(IR_PAR_READ, 32'h0, 18, dout);
    check(dout[17:0] == {2'b00, 16'h7001}, $sformatf("read 0abc -> %h", dout[17:0]));

    // slow controller: pending, then an update during it sets error
    u_phy.lat = 400;
    dr_scan(IR_PAR_ADDR, 32'h0055, 16, dout);
    dr_scan(IR_PAR_WRITE, 32'h00AA, 16, dout);
    check(pending, "no pending after write update");
    dr_scan(IR_PAR_WRITE, 32'h0011, 16, dout);      // dropped
    dr_scan(IR_PAR_READ, 32'h0, 18, dout);          // capture shows error+pending
    check(dout[17:16] == 2'b11, $sformatf("status %b exp 11", dout[17:16]));
    wait (!pending);
    u_phy.lat = 1;
    repeat (4) @(posedge clk);
    check(u_phy.wr_addr.size() == 3 && u_phy.wr_data[2] == 16'h00AA, "dropped write reached PHY");
    dr_scan(IR_PAR_READ, 32'h0, 18, dout);          // error was cleared by last capture
    repeat (4) @(posedge clk);
    dr_scan(IR_PAR_READ, 32'h0, 18, dout);
    check(dout[17:0] == {2'b00, 16'h00AA}, $sformatf("read 0055 -> %h", dout[17:0]));

    // standard instruction: no access
    begin
      int n0;
      n0 = u_phy.wr_addr.size() + u_phy.n_reads;
      ir <= IR_BYPASS;
      pulse(2);
      repeat (4) @(posedge clk);
      check(u_phy.wr_addr.size() + u_phy.n_reads == n0 && !pending, "access under BYPASS");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
