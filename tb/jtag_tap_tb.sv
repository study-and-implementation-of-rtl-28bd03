// jtag_tap_tb: the TAP controller driven through its pins by jtag_host.
// Checks: IDCODE is selected after reset and shifts out the 32-bit ID; an IR
// scan shifts out the captured 0001; BYPASS delays TDI by one TCK; EXTEST and
// SAMPLE also select the bypass bit; a private instruction (PAR_ADDR) raises
// exactly one capture, one shift per bit and one update enable, routes the
// shift enables and TDI to the parallel-access register (a 16-bit register in
// this testbench) and its serial output to TDO; five TMS=1 clocks and TRST
// each return the TAP to Test-Logic-Reset with IDCODE selected.
module jtag_tap_tb;
  import jtag_pkg::*;

  logic clk = 0, rst_n = 0;
  logic tck, tms, tdi, trst_n, tdo;
  ir_t        ir;
  tap_state_t state;
  logic       tdi_s, dr_capture, dr_shift, dr_update, par_tdo;
  logic [15:0] udr, udr_upd;
  int n_cap = 0, n_shift = 0, n_upd = 0;
  int checks = 0, failures = 0;

  jtag_tap dut (
    .clk, .rst_n, .tck, .tms, .tdi, .trst_n, .tdo,
    .ir, .state, .tdi_s, .dr_capture, .dr_shift, .dr_update, .par_tdo
  );
  jtag_host #(.HALF(4)) host (.clk, .tck, .tms, .tdi, .trst_n, .tdo);

  always #5 clk = ~clk;

  // user data register standing in for the parallel-access bridge
  always @(posedge clk) begin
    if (dr_capture) begin udr <= 16'hC3A5; n_cap++; end
    if (dr_shift)   begin udr <= {tdi_s, udr[15:1]}; n_shift++; end
    if (dr_update)  begin udr_upd <= udr; n_upd++; end
  end
  assign par_tdo = udr[0];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] dout;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);
    host.reset();
    repeat (4) @(posedge clk);
    check(state == RTI && ir == IR_IDCODE, $sformatf("after reset state=%0d ir=%b", state, ir));
    host.scan_dr(64'h0, 32, dout);
    check(dout[31:0] == IDCODE_VALUE, $sformatf("idcode %h", dout[31:0]));

    host.scan_ir(64'(IR_BYPASS), 4, dout);
    check(dout[3:0] == 4'b0001, $sformatf("IR capture %b", dout[3:0]));
    repeat (4) @(posedge clk);
    check(ir == IR_BYPASS, $sformatf("ir %b after BYPASS scan", ir));
    host.scan_dr(64'h00B6, 8, dout);
    check(dout[7:0] == 8'h6C, $sformatf("bypass out %h exp 6c", dout[7:0]));

    host.scan_ir(64'(IR_EXTEST), 4, dout);
    host.scan_dr(64'h1, 3, dout);
    check(dout[2:0] == 3'b010, $sformatf("extest bypass %b", dout[2:0]));
    host.scan_ir(64'(IR_SAMPLE), 4, dout);
    host.scan_dr(64'h3, 3, dout);
    check(dout[2:0] == 3'b110, $sformatf("sample bypass %b", dout[2:0]));
    check(n_cap == 0 && n_shift == 0 && n_upd == 0, "user enables during standard instructions");

    host.scan_ir(64'(IR_PAR_ADDR), 4, dout);
    host.scan_dr(64'h5E71, 16, dout);
    repeat (4) @(posedge clk);
    check(dout[15:0] == 16'hC3A5, $sformatf("user DR out %h", dout[15:0]));
    check(udr_upd == 16'h5E71, $sformatf("user DR updated %h", udr_upd));
    check(n_cap == 1 && n_shift == 16 && n_upd == 1,
          $sformatf("enables cap=%0d shift=%0d upd=%0d", n_cap, n_shift, n_upd));

    host.reset();
    repeat (4) @(posedge clk);
    check(ir == IR_IDCODE && state == RTI, "TMS reset did not select IDCODE");

    host.scan_ir(64'(IR_BYPASS), 4, dout);
    host.trst();
    check(state == TLR && ir == IR_IDCODE, $sformatf("TRST: state=%0d ir=%b", state, ir));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
