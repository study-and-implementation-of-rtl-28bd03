// jtag_host: testbench-side JTAG driver (the tester's TAP master).
//
// Generates TCK from the simulation clock, HALF clk cycles per TCK phase,
// and offers tasks for the usual TAP walks: reset (five TMS=1 clocks, then
// Run-Test/Idle), scan_ir and scan_dr (from Run-Test/Idle, through capture,
// shift and update, back to Run-Test/Idle). Data go LSB first; TDO is sampled
// just before each TCK rising edge. `tck_count` counts TCK periods.
module jtag_host #(
  parameter int HALF = 4
) (
  input  logic clk,
  output logic tck,
  output logic tms,
  output logic tdi,
  output logic trst_n,
  input  logic tdo
);
  int tck_count = 0;

  initial begin
    tck = 0; tms = 1; tdi = 0; trst_n = 1;
  end

  task automatic tick(input logic tms_v, input logic tdi_v, output logic tdo_v);
    tms = tms_v;
    tdi = tdi_v;
    repeat (HALF) @(posedge clk);
    tdo_v = tdo;
    tck = 1;
    repeat (HALF) @(posedge clk);
    tck = 0;
    tck_count++;
  endtask

  task automatic reset();
    logic d;
    repeat (5) tick(1, 0, d);
    tick(0, 0, d);
  endtask

  task automatic trst();
    trst_n = 0;
    repeat (4 * HALF) @(posedge clk);
    trst_n = 1;
    repeat (2 * HALF) @(posedge clk);
  endtask

  // Shift `len` bits through the selected register; returns what came out.
  task automatic shift(input logic [63:0] din, input int len, output logic [63:0] dout);
    logic d;
    dout = '0;
    tick(0, 0, d);                  // Capture -> Shift
    for (int i = 0; i < len; i++) begin
      tick(i == len - 1, din[i], d);
      dout[i] = d;
    end
    tick(1, 0, d);                  // Exit1 -> Update
    tick(0, 0, d);                  // Update -> Run-Test/Idle
  endtask

  task automatic scan_ir(input logic [63:0] din, input int len, output logic [63:0] dout);
    logic d;
    tick(1, 0, d);                  // Run-Test/Idle -> Select-DR
    tick(1, 0, d);                  // -> Select-IR
    tick(0, 0, d);                  // -> Capture-IR
    shift(din, len, dout);
  endtask

  task automatic scan_dr(input logic [63:0] din, input int len, output logic [63:0] dout);
    logic d;
    tick(1, 0, d);                  // Run-Test/Idle -> Select-DR
    tick(0, 0, d);                  // -> Capture-DR
    shift(din, len, dout);
  endtask
endmodule
