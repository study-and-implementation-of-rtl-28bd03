// seq_reg_tb: the sequence register. Checks the reset value, that a write is
// acknowledged one cycle after the request and produces exactly one start
// pulse with the written sequence number, that reads return the written value
// while busy, that a second write while busy is acknowledged but ignored, and
// that `done` brings the register back to its default value 0xFFFF.
module seq_reg_tb;
  import seq_pkg::*;

  logic     clk = 0, rst_n = 0;
  par_req_t s_req;
  par_rsp_t s_rsp;
  logic     done;
  sel_t     sel;
  logic     start, busy;
  data_t    value;
  int checks = 0, failures = 0;
  int starts = 0;

  seq_reg dut (.clk, .rst_n, .s_req, .s_rsp, .done, .sel, .start, .busy, .value);

  always #5 clk = ~clk;
  always @(posedge clk) if (start) starts++;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // One access; returns read data and the number of cycles until ack.
  task automatic access(input bit we, input data_t wd, output data_t rd, output int cyc);
    s_req.req <= 1; s_req.we <= we; s_req.addr <= SEQ_REG_ADDR; s_req.wdata <= wd;
    cyc = 0;
    do begin
      @(posedge clk);
      cyc++;
    end while (!s_rsp.ack);
    rd = s_rsp.rdata;
    s_req.req <= 0;
    @(posedge clk);
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data_t rd;
    int cyc;
    s_req = '0; done = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    access(0, '0, rd, cyc);
    check(rd == 16'hFFFF && !busy, $sformatf("reset value %h", rd));
    check(cyc == 2, $sformatf("read took %0d cycles", cyc));

    for (int n = 0; n < 32; n += 7) begin
      int s0;
      s0 = starts;
      access(1, data_t'(n), rd, cyc);
      check(cyc == 2, $sformatf("write took %0d cycles", cyc));
      check(busy && sel == sel_t'(n), $sformatf("busy=%0d sel=%0d exp %0d", busy, sel, n));
      check(starts == s0 + 1, $sformatf("start pulses %0d", starts - s0));
      access(0, '0, rd, cyc);
      check(rd == data_t'(n), $sformatf("busy readback %h exp %h", rd, n));
      // write while busy: ignored
      access(1, 16'h0003, rd, cyc);
      check(value == data_t'(n) && starts == s0 + 1, "write while busy not ignored");
      done <= 1;
      @(posedge clk);
      done <= 0;
      @(posedge clk);
      check(!busy && value == 16'hFFFF, $sformatf("after done busy=%0d value=%h", busy, value));
      access(0, '0, rd, cyc);
      check(rd == 16'hFFFF, $sformatf("after done readback %h", rd));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
