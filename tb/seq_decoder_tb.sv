// seq_decoder_tb: exhaustive test of the 5-to-32 decoder: every sequence
// number with the enable high gives exactly that one output line, and the
// enable low gives no line at all.
module seq_decoder_tb;
  logic        en;
  logic [4:0]  sel;
  logic [31:0] onehot;
  int checks = 0, failures = 0;

  seq_decoder dut (.en, .sel, .onehot);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int s = 0; s < 32; s++) begin
        logic [31:0] exp;
        en = e[0]; sel = s[4:0];
        #1;
        exp = 0;
        if (e == 1) exp = 32'd1 << s;
        checks++;
        if (onehot !== exp) begin
          failures++;
          $display("FAIL en=%0d sel=%0d onehot=%h exp=%h", e, s, onehot, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
