// seq_block_tb: checks sequence blocks of both routine types and an empty
// slot. For every position the address, data, valid and last outputs are
// compared with the sequence layout recomputed here (type 1: sequences 0-11,
// 32 writes from 0x1000; type 2: sequences 12-23, 16 writes from 0x2000;
// data = {3'b0, id, (37k + 11id) ^ 0x5A}), and a disabled block must output 0.
module seq_block_tb;
  import seq_pkg::*;

  localparam int IDS [5] = '{0, 11, 12, 23, 28};
  logic        en;
  pos_t        pos;
  logic [4:0]  valid, last;
  addr_t [4:0] addr;
  data_t [4:0] data;
  int checks = 0, failures = 0;

  for (genvar g = 0; g < 5; g++) begin : g_blk
    seq_block #(.SEQ_ID(IDS[g])) dut (
      .en, .pos, .valid(valid[g]), .last(last[g]), .addr(addr[g]), .data(data[g])
    );
  end

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

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int p = 0; p < 40; p++) begin
        en = e[0]; pos = pos_t'(p);
        #1;
        for (int g = 0; g < 5; g++) begin
          int id, len;
          logic [15:0] ea, ed;
          logic ev, el;
          id  = IDS[g];
          len = exp_len(id);
          ev  = (e == 1) && (p < len);
          el  = ev && (p == len - 1);
          ea  = ev ? ((id < 12 ? 16'h1000 : 16'h2000) + 16'(p)) : 16'h0;
          ed  = ev ? {3'b000, 5'(id), 8'(p * 37 + id * 11) ^ 8'h5A} : 16'h0;
          check(valid[g] == ev && last[g] == el && addr[g] == ea && data[g] == ed,
                $sformatf("id=%0d en=%0d pos=%0d got v%0d l%0d %h/%h exp v%0d l%0d %h/%h",
                          id, e, p, valid[g], last[g], addr[g], data[g], ev, el, ea, ed));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
