// seq_block: one hard-coded register-write sequence.
//
// Each instance holds a single sequence of (address, data) pairs as a
// constant table built at elaboration from seq_pkg::seq_addr/seq_data, so
// the table becomes a small ROM. While its decoder line `en` is high, the
// block presents the pair at position `pos` (supplied by the iterator), with
// `valid` when pos lies inside the sequence and `last` on its final entry.
// While `en` is low all outputs are 0, so the outputs of every block can be
// ORed together onto one bus. Combinational read, no clock.
//
// One block per sequence, enabled by the decoder and stepped by the iterator,
// follows the design; the table contents are placeholders (see seq_pkg).
module seq_block
  import seq_pkg::*;
#(
  parameter int SEQ_ID = 0
) (
  input  logic  en,
  input  pos_t  pos,
  output logic  valid,
  output logic  last,
  output addr_t addr,
  output data_t data
);
  localparam int LEN   = seq_len(SEQ_ID);
  localparam int DEPTH = (LEN > 0) ? LEN : 1;
  localparam int ENT_W = ADDR_W + DATA_W;

  function automatic logic [DEPTH-1:0][ENT_W-1:0] build_rom();
    logic [DEPTH-1:0][ENT_W-1:0] r;
    r = '0;
    for (int k = 0; k < LEN; k++) r[k] = {seq_addr(SEQ_ID, k), seq_data(SEQ_ID, k)};
    return r;
  endfunction

  localparam logic [DEPTH-1:0][ENT_W-1:0] ROM = build_rom();

  logic             in_range;
  logic [ENT_W-1:0] entry;

  always_comb begin
    in_range = (32'(pos) < LEN);
    entry    = in_range ? ROM[pos] : '0;
    valid    = en && in_range;
    last     = en && in_range && (32'(pos) == LEN - 1);
    {addr, data} = valid ? entry : '0;
  end
endmodule
