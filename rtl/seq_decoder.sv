// seq_decoder: 5-to-32 decoder of the sequence loader.
//
// Turns the sequence number held in the sequence register into a one-hot
// enable, one line per sequence slot, so that exactly one sequence block
// drives the shared address/data lines. The width of the sequence bus (5 bits,
// 32 slots) follows the design; the extra `en` input, driven by the iterator
// while a sequence runs, is how the iterator stops the sequence blocks, and
// all outputs are 0 when it is low. Purely combinational.
module seq_decoder #(
  parameter int SEL_W = 5
) (
  input  logic                  en,
  input  logic [SEL_W-1:0]      sel,
  output logic [(1<<SEL_W)-1:0] onehot
);
  always_comb begin
    onehot = '0;
    if (en) onehot[sel] = 1'b1;
  end
endmodule
