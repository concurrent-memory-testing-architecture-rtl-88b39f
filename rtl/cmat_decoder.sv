// cmat_decoder: row or column address decoder of a CMAT memory matrix.
//
// Turns a B-bit address into N = 2**B one-hot select lines. When en is low
// every output is off; the tester uses this to disable the row (column)
// decoder while it drives the row (column) neighborhood, so that the two
// decoders can be tested one at a time. Purely combinational.
// The decoder with an enable follows the memory organisation being modelled;
// the enable input as a separate port is this design's way of expressing
// "all decoder outputs are disabled".
module cmat_decoder #(
  parameter int unsigned B = 8,
  parameter int unsigned N = 1 << B
) (
  input  logic         en,
  input  logic [B-1:0] addr,
  output logic [N-1:0] sel
);
  always_comb begin
    sel = '0;
    if (en) sel[addr] = 1'b1;
  end
endmodule
