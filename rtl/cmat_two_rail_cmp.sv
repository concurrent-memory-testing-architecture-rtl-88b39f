// cmat_two_rail_cmp: two-rail comparator used by the built-in tester.
//
// Compares W pairs of bits (a[i], b[i]) that must be equal. Each pair is
// turned into a two-rail code word (a[i], ~b[i]), which is valid when its two
// rails differ. The code words are merged by a tree of two-rail checker cells
//   z0 = x0 & y0 | x1 & y1,   z1 = x0 & y1 | x1 & y0,
// whose output pair z is valid (z[0] != z[1]) only if every input pair is,
// i.e. only if a == b. The user flags a fault when z is not a valid code word
// in a cycle that asks for a comparison. Purely combinational. That the
// tester's outputs are verified by a two-rail comparator follows the
// modelled design; the checker-cell tree is the usual textbook construction
// chosen here.
module cmat_two_rail_cmp #(
  parameter int unsigned W = 1
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [1:0]   z
);
  always_comb begin
    z = {~b[0], a[0]};
    for (int unsigned i = 1; i < W; i++) begin
      z = {(z[0] & ~b[i]) | (z[1] & a[i]),
           (z[0] & a[i])  | (z[1] & ~b[i])};
    end
  end
endmodule
