// cla_cell - two-bit comparison cell built on the CLA carry equation.
//
// For a pair of bits A1A0 and B1B0 it forms, per bit, a generate term
// G_i = not(A_i) & B_i and a propagate (bit equal) term P_i = not(A_i ^ B_i),
// and the pair's carry out  g = G_1 + P_1 G_0,  which is 1 exactly when B1B0
// is greater than A1A0 (the comparison equation of the design description).
// The extra output p = P_1 P_0 (pair equal) is this design's addition so that
// the encoder can chain pairs of wider digits. Purely combinational.
module cla_cell (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic       g,
  output logic       p
);

  logic [1:0] gen, prop;

  always_comb begin
    gen  = ~a & b;
    prop = ~(a ^ b);
    g    = gen[1] | (prop[1] & gen[0]);
    p    = prop[1] & prop[0];
  end

endmodule
