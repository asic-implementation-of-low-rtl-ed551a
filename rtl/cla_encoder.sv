// cla_encoder - the encoder block: decides which of two unequal digits is
// greater.
//
// The digit is cut into two-bit pairs starting from the MSB, and each pair is
// compared by a cla_cell, giving its generate g_j (B pair greater) and
// propagate p_j (pair equal). The carry out of pair j is
//     cout_j = g_j & p_(j+1) & ... & p_(NP-1)
// i.e. the pair's generate passed through every more significant pair that is
// equal; the OR of all cout_j is the lookahead carry TC_out = B_GR, 1 when B
// is greater than A and 0 when A is greater. The pairwise (radix-2) encoding
// and the OR into TC_out follow the design description; gating each pair's
// carry by the equality of the pairs above it is this design's reading of
// how the carries combine (a plain OR of the pair outputs would let a lower
// pair overrule a higher one). A digit of odd width is zero-extended at the
// top, which changes no comparison. Purely combinational; only meaningful
// when the digits differ (for equal digits b_gr is 0).
module cla_encoder #(
  parameter int unsigned DIGIT = 2,
  localparam int unsigned NP   = (DIGIT + 1) / 2   // number of 2-bit pairs
) (
  input  logic [DIGIT-1:0] a_digit,
  input  logic [DIGIT-1:0] b_digit,
  output logic [NP-1:0]    cout,
  output logic             b_gr
);

  logic [2*NP-1:0] a_ext, b_ext;
  logic [NP-1:0]   g, p;
  logic [NP:0]     above_eq;   // above_eq[j]: every pair above pair j-1 equal

  assign a_ext = (2*NP)'(a_digit);
  assign b_ext = (2*NP)'(b_digit);

  for (genvar j = 0; j < NP; j++) begin : g_pair
    cla_cell u_cell (
      .a (a_ext[2*j +: 2]),
      .b (b_ext[2*j +: 2]),
      .g (g[j]),
      .p (p[j])
    );
  end

  always_comb begin
    above_eq[NP] = 1'b1;
    for (int j = NP - 1; j >= 0; j--) begin
      cout[j]     = g[j] & above_eq[j+1];
      above_eq[j] = above_eq[j+1] & p[j];
    end
    b_gr = |cout;
  end

endmodule
