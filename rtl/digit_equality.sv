// digit_equality - equality test of the pre-computation unit.
//
// XORs the two digits bit by bit and ORs the XOR outputs together. The result
// S is 0 when the digits are equal and 1 as soon as any bit differs, which is
// the signal that stops the digit-by-digit walk. Purely combinational; the
// XOR-then-OR structure is the one the design description gives.
module digit_equality #(
  parameter int unsigned DIGIT = 2
) (
  input  logic [DIGIT-1:0] a_digit,
  input  logic [DIGIT-1:0] b_digit,
  output logic             s
);

  logic [DIGIT-1:0] diff;

  always_comb begin
    diff = a_digit ^ b_digit;
    s    = |diff;
  end

endmodule
