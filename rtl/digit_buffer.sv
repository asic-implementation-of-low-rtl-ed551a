// digit_buffer - the Digit Buffer (DB) of the folded comparator.
//
// Two DIGIT-bit shift registers, one for A and one for B. Each `shift` takes
// one bit of each operand (the input buffer's MSBs) in at the LSB end, so
// after DIGIT shifts the first bit taken in sits in the MSB position and the
// registers hold one digit of each operand in its natural order. The
// bit-serial filling follows the design description; the zero reset is this
// design's choice. Outputs are register outputs.
module digit_buffer #(
  parameter int unsigned DIGIT = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             shift,
  input  logic             a_bit,
  input  logic             b_bit,
  output logic [DIGIT-1:0] a_digit,
  output logic [DIGIT-1:0] b_digit
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_digit <= '0;
      b_digit <= '0;
    end else if (shift) begin
      a_digit <= DIGIT'({a_digit, a_bit});
      b_digit <= DIGIT'({b_digit, b_bit});
    end
  end

endmodule
