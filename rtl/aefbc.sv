// aefbc - Area Efficient Folded Binary Comparator (top level).
//
// Compares two WIDTH-bit unsigned words A and B. Instead of one comparison
// cell per bit pair across the whole word, the words are cut into
// WIDTH/DIGIT digits that are examined one after another, most significant
// digit first, on a single shared datapath:
//   * the pre-computation unit (input buffer, bit counter, digit buffer,
//     XOR/OR equality test) walks the digits and stops at the first unequal
//     one;
//   * the encoder block compares that one digit with CLA carry logic, two
//     bits at a time, giving B_GR (1: B > A, 0: A > B).
// If no digit differs the result is EQ.
//
// Interface: pulse `start` with a/b valid while `busy` is low. `done` pulses
// for one cycle with `eq`, `b_gr` and `digits_checked` valid; these three are
// held until the next start. A is greater when done shows eq = 0, b_gr = 0.
//
// Timing: with the start sampled at clock edge 0, `done` is high after edge
// k*(DIGIT+1), where k is the 1-based position of the first unequal digit
// (k = WIDTH/DIGIT for equal operands). The default sizes, 16-bit operands
// in 2-bit digits, are this design's reading of the main configuration; the
// handshake and the registered outputs are this design's choices.
module aefbc #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DIGIT = 2,
  localparam int unsigned NDIG = WIDTH / DIGIT,
  localparam int unsigned IW   = $clog2(NDIG) + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic             busy,
  output logic             done,
  output logic             eq,
  output logic             b_gr,
  output logic [IW-1:0]    digits_checked
);

  logic             diff_valid, all_eq, enc_b_gr;
  logic [DIGIT-1:0] a_digit, b_digit;
  logic [IW-1:0]    digit_idx;

  precompute_unit #(.WIDTH(WIDTH), .DIGIT(DIGIT)) u_pcu (
    .clk, .rst_n, .start, .a, .b,
    .busy       (busy),
    .diff_valid (diff_valid),
    .all_eq     (all_eq),
    .a_digit    (a_digit),
    .b_digit    (b_digit),
    .digit_idx  (digit_idx)
  );

  cla_encoder #(.DIGIT(DIGIT)) u_enc (
    .a_digit (a_digit),
    .b_digit (b_digit),
    .cout    (),
    .b_gr    (enc_b_gr)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done           <= 1'b0;
      eq             <= 1'b0;
      b_gr           <= 1'b0;
      digits_checked <= '0;
    end else begin
      done <= diff_valid | all_eq;
      if (diff_valid) begin
        eq             <= 1'b0;
        b_gr           <= enc_b_gr;
        digits_checked <= digit_idx;
      end else if (all_eq) begin
        eq             <= 1'b1;
        b_gr           <= 1'b0;
        digits_checked <= digit_idx;
      end
    end
  end

endmodule
