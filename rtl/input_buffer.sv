// input_buffer - the Input Buffer (IB) of the folded comparator.
//
// Holds the two operands A and B. `load` captures a_in/b_in; each `shift`
// moves both words left by one bit so that their current most significant
// bits, a_msb and b_msb, are handed to the digit buffer one per clock, MSB
// first. The storing and bit-serial hand-over follow the design description;
// building it as two left-shifting registers, the zero reset and load having
// priority over shift are this design's choices.
//
// Timing: a_msb/b_msb are register outputs; after a load they show bit
// WIDTH-1, after k shifts bit WIDTH-1-k.
module input_buffer #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic             shift,
  input  logic [WIDTH-1:0] a_in,
  input  logic [WIDTH-1:0] b_in,
  output logic             a_msb,
  output logic             b_msb
);

  logic [WIDTH-1:0] a_q, b_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0;
      b_q <= '0;
    end else if (load) begin
      a_q <= a_in;
      b_q <= b_in;
    end else if (shift) begin
      a_q <= a_q << 1;
      b_q <= b_q << 1;
    end
  end

  assign a_msb = a_q[WIDTH-1];
  assign b_msb = b_q[WIDTH-1];

endmodule
