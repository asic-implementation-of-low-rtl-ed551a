// digit_counter - bit counter that paces the filling of the digit buffer.
//
// `load` initialises the count from the digit size, to DIGIT-1; every `tick`
// (one bit moved from the input buffer into the digit buffer) counts down by
// one. `zero` is high while the count reads 0: the tick taken then moves the
// last bit of the digit, so DIGIT ticks fill one digit. Initialising from the
// digit size and completing at 0 follow the design description; the exact
// start value, the zero reset and the hold at 0 are this design's choices.
module digit_counter
  import aefbc_pkg::*;
#(
  parameter int unsigned DIGIT = 2,
  localparam int unsigned CW   = cnt_width(DIGIT)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic          tick,
  output logic [CW-1:0] count,
  output logic          zero
);

  localparam logic [CW-1:0] START = CW'(DIGIT - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   count <= '0;
    else if (load)                count <= START;
    else if (tick && count != '0) count <= count - 1'b1;
  end

  assign zero = (count == '0);

endmodule
