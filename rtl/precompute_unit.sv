// precompute_unit - the pre-computation unit of the folded comparator.
//
// One input buffer, one bit counter, one digit buffer and one XOR/OR equality
// test are shared, in time, by all WIDTH/DIGIT digits of the operands
// ("folding"). A start loads the operands into the input buffer; the
// sequencer then moves DIGIT bits, one per clock, into the digit buffer
// (paced by the counter, which was initialised from the digit size) and, in
// the following clock, tests the filled digit. An unequal digit (S = 1)
// stops the walk at once and is presented to the encoder with a one-cycle
// `diff_valid` pulse; equal digits make the walk go on to the next digit
// towards the LSB; if the last digit is also equal an `all_eq` pulse reports
// equal operands. Digits below the first unequal one are never moved or
// tested, which is where the design saves switching.
//
// Timing: with the start sampled at clock edge 0, the decision on digit k
// (k = 1 for the most significant digit) is presented during the cycle after
// edge k*(DIGIT+1)-1, i.e. the pulse is sampled at edge k*(DIGIT+1). The
// start/pulse handshake, this exact cycle budget and the zero reset are this
// design's choices; the MSD-first walk, the counter pacing, the XOR/OR test
// and the early stop follow the design description. A start while busy is
// ignored. WIDTH must be a multiple of DIGIT.
module precompute_unit
  import aefbc_pkg::*;
#(
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
  output logic             diff_valid,
  output logic             all_eq,
  output logic [DIGIT-1:0] a_digit,
  output logic [DIGIT-1:0] b_digit,
  output logic [IW-1:0]    digit_idx
);

  initial begin
    assert (DIGIT >= 1 && WIDTH % DIGIT == 0)
      else $error("precompute_unit: WIDTH (%0d) must be a multiple of DIGIT (%0d)", WIDTH, DIGIT);
  end

  pcu_state_t state, state_nx;
  logic       ib_load, shift, cnt_load, cnt_zero, s;
  logic       a_msb, b_msb;

  input_buffer #(.WIDTH(WIDTH)) u_ib (
    .clk, .rst_n,
    .load  (ib_load),
    .shift (shift),
    .a_in  (a),
    .b_in  (b),
    .a_msb (a_msb),
    .b_msb (b_msb)
  );

  digit_counter #(.DIGIT(DIGIT)) u_cnt (
    .clk, .rst_n,
    .load  (cnt_load),
    .tick  (shift),
    .count (),
    .zero  (cnt_zero)
  );

  digit_buffer #(.DIGIT(DIGIT)) u_db (
    .clk, .rst_n,
    .shift   (shift),
    .a_bit   (a_msb),
    .b_bit   (b_msb),
    .a_digit (a_digit),
    .b_digit (b_digit)
  );

  digit_equality #(.DIGIT(DIGIT)) u_eq (
    .a_digit (a_digit),
    .b_digit (b_digit),
    .s       (s)
  );

  logic last_digit;
  assign last_digit = (digit_idx == IW'(NDIG));

  always_comb begin
    state_nx   = state;
    ib_load    = 1'b0;
    cnt_load   = 1'b0;
    shift      = 1'b0;
    diff_valid = 1'b0;
    all_eq     = 1'b0;
    unique case (state)
      ST_IDLE: if (start) begin
        ib_load  = 1'b1;
        cnt_load = 1'b1;
        state_nx = ST_SHIFT;
      end
      ST_SHIFT: begin
        shift = 1'b1;
        if (cnt_zero) state_nx = ST_CHECK;
      end
      ST_CHECK: begin
        if (s) begin
          diff_valid = 1'b1;          // first unequal digit: stop here
          state_nx   = ST_IDLE;
        end else if (last_digit) begin
          all_eq     = 1'b1;          // every digit equal
          state_nx   = ST_IDLE;
        end else begin
          cnt_load   = 1'b1;          // next digit towards the LSB
          state_nx   = ST_SHIFT;
        end
      end
      default: state_nx = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_IDLE;
      digit_idx <= '0;
    end else begin
      state <= state_nx;
      if (ib_load)
        digit_idx <= IW'(1);
      else if (state == ST_CHECK && !s && !last_digit)
        digit_idx <= digit_idx + 1'b1;
    end
  end

  assign busy = (state != ST_IDLE);

  // The two result pulses exclude each other and only occur in CHECK.
  assert property (@(posedge clk) disable iff (!rst_n) !(diff_valid && all_eq));
  assert property (@(posedge clk) disable iff (!rst_n)
                   (diff_valid || all_eq) |-> (state == ST_CHECK));

endmodule
