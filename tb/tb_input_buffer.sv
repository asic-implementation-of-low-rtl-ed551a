// tb_input_buffer - self-checking test of the input buffer.
// Loads random operand pairs, shifts them out one bit per clock and checks
// that a_msb/b_msb present the operands' bits MSB first; also checks that
// load wins over shift and that nothing moves without a shift.
module tb_input_buffer;
  localparam int unsigned W = 16;
  logic clk = 0, rst_n = 0, load = 0, shift = 0;
  logic [W-1:0] a_in, b_in;
  logic a_msb, b_msb;
  int checks = 0, failures = 0;

  input_buffer #(.WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic got_a, got_b, exp_a, exp_b, input string what);
    checks++;
    if (got_a !== exp_a || got_b !== exp_b) begin
      failures++;
      $display("FAIL %s: got %b%b exp %b%b", what, got_a, got_b, exp_a, exp_b);
    end
  endtask

  initial begin
    a_in = '0; b_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 50; t++) begin
      logic [W-1:0] ea, eb;
      ea = W'($urandom); eb = W'($urandom);
      @(negedge clk); a_in = ea; b_in = eb; load = 1; shift = (t % 2 == 0);
      @(negedge clk); load = 0; shift = 0;
      chk(a_msb, b_msb, ea[W-1], eb[W-1], "after load");
      // an idle cycle must not move the data
      @(negedge clk);
      chk(a_msb, b_msb, ea[W-1], eb[W-1], "hold");
      for (int k = 1; k < W; k++) begin
        shift = 1;
        @(negedge clk);
        chk(a_msb, b_msb, ea[W-1-k], eb[W-1-k], $sformatf("shift %0d", k));
      end
      shift = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
