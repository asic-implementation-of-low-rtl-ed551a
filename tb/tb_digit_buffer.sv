// tb_digit_buffer - self-checking test of the digit buffer.
// Feeds random bit streams into a 2-bit (default) and a 4-bit buffer and
// checks the registers against a reference shift register in which the
// earliest of the last DIGIT bits is the MSB; cycles without shift must hold.
module tb_digit_buffer;
  logic clk = 0, rst_n = 0, shift = 0, a_bit = 0, b_bit = 0;
  logic [1:0] a2, b2;
  logic [3:0] a4, b4;
  logic [3:0] ref_a = '0, ref_b = '0;
  int checks = 0, failures = 0;

  digit_buffer              dut2 (.clk, .rst_n, .shift, .a_bit, .b_bit, .a_digit(a2), .b_digit(b2));
  digit_buffer #(.DIGIT(4)) dut4 (.clk, .rst_n, .shift, .a_bit, .b_bit, .a_digit(a4), .b_digit(b4));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      shift = ($urandom % 4) != 0;
      a_bit = $urandom; b_bit = $urandom;
      if (shift) begin
        ref_a = {ref_a[2:0], a_bit};
        ref_b = {ref_b[2:0], b_bit};
      end
      @(posedge clk); #1;
      checks++;
      if (a2 !== ref_a[1:0] || b2 !== ref_b[1:0] || a4 !== ref_a || b4 !== ref_b) begin
        failures++;
        $display("FAIL t=%0d: a2=%b b2=%b a4=%b b4=%b ref %b %b", t, a2, b2, a4, b4, ref_a, ref_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
