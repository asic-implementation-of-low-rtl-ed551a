// tb_digit_counter - self-checking test of the digit counter.
// For the default digit size and for 5-bit digits: after a load the count
// must read DIGIT-1, step down by one per tick, stop at 0 and raise `zero`
// exactly there, so that DIGIT ticks cover one digit.
module tb_digit_counter;
  logic clk = 0, rst_n = 0;
  logic load2 = 0, tick2 = 0, load5 = 0, tick5 = 0;
  logic [0:0] count2;
  logic [2:0] count5;
  logic zero2, zero5;
  int checks = 0, failures = 0;

  digit_counter               dut2 (.clk, .rst_n, .load(load2), .tick(tick2), .count(count2), .zero(zero2));
  digit_counter #(.DIGIT(5))  dut5 (.clk, .rst_n, .load(load5), .tick(tick5), .count(count5), .zero(zero5));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input int got, exp, input logic gz, ez, input string what);
    checks++;
    if (got != exp || gz !== ez) begin
      failures++;
      $display("FAIL %s: count %0d zero %b, expected %0d %b", what, got, gz, exp, ez);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 10; r++) begin
      @(negedge clk); load2 = 1; load5 = 1;
      @(negedge clk); load2 = 0; load5 = 0;
      chk(count2, 1, zero2, 1'b0, "d2 load");
      chk(count5, 4, zero5, 1'b0, "d5 load");
      // ticks with gaps
      for (int k = 1; k <= 6; k++) begin
        tick2 = 1; tick5 = 1;
        @(negedge clk); tick2 = 0; tick5 = 0;
        chk(count2, 0, zero2, 1'b1, $sformatf("d2 tick %0d", k));
        chk(count5, (k >= 4) ? 0 : 4 - k, zero5, k >= 4, $sformatf("d5 tick %0d", k));
        if (r % 2 == 1) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
