// tb_digit_equality - self-checking test of the XOR/OR digit equality test.
// Exhaustive over all digit pairs of 2 bits (default) and 4 bits: S must be
// 1 exactly when the two digits differ.
module tb_digit_equality;
  logic [1:0] a2, b2;
  logic [3:0] a4, b4;
  logic s2, s4;
  int checks = 0, failures = 0;

  digit_equality              dut2 (.a_digit(a2), .b_digit(b2), .s(s2));
  digit_equality #(.DIGIT(4)) dut4 (.a_digit(a4), .b_digit(b4), .s(s4));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      a4 = i[7:4]; b4 = i[3:0];
      a2 = i[3:2]; b2 = i[1:0];
      #1;
      checks++;
      if (s4 !== (a4 != b4)) begin
        failures++;
        $display("FAIL 4-bit a=%b b=%b s=%b", a4, b4, s4);
      end
      if (i < 16) begin
        checks++;
        if (s2 !== (a2 != b2)) begin
          failures++;
          $display("FAIL 2-bit a=%b b=%b s=%b", a2, b2, s2);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
