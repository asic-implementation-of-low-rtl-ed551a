// tb_cla_cell - self-checking test of the two-bit CLA comparison cell.
// Exhaustive: g must be 1 exactly when B1B0 > A1A0 and p exactly when the
// pairs are equal (reference: integer comparison).
module tb_cla_cell;
  logic [1:0] a, b;
  logic g, p;
  int checks = 0, failures = 0;

  cla_cell dut (.*);

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      a = i[3:2]; b = i[1:0];
      #1;
      checks++;
      if (g !== (int'(b) > int'(a)) || p !== (int'(b) == int'(a))) begin
        failures++;
        $display("FAIL a=%b b=%b g=%b p=%b", a, b, g, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
