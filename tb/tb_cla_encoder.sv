// tb_cla_encoder - self-checking test of the CLA encoder block.
// Exhaustive over unequal digit pairs of 2 bits (default), 3 bits and 4 bits,
// random over 8 bits: b_gr must equal (B > A). For 4-bit digits the per-pair
// carries are also checked against a reference, including the worked case
// A=0110, B=1010 whose pair carries are 1 (upper) and 0 (lower), and
// A=1001, B=0110 where a lower pair favours B but the upper pair decides.
module tb_cla_encoder;
  logic [1:0] a2, b2;  logic [0:0] c2;  logic g2;
  logic [2:0] a3, b3;  logic [1:0] c3;  logic g3;
  logic [3:0] a4, b4;  logic [1:0] c4;  logic g4;
  logic [7:0] a8, b8;  logic [3:0] c8;  logic g8;
  int checks = 0, failures = 0;

  cla_encoder              dut2 (.a_digit(a2), .b_digit(b2), .cout(c2), .b_gr(g2));
  cla_encoder #(.DIGIT(3)) dut3 (.a_digit(a3), .b_digit(b3), .cout(c3), .b_gr(g3));
  cla_encoder #(.DIGIT(4)) dut4 (.a_digit(a4), .b_digit(b4), .cout(c4), .b_gr(g4));
  cla_encoder #(.DIGIT(8)) dut8 (.a_digit(a8), .b_digit(b8), .cout(c8), .b_gr(g8));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  // reference pair carries of a 4-bit digit: upper pair's B>A, lower pair's
  // B>A only when the upper pair is equal
  function automatic logic [1:0] ref_cout4(input logic [3:0] a, b);
    ref_cout4[1] = b[3:2] > a[3:2];
    ref_cout4[0] = (b[3:2] == a[3:2]) && (b[1:0] > a[1:0]);
  endfunction

  initial begin
    a2 = '0; b2 = '0; a3 = '0; b3 = '0; a4 = '0; b4 = '0; a8 = '0; b8 = '0;
    for (int i = 0; i < 256; i++) begin
      a4 = i[7:4]; b4 = i[3:0];
      a2 = i[3:2]; b2 = i[1:0];
      a3 = i[5:3]; b3 = i[2:0];
      #1;
      if (a4 != b4) begin
        chk(g4, b4 > a4, $sformatf("d4 a=%b b=%b", a4, b4));
        chk(c4 == ref_cout4(a4, b4), 1'b1, $sformatf("d4 cout a=%b b=%b c=%b", a4, b4, c4));
      end
      if (i < 16 && a2 != b2) chk(g2, b2 > a2, $sformatf("d2 a=%b b=%b", a2, b2));
      if (i < 64 && a3 != b3) chk(g3, b3 > a3, $sformatf("d3 a=%b b=%b", a3, b3));
    end
    for (int i = 0; i < 2000; i++) begin
      a8 = 8'($urandom); b8 = (i % 3 == 0) ? (a8 ^ 8'(1 << (i % 8))) : 8'($urandom);
      #1;
      if (a8 != b8) chk(g8, b8 > a8, $sformatf("d8 a=%b b=%b", a8, b8));
    end
    a4 = 4'b0110; b4 = 4'b1010; #1;
    chk(c4[1], 1'b1, "worked case upper carry");
    chk(c4[0], 1'b0, "worked case lower carry");
    chk(g4, 1'b1, "worked case B_GR");
    a4 = 4'b1001; b4 = 4'b0110; #1;
    chk(g4, 1'b0, "upper pair decides");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
