// tb_aefbc_workloads - the comparator in the sizes it is evaluated at:
// 4-bit operands in 2-bit digits, 8-bit operands in 4-bit digits and 8-bit
// operands in 2-bit digits (the 16-bit size is covered by tb_aefbc).
//
// First the worked examples are replayed: A=10110110, B=10111010 must stop
// at the third 2-bit digit and at the second 4-bit digit, and A=0001, B=0100
// at the first 2-bit digit, all with B greater. Then every one of the 65536
// pairs of 8-bit operands is compared by the three instances at once (the
// 4-bit instance takes the low nibbles) and each result, digit count and
// latency k*(DIGIT+1) is checked against integer comparison.
module tb_aefbc_workloads;
  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0] a8, b8;
  logic busy4, done4, eq4, bgr4;  logic [2:0] dc4;
  logic busy84, done84, eq84, bgr84;  logic [1:0] dc84;
  logic busy82, done82, eq82, bgr82;  logic [2:0] dc82;
  int checks = 0, failures = 0;

  aefbc #(.WIDTH(4), .DIGIT(2)) u4 (.clk, .rst_n, .start, .a(a8[3:0]), .b(b8[3:0]),
    .busy(busy4), .done(done4), .eq(eq4), .b_gr(bgr4), .digits_checked(dc4));
  aefbc #(.WIDTH(8), .DIGIT(4)) u84 (.clk, .rst_n, .start, .a(a8), .b(b8),
    .busy(busy84), .done(done84), .eq(eq84), .b_gr(bgr84), .digits_checked(dc84));
  aefbc #(.WIDTH(8), .DIGIT(2)) u82 (.clk, .rst_n, .start, .a(a8), .b(b8),
    .busy(busy82), .done(done82), .eq(eq82), .b_gr(bgr82), .digits_checked(dc82));

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic int first_diff(input logic [7:0] x, y, input int w, d);
    for (int k = 1; k <= w / d; k++)
      if (((x >> (w - k*d)) & ((1 << d) - 1)) != ((y >> (w - k*d)) & ((1 << d) - 1)))
        return k;
    return w / d;
  endfunction

  // compare once in all three instances; returns the observed latencies
  task automatic run(input logic [7:0] ea, eb, output int l4, l84, l82);
    @(negedge clk); a8 = ea; b8 = eb; start = 1;
    @(posedge clk); #1 start = 0;
    l4 = 0; l84 = 0; l82 = 0;
    for (int c = 1; c <= 30 && (l4 == 0 || l84 == 0 || l82 == 0); c++) begin
      @(posedge clk); #1;
      if (done4)  l4  = c;
      if (done84) l84 = c;
      if (done82) l82 = c;
    end
  endtask

  task automatic check_all(input logic [7:0] ea, eb, input int l4, l84, l82);
    logic [3:0] na, nb;
    na = ea[3:0]; nb = eb[3:0];
    chk(eq4 == (na == nb) && bgr4 == (nb > na), $sformatf("4/2 %h %h", na, nb));
    chk(eq84 == (ea == eb) && bgr84 == (eb > ea), $sformatf("8/4 %h %h", ea, eb));
    chk(eq82 == (ea == eb) && bgr82 == (eb > ea), $sformatf("8/2 %h %h", ea, eb));
    chk(dc4 == 3'(first_diff({4'b0, na}, {4'b0, nb}, 4, 2)) && l4 == 3 * int'(dc4), "4/2 count/latency");
    chk(dc84 == 2'(first_diff(ea, eb, 8, 4)) && l84 == 5 * int'(dc84), "8/4 count/latency");
    chk(dc82 == 3'(first_diff(ea, eb, 8, 2)) && l82 == 3 * int'(dc82), "8/2 count/latency");
  endtask

  initial begin
    int l4, l84, l82;
    a8 = '0; b8 = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // worked example: A = 10110110, B = 10111010
    run(8'b10110110, 8'b10111010, l4, l84, l82);
    chk(dc82 == 3 && bgr82 && !eq82, "worked example, 2-bit digits: third digit, B greater");
    chk(dc84 == 2 && bgr84 && !eq84, "worked example, 4-bit digits: second digit, B greater");
    // 4-bit example: A = 0001, B = 0100
    run(8'b0000_0001, 8'b0000_0100, l4, l84, l82);
    chk(dc4 == 1 && bgr4 && !eq4, "4-bit example: first digit, B greater");
    // all 8-bit operand pairs
    for (int i = 0; i < 65536; i++) begin
      run(8'(i >> 8), 8'(i), l4, l84, l82);
      check_all(8'(i >> 8), 8'(i), l4, l84, l82);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
