// tb_precompute_unit - self-checking test of the pre-computation unit.
// At the default size (16-bit operands, 2-bit digits) it compares random
// operand pairs whose first differing digit is chosen at random (or that are
// equal), and checks: exactly one result pulse per start, of the right kind
// (diff_valid or all_eq), at the expected cycle k*(DIGIT+1)-1 after the start
// edge, with the digit buffer holding digit k of both operands and digit_idx
// equal to k. A start raised while busy must be ignored.
module tb_precompute_unit;
  localparam int unsigned W = 16, D = 2, ND = W / D;
  localparam int unsigned IW = $clog2(ND) + 1;
  logic clk = 0, rst_n = 0, start = 0;
  logic [W-1:0] a, b;
  logic busy, diff_valid, all_eq;
  logic [D-1:0] a_digit, b_digit;
  logic [IW-1:0] digit_idx;
  int checks = 0, failures = 0;

  precompute_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // digit k (1 = most significant) of a word
  function automatic logic [D-1:0] dig(input logic [W-1:0] w, input int k);
    return w[W - k*D +: D];
  endfunction

  initial begin
    a = '0; b = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      int k, j, pulses;
      logic [W-1:0] ea, eb;
      k  = 1 + ($urandom % (ND + 1));     // ND+1 means "all equal"
      ea = W'($urandom);
      eb = ea;
      if (k <= ND) begin
        logic [D-1:0] d;
        do d = D'($urandom); while (d == dig(ea, k));
        eb[W - k*D +: D] = d;
        // digits below k are random
        for (int m = k + 1; m <= ND; m++) eb[W - m*D +: D] = D'($urandom);
      end
      @(negedge clk); a = ea; b = eb; start = 1;
      @(posedge clk); #1 start = 0;
      pulses = 0;
      for (j = 0; j < (ND + 1) * (D + 1) + 3; j++) begin
        @(negedge clk);
        if (j == 1) begin
          // a start while busy must not restart the walk
          start = 1; a = ~ea;
        end else start = 0;
        if (diff_valid || all_eq) begin
          pulses++;
          if (k <= ND) begin
            chk(diff_valid && !all_eq, $sformatf("t%0d kind (k=%0d)", t, k));
            chk(j == k*(D+1) - 1, $sformatf("t%0d timing j=%0d k=%0d", t, j, k));
            chk(a_digit == dig(ea, k) && b_digit == dig(eb, k),
                $sformatf("t%0d digit %b/%b", t, a_digit, b_digit));
            chk(digit_idx == IW'(k), $sformatf("t%0d digit_idx %0d k %0d", t, digit_idx, k));
          end else begin
            chk(all_eq && !diff_valid, $sformatf("t%0d kind (equal)", t));
            chk(j == ND*(D+1) - 1, $sformatf("t%0d timing j=%0d equal", t, j));
          end
        end
      end
      start = 0;
      chk(pulses == 1, $sformatf("t%0d pulses=%0d", t, pulses));
      chk(!busy, $sformatf("t%0d still busy", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
