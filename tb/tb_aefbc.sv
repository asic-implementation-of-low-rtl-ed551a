// tb_aefbc - end-to-end test of the folded comparator at its default size
// (16-bit operands, 2-bit digits, eight digits).
//
// Each comparison drives a/b and a start pulse, waits for `done` and checks
// eq/b_gr against integer comparison, digits_checked against the position of
// the first differing digit, and the latency k*(DIGIT+1) cycles. Operand
// pairs are random with a chosen first differing digit, plus directed cases.
// Outputs must hold between results, and a start raised while busy must be
// ignored. The mechanisms of the design are counted and each must occur:
// early stop at a non-final digit, a difference found only in the last
// digit, equal operands (EQ), B greater, A greater, an ignored start while
// busy, and back-to-back comparisons.
module tb_aefbc;
  localparam int unsigned W = 16, D = 2, ND = W / D;
  localparam int unsigned IW = $clog2(ND) + 1;
  logic clk = 0, rst_n = 0, start = 0;
  logic [W-1:0] a, b;
  logic busy, done, eq, b_gr;
  logic [IW-1:0] digits_checked;
  int checks = 0, failures = 0;
  int n_early = 0, n_last = 0, n_equal = 0, n_bgr = 0, n_agr = 0;
  int n_busy_ignored = 0, n_back_to_back = 0;

  aefbc dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  // 1-based position of the first differing digit, ND+1 if equal
  function automatic int first_diff(input logic [W-1:0] x, y);
    for (int k = 1; k <= ND; k++)
      if (x[W - k*D +: D] != y[W - k*D +: D]) return k;
    return ND + 1;
  endfunction

  // run one comparison; poke_busy raises start again mid-walk
  task automatic compare(input logic [W-1:0] ea, eb, input bit poke_busy);
    int k, lat;
    bit got;
    k = first_diff(ea, eb);
    @(negedge clk); a = ea; b = eb; start = 1;
    @(posedge clk); #1 start = 0;
    got = 0;
    for (lat = 1; lat <= (ND + 1) * (D + 1); lat++) begin
      @(posedge clk); #1;
      if (poke_busy && lat == 2) begin
        chk(busy, "busy during walk");
        start = 1; a = ~ea; b = ea;
        @(posedge clk); #1 start = 0; a = ea; b = eb;
        lat++;
        n_busy_ignored++;
        if (done) begin got = 1; break; end
      end
      if (done) begin got = 1; break; end
    end
    chk(got, $sformatf("no done for %h %h", ea, eb));
    if (got) begin
      chk(lat == ((k > ND) ? ND : k) * (D + 1),
          $sformatf("latency %0d for k=%0d (%h %h)", lat, k, ea, eb));
      chk(eq == (ea == eb) && b_gr == (eb > ea),
          $sformatf("result eq=%b b_gr=%b for %h %h", eq, b_gr, ea, eb));
      chk(digits_checked == IW'((k > ND) ? ND : k),
          $sformatf("digits_checked %0d k %0d", digits_checked, k));
      if (k < ND) n_early++;
      else if (k == ND) n_last++;
      else n_equal++;
      if (eb > ea) n_bgr++;
      else if (ea > eb) n_agr++;
    end
    // outputs hold while idle
    @(posedge clk); #1;
    chk(!done && !busy && eq == (ea == eb) && b_gr == (eb > ea), "outputs hold after done");
  endtask

  initial begin
    a = '0; b = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    chk(!done && !busy && !eq && !b_gr, "reset values");
    // directed cases
    compare(16'h0000, 16'h0000, 0);
    compare(16'hFFFF, 16'hFFFF, 0);
    compare(16'h0000, 16'h0001, 0);   // differs in the last digit only
    compare(16'h0003, 16'h0002, 0);
    compare(16'h8000, 16'h7FFF, 0);   // MSD decides
    compare(16'h1234, 16'h1235, 1);
    // random cases with a chosen first differing digit
    for (int t = 0; t < 400; t++) begin
      logic [W-1:0] ea, eb;
      int k;
      k  = 1 + ($urandom % (ND + 1));
      ea = W'($urandom);
      eb = (k <= ND) ? (ea ^ W'(($urandom % ((1 << D) - 1) + 1) << (W - k*D))) : ea;
      if (k < ND) begin
        logic [W-1:0] low;
        low = (W'(1) << (W - k*D)) - 1'b1;
        eb  = (eb & ~low) | (W'($urandom) & low);
      end
      compare(ea, eb, (t % 37) == 5);
    end
    // back-to-back: next start in the cycle right after done
    for (int t = 0; t < 20; t++) begin
      logic [W-1:0] ea, eb;
      ea = W'($urandom); eb = W'($urandom);
      @(negedge clk); a = ea; b = eb; start = 1;
      @(posedge clk); #1 start = 0;
      while (!done) begin @(posedge clk); #1; end
      chk(eq == (ea == eb) && b_gr == (eb > ea), "back-to-back result");
      n_back_to_back++;
    end
    $display("mechanisms: early_stop=%0d last_digit=%0d equal=%0d b_greater=%0d a_greater=%0d busy_start_ignored=%0d back_to_back=%0d",
             n_early, n_last, n_equal, n_bgr, n_agr, n_busy_ignored, n_back_to_back);
    chk(n_early > 0, "early stop never happened");
    chk(n_last > 0, "last-digit difference never happened");
    chk(n_equal > 0, "equal operands never happened");
    chk(n_bgr > 0, "B greater never happened");
    chk(n_agr > 0, "A greater never happened");
    chk(n_busy_ignored > 0, "start while busy never happened");
    chk(n_back_to_back > 0, "back-to-back never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
