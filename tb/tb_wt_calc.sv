// tb_wt_calc: exhaustive check of the gating-period formula.
// For every abort count and renew count 0..255 and several W_0 values the
// output is compared with W_0 * (2^ceil(lg Na) + 2^ceil(lg Nr)), where the
// reference finds ceil(lg n) as the smallest k with 2^k >= n (0 for n = 0
// contributes nothing). Also checks the values the example walk-through uses.
module tb_wt_calc;
  logic [7:0]  na, nr, w0;
  logic [17:0] wt;
  int checks = 0, failures = 0;

  wt_calc #(.CNT_W(8), .W0_W(8), .TIMER_W(18)) dut (.na, .nr, .w0, .wt);

  function automatic int ref_term(int n);
    int k = 0;
    if (n == 0) return 0;
    while ((1 << k) < n) k++;
    return 1 << k;
  endfunction

  task automatic check(int exp, string what);
    checks++;
    if (int'(wt) != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s na=%0d nr=%0d w0=%0d wt=%0d exp=%0d", what, na, nr, w0, wt, exp);
    end
  endtask

  initial begin
    static int w0s[4] = '{8, 1, 32, 255};
    foreach (w0s[j]) begin
      w0 = 8'(w0s[j]);
      for (int a = 0; a < 256; a++)
        for (int r = 0; r < 256; r += (j == 0 ? 1 : 7)) begin
          na = 8'(a); nr = 8'(r);
          #1 check(w0s[j] * (ref_term(a) + ref_term(r)), "sweep");
        end
    end
    // first abort: W_0; first renewal: 2 W_0; staircase steps
    w0 = 8; na = 1; nr = 0; #1 check(8, "first abort");
    na = 1; nr = 1;  #1 check(16, "first renew");
    na = 3; nr = 0;  #1 check(32, "na=3 -> 4");
    na = 5; nr = 2;  #1 check(8 * (8 + 2), "na=5 nr=2");
    na = 255; nr = 255; #1 check(8 * 512, "saturated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
