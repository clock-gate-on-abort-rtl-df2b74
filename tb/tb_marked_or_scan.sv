// tb_marked_or_scan: random test of the multi-cycle wide OR.
// 20 lines folded 8 per cycle must take exactly 3 cycles from start to done;
// the presence vector must equal the set of processor ids found in the
// Marked fields, computed here by a plain loop. Includes the empty case and
// the case where only the last, partial group of lines is marked.
module tb_marked_or_scan;
  localparam int NP = 8, PW = 3, NL = 20, LPC = 8, NSTEP = 3;
  logic clk = 0, rst_n = 0, start = 0;
  logic [NL-1:0] marked_valid;
  logic [PW-1:0] marked_pid [NL];
  logic busy, done;
  logic [NP-1:0] present;
  int checks = 0, failures = 0;

  marked_or_scan #(.NPROC(NP), .NLINES(NL), .LPC(LPC)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  task automatic run_one(string what);
    logic [NP-1:0] expv;
    int n;
    expv = '0;
    for (int i = 0; i < NL; i++) if (marked_valid[i]) expv[marked_pid[i]] = 1'b1;
    start = 1; @(posedge clk); #1; start = 0;
    n = 0;
    while (!done && n < 50) begin @(posedge clk); #1; n++; end
    chk(n == NSTEP, $sformatf("%s: latency %0d", what, n));
    chk(present == expv, $sformatf("%s: present %b exp %b", what, present, expv));
    @(posedge clk); #1;
    chk(!busy && !done, "idle after done");
  endtask

  initial begin
    marked_valid = '0;
    for (int i = 0; i < NL; i++) marked_pid[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    run_one("empty");
    marked_valid[19] = 1; marked_pid[19] = 3'd6;
    run_one("last line only");
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < NL; i++) begin
        marked_valid[i] = ($urandom % 4) == 0;
        marked_pid[i]   = PW'($urandom);
      end
      run_one("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
