// tb_token_vendor: the TID vendor must hand out 1, 2, 3, ... one per cycle,
// each to a processor that is requesting, every requester eventually served
// (round-robin), and a processor that drops its request after its grant
// never granted twice for one request.
module tb_token_vendor;
  import htm_pkg::*;
  localparam int NP = 5, PW = 3;
  logic clk = 0, rst_n = 0;
  logic [NP-1:0] tid_req = 0;
  logic grant_valid;
  logic [PW-1:0] grant_pid;
  tid_t grant_tid;
  int checks = 0, failures = 0;
  int expect_tid = 1;
  int served [NP];

  token_vendor #(.NPROC(NP)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  // Requesters behave like processors: drop the request on seeing the grant.
  always @(posedge clk) if (rst_n) begin
    if (grant_valid) begin
      chk(int'(grant_tid) == expect_tid, $sformatf("tid %0d exp %0d", grant_tid, expect_tid));
      chk(tid_req[grant_pid], "granted a requester");
      expect_tid++;
      served[grant_pid]++;
      tid_req[grant_pid] <= 1'b0;
    end
  end

  initial begin
    foreach (served[i]) served[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    // all request at once: 5 grants in 5 consecutive cycles
    @(negedge clk) tid_req = '1;
    repeat (8) @(negedge clk);
    foreach (served[i]) chk(served[i] == 1, $sformatf("P%0d served once", i));
    chk(expect_tid == 6, "five TIDs");
    // random traffic
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      for (int i = 0; i < NP; i++) if (!tid_req[i] && ($urandom % 3 == 0)) tid_req[i] = 1'b1;
    end
    repeat (10) @(negedge clk);
    chk(tid_req == 0, "all requests served");
    foreach (served[i]) chk(served[i] > 20, $sformatf("P%0d served %0d", i, served[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
