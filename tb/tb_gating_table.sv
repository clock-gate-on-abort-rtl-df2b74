// tb_gating_table: directed test of the per-processor gating table.
// Walks one entry through the life the protocol gives it: abort (aborter,
// counts 1/0, timer W_0, OFF), countdown to expiry in exactly W_t cycles,
// storing the aborter's tx id, a renewal (renew 1, timer 2 W_0), "on", a
// second abort (count 2, renew reset, timer 2 W_0), abort ignored while OFF,
// commit clearing the abort count, a load/store clearing OFF, null TxInfo
// replies, and saturation of the abort counter at 255. Expected values are
// computed from the formula in the test, not taken from the table.
module tb_gating_table;
  import htm_pkg::*;
  localparam int NP = 4, PW = 2, TW = 18;
  logic clk = 0, rst_n = 0;
  logic [7:0] w0 = 8;
  logic [NP-1:0] abort_vec = 0, txinfo_wr = 0, renew_vec = 0, on_vec = 0, access_vec = 0, commit_vec = 0;
  logic [PW-1:0] abort_by = 0;
  logic txinfo_null = 0;
  txid_t txinfo_id = 0;
  logic [PW-1:0] ent_aborter [NP];
  txid_t ent_txid [NP];
  logic [NP-1:0] ent_tx_valid, ent_tx_pending, ent_off, expired_vec;
  abort_cnt_t ent_abort_cnt [NP];
  renew_cnt_t ent_renew_cnt [NP];
  logic [TW-1:0] ent_timer [NP];
  int checks = 0, failures = 0;

  gating_table #(.NPROC(NP), .W0_W(8), .TIMER_W(TW)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  function automatic int p2(int n);
    int k = 0;
    if (n == 0) return 0;
    while ((1 << k) < n) k++;
    return 1 << k;
  endfunction

  task automatic strobe(ref logic [NP-1:0] v, input int p);
    v = '0; v[p] = 1'b1;
    @(posedge clk); #1;
    v = '0;
  endtask

  initial begin
    int n;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    chk(ent_off == 0 && ent_abort_cnt[1] == 0, "reset state");

    // P0 commits and aborts P1
    abort_by = 0; strobe(abort_vec, 1);
    chk(ent_off == 4'b0010, "P1 off");
    chk(ent_aborter[1] == 0, "aborter P0");
    chk(ent_abort_cnt[1] == 1 && ent_renew_cnt[1] == 0, "counts 1/0");
    chk(ent_timer[1] == 8, "timer = W0");
    chk(ent_tx_pending[1] && !ent_tx_valid[1], "tx pending");
    // countdown: expiry exactly W_t cycles after the abort
    n = 0;
    while (!expired_vec[1] && n < 100) begin @(posedge clk); #1; n++; end
    chk(n == 8, $sformatf("expiry after %0d cycles", n));
    chk(ent_timer[1] == 0, "timer at 0");
    // TxInfo reply
    txinfo_id = 64'h0000_1234_5678_9abc; strobe(txinfo_wr, 1);
    chk(ent_txid[1] == 64'h0000_1234_5678_9abc && ent_tx_valid[1] && !ent_tx_pending[1], "tx stored");
    // renewal
    strobe(renew_vec, 1);
    chk(ent_renew_cnt[1] == 1 && ent_timer[1] == TW'(8 * (p2(1) + p2(1))), "renew: count 1, timer 2 W0");
    chk(ent_off[1], "still off after renew");
    // second abort while off: ignored
    abort_by = 2; strobe(abort_vec, 1);
    chk(ent_abort_cnt[1] == 1 && ent_aborter[1] == 0, "abort while off ignored");
    // on
    strobe(on_vec, 1);
    chk(!ent_off[1] && !expired_vec[1], "on clears off");
    // new abort by P3 with W0 = 5
    w0 = 5; abort_by = 3; strobe(abort_vec, 1);
    chk(ent_abort_cnt[1] == 2 && ent_renew_cnt[1] == 0 && ent_aborter[1] == 3, "second abort");
    chk(ent_timer[1] == TW'(5 * p2(2)), "timer 2 W0");
    // null reply
    txinfo_null = 1; strobe(txinfo_wr, 1); txinfo_null = 0;
    chk(!ent_tx_valid[1] && !ent_tx_pending[1], "null reply");
    // access from P1 clears OFF (woken by another directory)
    strobe(access_vec, 1);
    chk(!ent_off[1], "access clears off");
    chk(ent_abort_cnt[1] == 2, "count kept");
    // commit resets the abort count
    strobe(commit_vec, 1);
    chk(ent_abort_cnt[1] == 0, "commit resets count");
    // two victims in one invalidation
    abort_by = 0; abort_vec = 4'b1100; @(posedge clk); #1; abort_vec = 0;
    chk(ent_off == 4'b1100 && ent_aborter[2] == 0 && ent_aborter[3] == 0, "two victims");
    // saturation
    for (int i = 0; i < 300; i++) begin
      strobe(on_vec, 2);
      strobe(abort_vec, 2);
    end
    chk(ent_abort_cnt[2] == 255, "saturates at 255");
    chk(ent_timer[2] == TW'(5 * 256), "timer at saturation");
    // renew counter saturation
    for (int i = 0; i < 300; i++) strobe(renew_vec, 2);
    chk(ent_renew_cnt[2] == 255 && ent_timer[2] == TW'(5 * 512), "renew saturates");
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
