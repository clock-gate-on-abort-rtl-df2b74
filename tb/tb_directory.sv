// tb_directory: one directory with its gating logic, following the
// protocol's example. The test plays the processors: it issues requests and
// answers every TxInfoReq one cycle later with the transaction each
// processor is running (or null).
//  1. P1 and P2 read line A, P0 commits A: both are stopped in the same cycle,
//     logged with aborter P0, abort count 1, renew 0, timer W_0, and P0's
//     transaction id is fetched.
//  2. P0 still has a marked line and runs the same transaction: at expiry
//     both victims are renewed (renew count 1, timer 2 W_0).
//  3. P0 commits (DONE): at the next expiry both are turned on without a
//     TxInfoReq. The gating period must be W_0 + 2 W_0 plus the check time.
//  4. P3 aborted by P0; P0 then runs another transaction: "on" after the
//     comparison fails.
//  5. P1 aborted by P2, then P1 sends a load (woken by another directory):
//     OFF is cleared and "on" is sent to it in the same cycle.
//  6. Firmware changes W_0 to 3: P3's second abort loads 3 * 2.
module tb_directory;
  import htm_pkg::*;
  localparam int NP = 4, PW = 2, NL = 8, LPC = 4, TW = 18;
  logic clk = 0, rst_n = 0;
  logic cfg_w0_we = 0;
  logic [7:0] cfg_w0 = 0;
  logic req_valid = 0;
  dir_op_e req_op = OP_LOAD;
  logic [PW-1:0] req_pid = 0;
  laddr_t req_laddr = 0;
  tid_t req_tid = 0;
  logic rsp_valid;
  dir_rsp_e rsp_code;
  logic [PW-1:0] rsp_pid;
  logic inval_valid;
  logic [NP-1:0] inval_vec;
  logic [PW-1:0] inval_by;
  laddr_t inval_laddr;
  logic [NP-1:0] stop_clk, proc_on, gated_vec, renew_evt;
  logic txreq_valid;
  logic [PW-1:0] txreq_pid;
  logic txrsp_valid = 0, txrsp_null = 1;
  txid_t txrsp_id = 0;
  logic scan_busy, serving;
  logic [PW-1:0] serving_pid;
  tid_t serving_tid;
  abort_cnt_t ent_abort_cnt [NP];
  renew_cnt_t ent_renew_cnt [NP];
  logic [TW-1:0] ent_timer [NP];
  int checks = 0, failures = 0;

  directory #(.NPROC(NP), .NLINES(NL), .LPC(LPC), .W0_W(8), .TIMER_W(TW)) dut (.*);

  always #5 clk = ~clk;

  // processors' answers to TxInfoReq
  txid_t cur_tx [NP];
  logic  cur_null [NP];
  int n_txreq = 0, n_renew = 0, n_on = 0, n_stop = 0, cyc = 0;
  int stop_cyc [NP], on_cyc [NP];
  always @(posedge clk) begin
    cyc <= cyc + 1;
    txrsp_valid <= txreq_valid;
    txrsp_null  <= cur_null[txreq_pid];
    txrsp_id    <= cur_tx[txreq_pid];
    if (txreq_valid) n_txreq <= n_txreq + 1;
    for (int p = 0; p < NP; p++) begin
      if (renew_evt[p]) n_renew <= n_renew + 1;
      if (proc_on[p]) begin n_on <= n_on + 1; on_cyc[p] <= cyc; end
      if (stop_clk[p]) begin n_stop <= n_stop + 1; stop_cyc[p] <= cyc; end
    end
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  task automatic tick; @(posedge clk); #1; endtask

  task automatic req(dir_op_e op, int pid, laddr_t a, dir_rsp_e exp = RSP_ACK);
    req_valid = 1; req_op = op; req_pid = PW'(pid); req_laddr = a; req_tid = 1;
    tick; req_valid = 0;
    chk(rsp_valid && rsp_code == exp, $sformatf("%s P%0d answer", op.name(), pid));
  endtask

  task automatic wait_on(int p, int maxc);
    int n = 0;
    while (gated_vec[p] && n < maxc) begin tick; n++; end
  endtask

  localparam laddr_t A = 10, M = 11, B = 12, M2 = 13, C = 14, D = 15;

  initial begin
    int t0, n_req0, n_on0;
    foreach (cur_tx[i]) begin cur_tx[i] = txid_t'(64'h1000 * (i + 1)); cur_null[i] = 0; end
    repeat (2) @(posedge clk); rst_n = 1; #1;
    // --- 1
    req(OP_LOAD, 1, A); req(OP_LOAD, 2, A); req(OP_LOAD, 0, A);
    req(OP_MARK, 0, M); req(OP_MARK, 0, A);
    req(OP_COMMIT, 0, A);
    chk(stop_clk == 4'b0110 && inval_vec == 4'b0110, "stop clock to P1, P2");
    tick;
    chk(gated_vec == 4'b0110, "P1, P2 marked off");
    chk(ent_abort_cnt[1] == 1 && ent_renew_cnt[1] == 0 && ent_abort_cnt[2] == 1, "counts 1/0");
    chk(ent_timer[1] == TW'(8) - 1 || ent_timer[1] == TW'(8), "timer W0 loaded");
    chk(txreq_valid && txreq_pid == 0, "TxInfoReq to P0");
    // --- 2
    n_req0 = n_txreq;
    t0 = cyc;
    repeat (60) begin
      tick;
      if (n_renew == 2) break;
    end
    chk(n_renew == 2 && n_on == 0, "both renewed");
    chk(ent_renew_cnt[1] == 1 && ent_renew_cnt[2] == 1, "renew count 1");
    chk(n_txreq - n_req0 >= 2, "TxInfoReq at each expiry");
    chk(gated_vec == 4'b0110, "still gated");
    // --- 3
    req(OP_DONE, 0, 0);
    n_req0 = n_txreq;
    wait_on(1, 100); wait_on(2, 100);
    tick; tick;
    chk(gated_vec == 0 && n_on == 2, "both on");
    chk(n_txreq == n_req0, "no TxInfoReq when aborter absent");
    chk(on_cyc[1] - stop_cyc[1] >= 24 && on_cyc[1] - stop_cyc[1] <= 24 + 24,
        $sformatf("P1 gated %0d cycles (W0 + 2 W0 + check)", on_cyc[1] - stop_cyc[1]));
    chk(ent_abort_cnt[0] == 0, "P0 count 0");
    // --- 4
    req(OP_LOAD, 3, B);
    req(OP_MARK, 0, B); req(OP_MARK, 0, M2);
    req(OP_COMMIT, 0, B);
    chk(stop_clk == 4'b1000, "P3 stopped");
    repeat (4) tick;
    cur_tx[0] = 64'hBEEF;   // P0 moves on to another transaction
    n_on0 = n_on;
    wait_on(3, 100);
    tick;
    chk(n_on == n_on0 + 1 && gated_vec == 0 && n_renew == 2, "on after tx mismatch");
    req(OP_DONE, 0, 0);
    // --- 5
    req(OP_LOAD, 1, C);
    req(OP_MARK, 2, C); req(OP_COMMIT, 2, C);
    chk(stop_clk == 4'b0010 && inval_by == 2, "P1 stopped by P2");
    tick;
    chk(gated_vec == 4'b0010 && ent_abort_cnt[1] == 2, "P1 off, abort count 2");
    n_on0 = n_on;
    req(OP_LOAD, 1, D);
    tick;
    chk(gated_vec == 0 && n_on == n_on0 + 1, "woken elsewhere: off cleared, on sent");
    req(OP_DONE, 2, 0);
    // --- 6
    cfg_w0_we = 1; cfg_w0 = 3; tick; cfg_w0_we = 0;
    req(OP_LOAD, 3, D); req(OP_MARK, 1, D); req(OP_COMMIT, 1, D);
    tick;
    chk(ent_abort_cnt[3] == 2 && ent_timer[3] == TW'(3 * 2), "timer = new W0 * 2^ceil(lg 2)");
    wait_on(3, 100);
    tick;
    chk(gated_vec == 0, "P3 on");
    $display("stops=%0d renewals=%0d ons=%0d txinforeq=%0d", n_stop, n_renew, n_on, n_txreq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
