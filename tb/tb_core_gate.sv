// tb_core_gate: the processor-side gating unit.
// Stop Clock must stop fetch at once and gate the clock only after the
// in-flight instruction finished; "on" must ungate and pulse self_abort for
// one cycle, whether it arrives while draining or while gated; "on" while
// running does nothing. TxInfoReq from any directory is answered one cycle
// later with the start PC of the running transaction, or null while
// stopped, gated or outside a transaction.
module tb_core_gate;
  import htm_pkg::*;
  localparam int ND = 3;
  logic clk = 0, rst_n = 0;
  logic stop_req = 0, on_req = 0, inflight_done = 0, tx_begin = 0, tx_end = 0;
  txid_t tx_pc = 0;
  logic [ND-1:0] txreq = 0, txrsp_valid;
  logic txrsp_null;
  txid_t txrsp_id;
  logic fetch_stop, clk_en, self_abort, gated;
  int checks = 0, failures = 0;
  int aborts = 0;

  core_gate #(.NDIR(ND)) dut (.*);

  always #5 clk = ~clk;
  always @(negedge clk) if (self_abort) aborts++;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  task automatic tick; @(posedge clk); #1; endtask

  task automatic ask(int d, bit exp_null, txid_t exp_id, string what);
    txreq = '0; txreq[d] = 1'b1; tick; txreq = '0;
    chk(txrsp_valid == ND'(1 << d), {what, ": reply to asking directory"});
    chk(txrsp_null == exp_null && (exp_null || txrsp_id == exp_id), {what, ": reply value"});
    tick;
    chk(txrsp_valid == 0, {what, ": reply is a strobe"});
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1; #1;
    chk(!fetch_stop && clk_en && !gated && !self_abort, "running after reset");
    ask(0, 1, 0, "no transaction");
    tx_begin = 1; tx_pc = 64'h0000_0040_0000_1000; tick; tx_begin = 0;
    ask(1, 0, 64'h0000_0040_0000_1000, "in transaction");
    // stop: drain 3 cycles, then gate
    stop_req = 1; tick; stop_req = 0;
    chk(fetch_stop && clk_en, "draining: fetch stopped, clock on");
    ask(2, 1, 0, "stopped -> null");
    chk(clk_en, "still draining");
    inflight_done = 1; tick; inflight_done = 0;
    chk(gated && !clk_en && fetch_stop, "gated");
    repeat (5) tick;
    chk(gated && !clk_en, "stays gated");
    ask(0, 1, 0, "gated -> null");
    on_req = 1; tick; on_req = 0;
    chk(!gated && clk_en && !fetch_stop && self_abort, "on: running, self abort");
    tick;
    chk(!self_abort && aborts == 1, "self abort is a strobe");
    ask(1, 1, 0, "transaction aborted");
    // on during drain
    tx_begin = 1; tx_pc = 64'h2000; tick; tx_begin = 0;
    stop_req = 1; tick; stop_req = 0;
    on_req = 1; tick; on_req = 0;
    chk(!fetch_stop && clk_en && self_abort, "on while draining");
    tick;
    chk(aborts == 2, "two self aborts");
    // on while running: ignored
    on_req = 1; tick; on_req = 0; tick;
    chk(aborts == 2 && !fetch_stop, "on while running ignored");
    // stop and on together: keep running
    stop_req = 1; on_req = 1; tick; stop_req = 0; on_req = 0;
    chk(!fetch_stop, "stop+on together");
    // transaction end
    tx_begin = 1; tx_pc = 64'h3000; tick; tx_begin = 0;
    ask(2, 0, 64'h3000, "new transaction");
    tx_end = 1; tick; tx_end = 0;
    ask(2, 1, 0, "after commit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
