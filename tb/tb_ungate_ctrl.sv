// tb_ungate_ctrl: directed test of the directory's gating controller, with
// the gating table, the wide OR and the processors played by the test.
// Cases: tx id fetch written to every pending entry of the same aborter;
// expiry with the aborter absent (on without TxInfoReq); aborter present and
// running the same transaction (renew); a different transaction (on); a null
// reply (on); a processor woken elsewhere during the check (dropped);
// fetches served before checks.
module tb_ungate_ctrl;
  import htm_pkg::*;
  localparam int NP = 4, PW = 2;
  logic clk = 0, rst_n = 0;
  logic [PW-1:0] ent_aborter [NP];
  txid_t ent_txid [NP];
  logic [NP-1:0] ent_tx_valid, ent_tx_pending, ent_off, expired_vec;
  logic [NP-1:0] txinfo_wr, renew_vec, proc_on;
  logic txinfo_null;
  txid_t txinfo_id;
  logic scan_start, scan_done;
  logic [NP-1:0] scan_present;
  logic txreq_valid;
  logic [PW-1:0] txreq_pid;
  logic txrsp_valid, txrsp_null;
  txid_t txrsp_id;
  int checks = 0, failures = 0;

  ungate_ctrl #(.NPROC(NP)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  task automatic tick; @(posedge clk); #1; endtask

  // Run the scan: start must be up now; done comes 2 cycles later.
  task automatic do_scan(logic [NP-1:0] pres);
    chk(scan_start, "scan started");
    tick; chk(!scan_start, "start is a strobe");
    tick;
    scan_done = 1; scan_present = pres; #1;
  endtask

  task automatic reply(logic nul, txid_t id);
    txrsp_valid = 1; txrsp_null = nul; txrsp_id = id; #1;
  endtask

  task automatic idle_in;
    txrsp_valid = 0; scan_done = 0; #1;
  endtask

  initial begin
    for (int i = 0; i < NP; i++) begin ent_aborter[i] = '0; ent_txid[i] = '0; end
    ent_tx_valid = 0; ent_tx_pending = 0; ent_off = 0; expired_vec = 0;
    scan_done = 0; scan_present = 0; txrsp_valid = 0; txrsp_null = 0; txrsp_id = 0;
    repeat (2) @(posedge clk); rst_n = 1; #1;
    chk(!txreq_valid && !scan_start && proc_on == 0, "idle");

    // 1. fetch: P1, P2 aborted by P0, P3 by P2; P1 also expired (fetch first)
    ent_aborter[1] = 0; ent_aborter[2] = 0; ent_aborter[3] = 2;
    ent_tx_pending = 4'b1110; ent_off = 4'b1110; expired_vec = 4'b0010; #1;
    chk(txreq_valid && txreq_pid == 0 && !scan_start, "TxInfoReq to P0 before check");
    tick; chk(!txreq_valid, "req is a strobe");
    reply(0, 64'hAAAA); chk(txinfo_wr == 4'b0110 && txinfo_id == 64'hAAAA && !txinfo_null, "reply to P0's victims");
    tick; idle_in;
    ent_tx_pending = 4'b1000; ent_tx_valid = 4'b0110; ent_txid[1] = 64'hAAAA; ent_txid[2] = 64'hAAAA; #1;
    chk(txreq_valid && txreq_pid == 2, "TxInfoReq to P2");
    tick; reply(1, 0); chk(txinfo_wr == 4'b1000 && txinfo_null, "null reply stored");
    tick; idle_in; ent_tx_pending = 0; ent_tx_valid = 4'b0110; #1;

    // 2. P1 expired, aborter P0 not present -> on, no TxInfoReq
    do_scan(4'b1000);
    chk(proc_on == 4'b0010 && !txreq_valid, "on: aborter absent");
    tick; idle_in; expired_vec = 0; ent_off = 4'b1100; #1;
    chk(proc_on == 0 && !scan_start, "back to idle");

    // 3. P2 expired, aborter P0 present, same tx -> renew
    expired_vec = 4'b0100; #1;
    do_scan(4'b0001);
    chk(txreq_valid && txreq_pid == 0 && proc_on == 0, "TxInfoReq at expiry");
    tick; idle_in;
    chk(renew_vec == 0 && proc_on == 0, "waiting for reply");
    reply(0, 64'hAAAA);
    chk(renew_vec == 4'b0100 && proc_on == 0, "renew: same tx");
    tick; idle_in; expired_vec = 0; #1;

    // 4. expires again, aborter now runs another transaction -> on
    expired_vec = 4'b0100; #1;
    do_scan(4'b0011); tick; idle_in;
    reply(0, 64'hBBBB);
    chk(proc_on == 4'b0100 && renew_vec == 0, "on: other tx");
    tick; idle_in; expired_vec = 0; ent_off = 4'b1000; #1;

    // 5. P3 expired, aborter P2 present but its reply is null -> on
    //    (and the stored tx id is invalid anyway)
    ent_tx_valid[3] = 1; ent_txid[3] = 64'hCCCC; expired_vec = 4'b1000; #1;
    do_scan(4'b0100); tick; idle_in;
    reply(1, 64'hCCCC);
    chk(proc_on == 4'b1000 && renew_vec == 0, "on: null reply");
    tick; idle_in; expired_vec = 0; ent_off = 0; #1;

    // 6. woken by another directory during the scan -> nothing sent
    ent_off = 4'b0010; expired_vec = 4'b0010; #1;
    chk(scan_start, "scan 6");
    tick; tick; ent_off = 0; expired_vec = 0; scan_done = 1; scan_present = 4'b1111; #1;
    chk(proc_on == 0 && !txreq_valid && renew_vec == 0, "dropped check");
    tick; idle_in;
    chk(!scan_start && !txreq_valid, "idle at end");

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
