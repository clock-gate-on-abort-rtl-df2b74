// directory: one directory of the distributed shared memory with the
// clock-gate-on-abort extension.
//
// dir_lines keeps the baseline line state and turns each commit into
// invalidations. Every invalidated processor that this directory has not
// already gated is logged in the gating table (aborter, abort count +1,
// renew count 0, timer W_t, OFF = 1) and gets a one-cycle "Stop Clock"
// strobe in the same cycle. ungate_ctrl then fetches the aborter's
// transaction id with TxInfoReq, and at timer expiry runs the wide OR
// (marked_or_scan) and the transaction comparison to choose between "on" and
// a renewal. A request arriving from a processor marked OFF clears its OFF
// bit, since another directory must have woken it. The directory also sends
// it "on" then (own choice): a running core ignores it, but a request that
// was already in flight when the core was stopped must not leave the core
// gated with no directory left to wake it.
//
// W_0 is a register preset by firmware through cfg_w0_we/cfg_w0; it resets to
// W0_RESET = 8, the value used in the design's evaluation.
// Timing: request at cycle t, answer and invalidation at t+1, Stop Clock at
// t+1, TxInfoReq at t+2 at the earliest.
module directory
  import htm_pkg::*;
#(
  parameter int unsigned NPROC    = 16,
  parameter int unsigned PID_W    = (NPROC > 1) ? $clog2(NPROC) : 1,
  parameter int unsigned NLINES   = 1024,
  parameter int unsigned LPC      = 32,
  parameter int unsigned W0_W     = 8,
  parameter int unsigned TIMER_W  = W0_W + RENEW_W + 2,
  parameter logic [W0_W-1:0] W0_RESET = 8
) (
  input  logic              clk,
  input  logic              rst_n,

  input  logic              cfg_w0_we,
  input  logic [W0_W-1:0]   cfg_w0,

  // processor requests (from the interconnect)
  input  logic              req_valid,
  input  dir_op_e           req_op,
  input  logic [PID_W-1:0]  req_pid,
  input  laddr_t            req_laddr,
  input  tid_t              req_tid,
  output logic              rsp_valid,
  output dir_rsp_e          rsp_code,
  output logic [PID_W-1:0]  rsp_pid,

  // invalidations (aborts)
  output logic              inval_valid,
  output logic [NPROC-1:0]  inval_vec,
  output logic [PID_W-1:0]  inval_by,
  output laddr_t            inval_laddr,

  // clock control of the processors
  output logic [NPROC-1:0]  stop_clk,
  output logic [NPROC-1:0]  proc_on,

  // TxInfoReq
  output logic              txreq_valid,
  output logic [PID_W-1:0]  txreq_pid,
  input  logic              txrsp_valid,
  input  logic              txrsp_null,
  input  txid_t             txrsp_id,

  // status
  output logic [NPROC-1:0]  gated_vec,
  output logic [NPROC-1:0]  renew_evt,
  output logic              scan_busy,
  output logic              serving,
  output logic [PID_W-1:0]  serving_pid,
  output tid_t              serving_tid,
  output abort_cnt_t        ent_abort_cnt [NPROC],
  output renew_cnt_t        ent_renew_cnt [NPROC],
  output logic [TIMER_W-1:0] ent_timer    [NPROC]
);

  logic [W0_W-1:0] w0;

  always_ff @(posedge clk) begin
    if (!rst_n)         w0 <= W0_RESET;
    else if (cfg_w0_we) w0 <= cfg_w0;
  end

  logic [NPROC-1:0]  access_vec, commit_vec;
  logic [NLINES-1:0] marked_valid;
  logic [PID_W-1:0]  marked_pid [NLINES];

  dir_lines #(.NPROC(NPROC), .PID_W(PID_W), .NLINES(NLINES)) u_lines (
    .clk, .rst_n,
    .req_valid, .req_op, .req_pid, .req_laddr, .req_tid,
    .rsp_valid, .rsp_code, .rsp_pid,
    .inval_valid, .inval_vec, .inval_by, .inval_laddr,
    .access_vec, .commit_vec,
    .serving, .serving_pid, .serving_tid,
    .marked_valid, .marked_pid
  );

  logic [PID_W-1:0]   ent_aborter   [NPROC];
  txid_t              ent_txid      [NPROC];
  logic [NPROC-1:0]   ent_tx_valid, ent_tx_pending, ent_off, expired_vec;
  logic [NPROC-1:0]   abort_vec, txinfo_wr, renew_vec;
  logic               txinfo_null;
  txid_t              txinfo_id;

  assign abort_vec = inval_valid ? inval_vec : '0;
  assign stop_clk  = abort_vec & ~ent_off;

  // "on": from the ungate controller, or for a request from an OFF processor
  logic [NPROC-1:0] ctrl_on;
  assign proc_on = ctrl_on | (access_vec & ent_off);

  gating_table #(.NPROC(NPROC), .PID_W(PID_W), .W0_W(W0_W), .TIMER_W(TIMER_W)) u_table (
    .clk, .rst_n, .w0,
    .abort_vec, .abort_by(inval_by),
    .txinfo_wr, .txinfo_null, .txinfo_id,
    .renew_vec, .on_vec(proc_on), .access_vec, .commit_vec,
    .ent_aborter, .ent_txid, .ent_tx_valid, .ent_tx_pending,
    .ent_abort_cnt, .ent_renew_cnt, .ent_timer, .ent_off, .expired_vec
  );

  logic             scan_start, scan_done;
  logic [NPROC-1:0] scan_present;

  marked_or_scan #(.NPROC(NPROC), .PID_W(PID_W), .NLINES(NLINES), .LPC(LPC)) u_scan (
    .clk, .rst_n, .start(scan_start), .marked_valid, .marked_pid,
    .busy(scan_busy), .done(scan_done), .present(scan_present)
  );

  ungate_ctrl #(.NPROC(NPROC), .PID_W(PID_W)) u_ctrl (
    .clk, .rst_n,
    .ent_aborter, .ent_txid, .ent_tx_valid, .ent_tx_pending, .ent_off, .expired_vec,
    .txinfo_wr, .txinfo_null, .txinfo_id, .renew_vec, .proc_on(ctrl_on),
    .scan_start, .scan_done, .scan_present,
    .txreq_valid, .txreq_pid, .txrsp_valid, .txrsp_null, .txrsp_id
  );

  assign gated_vec = ent_off;
  assign renew_evt = renew_vec;

endmodule
