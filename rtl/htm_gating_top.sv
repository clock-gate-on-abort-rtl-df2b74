// htm_gating_top: a Scalable-TCC style multiprocessor with clock gating on
// transaction abort.
//
// NDIR directories (each with its gating table and ungate controller), one
// processor-side gating unit and clock gate per processor, and the central
// TID vendor. A commit in a directory invalidates the other sharers of the
// line; each victim is clock-gated by that directory and woken later by
// "on", or kept gated by renewals while its aborter is still committing the
// same transaction there. A processor is woken by an "on" from any directory.
//
// Not inside this module, and therefore brought out as ports: the cores and
// their TCC L1 caches (requests into the directories, in-flight/transaction
// status out of the cores, invalidations and self-abort into them), the
// interconnect (one request port per directory), and the main PLL, whose
// always-running output is `clk`. Directories and gating units share `clk`
// (own simplification; the design gives the directories a local clock).
// TxInfoReq/reply, Stop Clock and on travel over dedicated point-to-point
// wires between every directory and every processor (own choice).
// NPROC = 16 is the largest system evaluated; NDIR = NPROC (one directory
// per node, as in the design's four-node example), 1024 line entries per
// directory (16 caches of 1024 lines spread over 16 directories) and a
// 32-lines-per-cycle wide OR (32 cycles per check) are own choices.
module htm_gating_top
  import htm_pkg::*;
#(
  parameter int unsigned NPROC    = 16,
  parameter int unsigned NDIR     = 16,
  parameter int unsigned PID_W    = (NPROC > 1) ? $clog2(NPROC) : 1,
  parameter int unsigned NLINES   = 1024,
  parameter int unsigned LPC      = 32,
  parameter int unsigned W0_W     = 8,
  parameter logic [W0_W-1:0] W0_RESET = 8
) (
  input  logic             clk,
  input  logic             rst_n,

  // firmware preset of W_0 (all directories)
  input  logic             cfg_w0_we,
  input  logic [W0_W-1:0]  cfg_w0,

  // interconnect: one request port per directory
  input  logic             dreq_valid [NDIR],
  input  dir_op_e          dreq_op    [NDIR],
  input  logic [PID_W-1:0] dreq_pid   [NDIR],
  input  laddr_t           dreq_laddr [NDIR],
  input  tid_t             dreq_tid   [NDIR],
  output logic             drsp_valid [NDIR],
  output dir_rsp_e         drsp_code  [NDIR],
  output logic [PID_W-1:0] drsp_pid   [NDIR],

  // TID vendor
  input  logic [NPROC-1:0] tid_req,
  output logic             tid_grant_valid,
  output logic [PID_W-1:0] tid_grant_pid,
  output tid_t             tid_grant_tid,

  // cores
  input  logic [NPROC-1:0] inflight_done,
  input  logic [NPROC-1:0] tx_begin,
  input  txid_t            tx_pc      [NPROC],
  input  logic [NPROC-1:0] tx_end,
  output logic [NPROC-1:0] core_clk,
  output logic [NPROC-1:0] fetch_stop,
  output logic [NPROC-1:0] self_abort,
  output logic [NPROC-1:0] proc_gated,
  output logic [NPROC-1:0] abort_inval,

  // status
  output logic [NPROC-1:0] dir_gated  [NDIR],
  output logic [NPROC-1:0] dir_renew  [NDIR],
  output logic [NPROC-1:0] dir_on     [NDIR],
  output logic [NPROC-1:0] dir_stop   [NDIR],
  output logic             dir_txreq_valid [NDIR],
  output logic [PID_W-1:0] dir_txreq_pid   [NDIR],
  output logic             dir_txrsp_valid [NDIR],
  output logic             dir_txrsp_null  [NDIR],
  output logic             dinval_valid [NDIR],
  output logic [PID_W-1:0] dinval_by    [NDIR],
  output laddr_t           dinval_laddr [NDIR],
  output logic             dir_serving  [NDIR],
  output logic [PID_W-1:0] dir_serving_pid [NDIR],
  output tid_t             dir_serving_tid [NDIR],
  output logic             dir_scan_busy [NDIR],
  output abort_cnt_t       dir_abort_cnt [NDIR][NPROC],
  output renew_cnt_t       dir_renew_cnt [NDIR][NPROC],
  output logic [W0_W+RENEW_W+1:0] dir_timer [NDIR][NPROC]
);

  localparam int unsigned TIMER_W = W0_W + RENEW_W + 2;

  // directory -> processor
  logic             txreq_valid [NDIR];
  logic [PID_W-1:0] txreq_pid   [NDIR];
  logic             inval_valid [NDIR];
  logic [NPROC-1:0] inval_vec   [NDIR];
  // processor -> directory
  logic [NDIR-1:0]  p_txreq     [NPROC];
  logic [NDIR-1:0]  p_txrsp_v   [NPROC];
  logic             p_txrsp_null[NPROC];
  txid_t            p_txrsp_id  [NPROC];
  logic             d_txrsp_v   [NDIR];
  logic             d_txrsp_null[NDIR];
  txid_t            d_txrsp_id  [NDIR];

  for (genvar d = 0; d < NDIR; d++) begin : g_dir
    directory #(
      .NPROC(NPROC), .PID_W(PID_W), .NLINES(NLINES), .LPC(LPC),
      .W0_W(W0_W), .TIMER_W(TIMER_W), .W0_RESET(W0_RESET)
    ) u_dir (
      .clk, .rst_n, .cfg_w0_we, .cfg_w0,
      .req_valid(dreq_valid[d]), .req_op(dreq_op[d]), .req_pid(dreq_pid[d]),
      .req_laddr(dreq_laddr[d]), .req_tid(dreq_tid[d]),
      .rsp_valid(drsp_valid[d]), .rsp_code(drsp_code[d]), .rsp_pid(drsp_pid[d]),
      .inval_valid(inval_valid[d]), .inval_vec(inval_vec[d]),
      .inval_by(dinval_by[d]), .inval_laddr(dinval_laddr[d]),
      .stop_clk(dir_stop[d]), .proc_on(dir_on[d]),
      .txreq_valid(txreq_valid[d]), .txreq_pid(txreq_pid[d]),
      .txrsp_valid(d_txrsp_v[d]), .txrsp_null(d_txrsp_null[d]), .txrsp_id(d_txrsp_id[d]),
      .gated_vec(dir_gated[d]), .renew_evt(dir_renew[d]), .scan_busy(dir_scan_busy[d]),
      .serving(dir_serving[d]), .serving_pid(dir_serving_pid[d]), .serving_tid(dir_serving_tid[d]),
      .ent_abort_cnt(dir_abort_cnt[d]), .ent_renew_cnt(dir_renew_cnt[d]), .ent_timer(dir_timer[d])
    );

    // Reply to this directory's TxInfoReq: only the asked processor answers.
    always_comb begin
      d_txrsp_v[d]    = 1'b0;
      d_txrsp_null[d] = 1'b1;
      d_txrsp_id[d]   = '0;
      for (int p = 0; p < NPROC; p++)
        if (p_txrsp_v[p][d]) begin
          d_txrsp_v[d]    = 1'b1;
          d_txrsp_null[d] = p_txrsp_null[p];
          d_txrsp_id[d]   = p_txrsp_id[p];
        end
    end
  end

  for (genvar p = 0; p < NPROC; p++) begin : g_proc
    logic stop_any, on_any, inval_any, clk_en;

    always_comb begin
      stop_any  = 1'b0;
      on_any    = 1'b0;
      inval_any = 1'b0;
      for (int d = 0; d < NDIR; d++) begin
        stop_any   |= dir_stop[d][p];
        on_any     |= dir_on[d][p];
        inval_any  |= inval_valid[d] && inval_vec[d][p];
        p_txreq[p][d] = txreq_valid[d] && (int'(txreq_pid[d]) == p);
      end
    end

    core_gate #(.NDIR(NDIR)) u_cg (
      .clk, .rst_n,
      .stop_req(stop_any), .on_req(on_any), .inflight_done(inflight_done[p]),
      .tx_begin(tx_begin[p]), .tx_pc(tx_pc[p]), .tx_end(tx_end[p]),
      .txreq(p_txreq[p]), .txrsp_valid(p_txrsp_v[p]),
      .txrsp_null(p_txrsp_null[p]), .txrsp_id(p_txrsp_id[p]),
      .fetch_stop(fetch_stop[p]), .clk_en, .self_abort(self_abort[p]),
      .gated(proc_gated[p])
    );

    clk_gate u_icg (.clk, .en(clk_en), .gclk(core_clk[p]));

    assign abort_inval[p] = inval_any;
  end

  for (genvar d = 0; d < NDIR; d++) begin : g_inv
    assign dinval_valid[d]    = inval_valid[d];
    assign dir_txreq_valid[d] = txreq_valid[d];
    assign dir_txreq_pid[d]   = txreq_pid[d];
    assign dir_txrsp_valid[d] = d_txrsp_v[d];
    assign dir_txrsp_null[d]  = d_txrsp_null[d];
  end

  token_vendor #(.NPROC(NPROC), .PID_W(PID_W)) u_tv (
    .clk, .rst_n, .tid_req,
    .grant_valid(tid_grant_valid), .grant_pid(tid_grant_pid), .grant_tid(tid_grant_tid)
  );

endmodule
