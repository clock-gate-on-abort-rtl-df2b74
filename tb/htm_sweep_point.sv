// htm_sweep_point: one system of the W_0 sweep - htm_gating_top at NP
// processors, ND directories of NLINES line entries, driven by the
// end-to-end harness with W_0 preset to W0 and each commit write taking
// 2*W0+8 cycles, so that a committer can outlast a first gating period at
// every W_0. The harness does not end the
// simulation; the enclosing testbench reads harness.finished, .checks and
// .failures.
module htm_sweep_point #(
  parameter int NP = 4,
  parameter int ND = 4,
  parameter int NLINES = 64,
  parameter int LPC = 8,
  parameter int W0 = 8
);
  import htm_pkg::*;
  localparam int PW = (NP > 1) ? $clog2(NP) : 1, TW = 8 + RENEW_W + 2;
  logic             clk, rst_n, cfg_w0_we;
  logic [7:0]       cfg_w0;
  logic             dreq_valid [ND];
  dir_op_e          dreq_op    [ND];
  logic [PW-1:0]    dreq_pid   [ND];
  laddr_t           dreq_laddr [ND];
  tid_t             dreq_tid   [ND];
  logic             drsp_valid [ND];
  dir_rsp_e         drsp_code  [ND];
  logic [PW-1:0]    drsp_pid   [ND];
  logic [NP-1:0]    tid_req;
  logic             tid_grant_valid;
  logic [PW-1:0]    tid_grant_pid;
  tid_t             tid_grant_tid;
  logic [NP-1:0]    inflight_done, tx_begin, tx_end;
  txid_t            tx_pc [NP];
  logic [NP-1:0]    core_clk, fetch_stop, self_abort, proc_gated, abort_inval;
  logic [NP-1:0]    dir_gated [ND], dir_renew [ND], dir_on [ND], dir_stop [ND];
  logic             dir_txreq_valid [ND], dir_txrsp_valid [ND], dir_txrsp_null [ND];
  logic [PW-1:0]    dir_txreq_pid [ND];
  logic             dinval_valid [ND];
  logic [PW-1:0]    dinval_by [ND];
  laddr_t           dinval_laddr [ND];
  logic             dir_serving [ND];
  logic [PW-1:0]    dir_serving_pid [ND];
  tid_t             dir_serving_tid [ND];
  logic             dir_scan_busy [ND];
  abort_cnt_t       dir_abort_cnt [ND][NP];
  renew_cnt_t       dir_renew_cnt [ND][NP];
  logic [TW-1:0]    dir_timer [ND][NP];

  htm_gating_top #(.NPROC(NP), .NDIR(ND), .NLINES(NLINES), .LPC(LPC)) dut (.*);

  htm_tb_harness #(.NPROC(NP), .NDIR(ND), .W0(W0), .NTX(6), .POOL(2 * NP), .NWRITE(3),
                   .CWAIT(2 * W0 + 8), .SELF_FINISH(0)) harness (.*);
endmodule
