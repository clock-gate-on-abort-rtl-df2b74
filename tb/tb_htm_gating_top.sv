// tb_htm_gating_top: end-to-end run of a 4-processor, 2-directory system.
// The processors, the bus and the checks are in htm_tb_harness: every
// transaction must commit, the core clocks must stop exactly while gated,
// and each gating mechanism (stop, renew, on with the aborter absent, on
// after a TxInfoReq comparison, null reply, wake-up by another directory,
// self abort, commit spin) must occur at least once.
module tb_htm_gating_top;
  import htm_pkg::*;
  localparam int NP = 4, ND = 2, PW = (NP > 1) ? $clog2(NP) : 1, TW = 8 + RENEW_W + 2;
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

  htm_gating_top #(.NPROC(4), .NDIR(2), .NLINES(16), .LPC(4)) dut (.*);

  htm_tb_harness #(.NPROC(NP), .NDIR(ND), .NTX(8), .POOL(8), .NWRITE(3), .CWAIT(12)) harness (.*);
endmodule
