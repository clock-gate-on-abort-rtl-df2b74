// ungate_ctrl: the directory's gating/ungating controller.
//
// It serves the gating table one processor at a time:
//  * Tx id fetch. After an abort the table knows the aborting processor but
//    not its transaction. The controller sends a TxInfoReq to that processor
//    and writes the reply (start PC, or null if that processor is itself
//    gated) into every pending entry that names the same aborter.
//  * Expiry check. For a gated processor whose timer reached 0 it runs the
//    wide OR over the Marked fields (marked_or_scan). If the aborter is not
//    among the processors committing here, it sends "on". Otherwise it asks
//    the aborter for its current transaction with a TxInfoReq: on a null
//    reply, or a reply that differs from the stored aborter tx id, it sends
//    "on"; if it is the same transaction it renews the gating period (the
//    table reloads W_t with the renew counter incremented).
// Fetches are served before checks; among processors the lowest id first.
// If the processor's OFF bit drops at any time during a check (it was woken
// by another directory, and may since have been gated again by a new abort),
// the check is dropped: a new gating period has its own timer. These orderings are this design's own choice.
//
// TxInfoReq is a one-cycle strobe (txreq_valid, txreq_pid); exactly one
// request is outstanding and its reply is the next txrsp_valid strobe.
// proc_on is a one-cycle strobe per processor, also fed to the table.
module ungate_ctrl
  import htm_pkg::*;
#(
  parameter int unsigned NPROC = 16,
  parameter int unsigned PID_W = (NPROC > 1) ? $clog2(NPROC) : 1
) (
  input  logic              clk,
  input  logic              rst_n,

  // gating table view
  input  logic [PID_W-1:0]  ent_aborter [NPROC],
  input  txid_t             ent_txid    [NPROC],
  input  logic [NPROC-1:0]  ent_tx_valid,
  input  logic [NPROC-1:0]  ent_tx_pending,
  input  logic [NPROC-1:0]  ent_off,
  input  logic [NPROC-1:0]  expired_vec,

  // gating table updates
  output logic [NPROC-1:0]  txinfo_wr,
  output logic              txinfo_null,
  output txid_t             txinfo_id,
  output logic [NPROC-1:0]  renew_vec,
  output logic [NPROC-1:0]  proc_on,

  // wide OR
  output logic              scan_start,
  input  logic              scan_done,
  input  logic [NPROC-1:0]  scan_present,

  // TxInfoReq to processors
  output logic              txreq_valid,
  output logic [PID_W-1:0]  txreq_pid,
  input  logic              txrsp_valid,
  input  logic              txrsp_null,
  input  txid_t             txrsp_id
);

  typedef enum logic [2:0] {S_IDLE, S_FETCH, S_SCAN, S_CHECK} state_e;

  state_e           state;
  logic [PID_W-1:0] victim;   // entry under check
  logic [PID_W-1:0] target;   // processor asked by TxInfoReq
  logic             stale;    // victim's OFF bit dropped since the check began
  logic             live;     // check still applies to the victim's gating

  assign live = ent_off[victim] && !stale;

  logic             any_pend, any_exp;
  logic [PID_W-1:0] pend_pid, exp_pid;
  logic [NPROC-1:0] exp_ready;

  assign exp_ready = expired_vec & ~ent_tx_pending;

  always_comb begin
    any_pend = 1'b0; pend_pid = '0;
    any_exp  = 1'b0; exp_pid  = '0;
    for (int i = NPROC - 1; i >= 0; i--) begin
      if (ent_tx_pending[i]) begin any_pend = 1'b1; pend_pid = PID_W'(i); end
      if (exp_ready[i])      begin any_exp  = 1'b1; exp_pid  = PID_W'(i); end
    end
  end

  // Reply of the outstanding TxInfoReq matches the stored aborter transaction.
  logic same_tx;
  assign same_tx = !txrsp_null && ent_tx_valid[victim] && (txrsp_id == ent_txid[victim]);

  always_comb begin
    txinfo_wr   = '0;
    txinfo_null = txrsp_null;
    txinfo_id   = txrsp_id;
    renew_vec   = '0;
    proc_on     = '0;
    scan_start  = 1'b0;
    txreq_valid = 1'b0;
    txreq_pid   = '0;
    case (state)
      S_IDLE: begin
        if (any_pend) begin
          txreq_valid = 1'b1;
          txreq_pid   = ent_aborter[pend_pid];
        end else if (any_exp) begin
          scan_start = 1'b1;
        end
      end
      S_FETCH: begin
        if (txrsp_valid)
          for (int i = 0; i < NPROC; i++)
            txinfo_wr[i] = ent_tx_pending[i] && (ent_aborter[i] == target);
      end
      S_SCAN: begin
        if (scan_done && live) begin
          if (!scan_present[ent_aborter[victim]]) begin
            proc_on[victim] = 1'b1;
          end else begin
            txreq_valid = 1'b1;
            txreq_pid   = ent_aborter[victim];
          end
        end
      end
      S_CHECK: begin
        if (txrsp_valid && live) begin
          if (same_tx) renew_vec[victim] = 1'b1;
          else         proc_on[victim]   = 1'b1;
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      victim <= '0;
      target <= '0;
      stale  <= 1'b0;
    end else begin
      if ((state == S_SCAN || state == S_CHECK) && !ent_off[victim]) stale <= 1'b1;
      case (state)
        S_IDLE: begin
          if (any_pend) begin
            target <= ent_aborter[pend_pid];
            state  <= S_FETCH;
          end else if (any_exp) begin
            victim <= exp_pid;
            stale  <= 1'b0;
            state  <= S_SCAN;
          end
        end
        S_FETCH: if (txrsp_valid) state <= S_IDLE;
        S_SCAN: begin
          if (scan_done) begin
            if (live && scan_present[ent_aborter[victim]]) begin
              target <= ent_aborter[victim];
              state  <= S_CHECK;
            end else begin
              state <= S_IDLE;
            end
          end
        end
        S_CHECK: if (txrsp_valid) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // A reply only ever answers an outstanding request.
  a_rsp_expected: assert property (@(posedge clk) disable iff (!rst_n)
    txrsp_valid |-> (state == S_FETCH || state == S_CHECK));

endmodule
