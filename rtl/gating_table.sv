// gating_table: the table each directory adds, one entry per processor.
//
// Each entry holds the fields the design specifies: the id of the processor
// that aborted this one in this directory, the id of the aborting transaction
// (its start PC), an 8-bit saturating abort counter, a renew counter, the gate
// timer and the OFF bit (1 = this directory has clock-gated the processor;
// 0 after reset). Every time the abort or renew counter changes, the timer is
// preset to W_t (wt_calc, one instance per entry) and then counts down one per
// directory clock; an entry whose OFF bit is set and whose timer reached 0 is
// reported in expired_vec for the ungate controller.
//
// Update commands, all one-cycle strobes, one bit per processor:
//   abort_vec   invalidation sent: aborter <= abort_by, abort count +1,
//               renew count <= 0, timer <= W_t, OFF <= 1, tx id pending.
//               Ignored for an entry that is already OFF (its transaction is
//               already dead) - own choice.
//   txinfo_wr   store the TxInfoReq reply (null reply = no valid tx id).
//   renew_vec   renew count +1, timer <= W_t (only while OFF and with no
//               access from the processor in the same cycle).
//   on_vec      OFF <= 0 (the directory sends "on").
//   access_vec  a load/store arrived from the processor: it was woken by
//               another directory, so OFF <= 0.
//   commit_vec  the processor committed: abort count <= 0.
// A command takes effect at the next clock edge; W_t is computed from the
// counter values being written, so the timer and counters change together.
module gating_table
  import htm_pkg::*;
#(
  parameter int unsigned NPROC   = 16,
  parameter int unsigned PID_W   = (NPROC > 1) ? $clog2(NPROC) : 1,
  parameter int unsigned W0_W    = 8,
  parameter int unsigned TIMER_W = W0_W + RENEW_W + 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [W0_W-1:0]     w0,

  input  logic [NPROC-1:0]    abort_vec,
  input  logic [PID_W-1:0]    abort_by,
  input  logic [NPROC-1:0]    txinfo_wr,
  input  logic                txinfo_null,
  input  txid_t               txinfo_id,
  input  logic [NPROC-1:0]    renew_vec,
  input  logic [NPROC-1:0]    on_vec,
  input  logic [NPROC-1:0]    access_vec,
  input  logic [NPROC-1:0]    commit_vec,

  output logic [PID_W-1:0]    ent_aborter   [NPROC],
  output txid_t               ent_txid      [NPROC],
  output logic [NPROC-1:0]    ent_tx_valid,
  output logic [NPROC-1:0]    ent_tx_pending,
  output abort_cnt_t          ent_abort_cnt [NPROC],
  output renew_cnt_t          ent_renew_cnt [NPROC],
  output logic [TIMER_W-1:0]  ent_timer     [NPROC],
  output logic [NPROC-1:0]    ent_off,
  output logic [NPROC-1:0]    expired_vec
);

  typedef struct packed {
    logic [PID_W-1:0]   aborter;
    txid_t              txid;
    logic               tx_valid;
    logic               tx_pending;
    abort_cnt_t         abort_cnt;
    renew_cnt_t         renew_cnt;
    logic [TIMER_W-1:0] timer;
    logic               off;
  } entry_t;

  entry_t tab [NPROC];

  for (genvar p = 0; p < NPROC; p++) begin : g_ent
    logic               do_abort, do_renew;
    abort_cnt_t         na_next;
    renew_cnt_t         nr_next;
    logic [TIMER_W-1:0] wt;

    assign do_abort = abort_vec[p] && !tab[p].off;
    assign do_renew = renew_vec[p] && tab[p].off && !do_abort && !access_vec[p];
    assign na_next  = do_abort ? sat_inc_abort(tab[p].abort_cnt) : tab[p].abort_cnt;
    assign nr_next  = do_abort ? '0 : sat_inc_renew(tab[p].renew_cnt);

    wt_calc #(.CNT_W(ABORT_W), .W0_W(W0_W), .TIMER_W(TIMER_W)) u_wt (
      .na(na_next), .nr(nr_next), .w0(w0), .wt(wt)
    );

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        tab[p] <= '0;
      end else begin
        if (do_abort) begin
          tab[p].aborter    <= abort_by;
          tab[p].tx_valid   <= 1'b0;
          tab[p].tx_pending <= 1'b1;
          tab[p].abort_cnt  <= na_next;
          tab[p].renew_cnt  <= '0;
          tab[p].timer      <= wt;
          tab[p].off        <= 1'b1;
        end else begin
          if (txinfo_wr[p]) begin
            tab[p].txid       <= txinfo_id;
            tab[p].tx_valid   <= !txinfo_null;
            tab[p].tx_pending <= 1'b0;
          end
          if (do_renew) begin
            tab[p].renew_cnt <= nr_next;
            tab[p].timer     <= wt;
          end else if (tab[p].timer != '0) begin
            tab[p].timer <= tab[p].timer - 1'b1;
          end
          if (on_vec[p] || access_vec[p])
            tab[p].off <= 1'b0;
          if (commit_vec[p])
            tab[p].abort_cnt <= '0;
        end
      end
    end

    assign ent_aborter[p]    = tab[p].aborter;
    assign ent_txid[p]       = tab[p].txid;
    assign ent_tx_valid[p]   = tab[p].tx_valid;
    assign ent_tx_pending[p] = tab[p].tx_pending;
    assign ent_abort_cnt[p]  = tab[p].abort_cnt;
    assign ent_renew_cnt[p]  = tab[p].renew_cnt;
    assign ent_timer[p]      = tab[p].timer;
    assign ent_off[p]        = tab[p].off;
    assign expired_vec[p]    = tab[p].off && (tab[p].timer == '0);
  end

endmodule
