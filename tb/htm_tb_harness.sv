// htm_tb_harness: end-to-end stimulus and checking for htm_gating_top.
//
// Plays everything outside the top: NPROC transactional processors, the bus
// that carries their requests to the directories, and the main PLL clock.
// Each processor runs NTX transactions. A transaction reads NREAD lines from
// a small shared pool (so transactions conflict), computes for a few cycles,
// takes a TID from the vendor, marks and commits NWRITE lines (each commit
// write takes CWAIT cycles), then sends DONE to every directory. An
// invalidation or a Stop Clock ends the transaction: the processor sends
// ABORT to every directory, reports its in-flight work done, waits to be
// woken (self_abort) and restarts the transaction. The home directory of a
// line is its address modulo NDIR. Bus arbitration is round-robin per
// directory, one request per directory per cycle, one outstanding request
// per processor.
//
// Checked: every transaction commits; the core clock gives no pulse while
// its processor is gated and every pulse otherwise; every directory's "on"
// comes at least W_0 cycles after its Stop Clock; each end of a stop gives
// one self abort; at the end no processor is left gated. Counted, and required
// at least once: Stop Clock, renewal, "on" with the aborter absent, "on"
// after a TxInfoReq comparison, "on" for a request from an OFF processor (woken by another
// directory), a null TxInfoReq reply, commit spin (NACK), self abort, and
// several processors gated at once.
module htm_tb_harness
  import htm_pkg::*;
#(
  parameter int unsigned NPROC  = 16,
  parameter int unsigned NDIR   = 16,
  parameter int unsigned PID_W  = (NPROC > 1) ? $clog2(NPROC) : 1,
  parameter int unsigned W0_W   = 8,
  parameter int unsigned W0     = 8,
  parameter int unsigned NTX    = 3,
  parameter int unsigned POOL   = 12,
  parameter int unsigned NREAD  = 3,
  parameter int unsigned NWRITE = 2,
  parameter int unsigned CWAIT  = 6,
  parameter int unsigned MAXCYC = 200000,
  // 1: print TB_RESULT and end the simulation when done (stand-alone use);
  // 0: only raise `finished`, for a testbench that runs several systems
  parameter bit          SELF_FINISH = 1
) (
  output logic             clk,
  output logic             rst_n,
  output logic             cfg_w0_we,
  output logic [W0_W-1:0]  cfg_w0,
  output logic             dreq_valid [NDIR],
  output dir_op_e          dreq_op    [NDIR],
  output logic [PID_W-1:0] dreq_pid   [NDIR],
  output laddr_t           dreq_laddr [NDIR],
  output tid_t             dreq_tid   [NDIR],
  input  logic             drsp_valid [NDIR],
  input  dir_rsp_e         drsp_code  [NDIR],
  input  logic [PID_W-1:0] drsp_pid   [NDIR],
  output logic [NPROC-1:0] tid_req,
  input  logic             tid_grant_valid,
  input  logic [PID_W-1:0] tid_grant_pid,
  input  tid_t             tid_grant_tid,
  output logic [NPROC-1:0] inflight_done,
  output logic [NPROC-1:0] tx_begin,
  output txid_t            tx_pc      [NPROC],
  output logic [NPROC-1:0] tx_end,
  input  logic [NPROC-1:0] core_clk,
  input  logic [NPROC-1:0] fetch_stop,
  input  logic [NPROC-1:0] self_abort,
  input  logic [NPROC-1:0] proc_gated,
  input  logic [NPROC-1:0] abort_inval,
  input  logic [NPROC-1:0] dir_gated  [NDIR],
  input  logic [NPROC-1:0] dir_renew  [NDIR],
  input  logic [NPROC-1:0] dir_on     [NDIR],
  input  logic [NPROC-1:0] dir_stop   [NDIR],
  input  logic             dir_txreq_valid [NDIR],
  input  logic [PID_W-1:0] dir_txreq_pid   [NDIR],
  input  logic             dir_txrsp_valid [NDIR],
  input  logic             dir_txrsp_null  [NDIR]
);

  int checks = 0, failures = 0;
  bit finished = 0;
  longint cyc = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s @cycle %0d", what, cyc);
    end
  endtask

  initial begin
    clk = 0;
    forever #5 clk = ~clk;
  end
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------------------------------------------------------- bus
  logic [NPROC-1:0]     want;
  dir_op_e              w_op    [NPROC];
  int unsigned          w_dir   [NPROC];
  laddr_t               w_laddr [NPROC];
  tid_t                 w_tid   [NPROC];
  logic [NPROC-1:0]     grant;
  int unsigned          rr = 0;

  always_comb begin
    grant = '0;
    for (int d = 0; d < NDIR; d++) begin
      dreq_valid[d] = 1'b0;
      dreq_op[d]    = OP_LOAD;
      dreq_pid[d]   = '0;
      dreq_laddr[d] = '0;
      dreq_tid[d]   = '0;
      for (int k = 0; k < NPROC; k++) begin
        int unsigned p;
        p = (rr + k) % NPROC;
        if (!dreq_valid[d] && want[p] && w_dir[p] == d) begin
          dreq_valid[d] = 1'b1;
          dreq_op[d]    = w_op[p];
          dreq_pid[d]   = PID_W'(p);
          dreq_laddr[d] = w_laddr[p];
          dreq_tid[d]   = w_tid[p];
          grant[p]      = 1'b1;
        end
      end
    end
  end
  always @(posedge clk) rr <= (rr + 1) % NPROC;

  // ---------------------------------------------------------- processors
  typedef enum int {P_START, P_REQ, P_WAIT, P_WORK, P_TID, P_CWAIT, P_DRAIN, P_FIN} pst_e;
  typedef enum int {PH_READ, PH_MARK, PH_COMMIT, PH_DONE, PH_ABORT} ph_e;

  int n_commit = 0, n_spin = 0, n_restart = 0;
  logic [NPROC-1:0] fin;

  for (genvar gp = 0; gp < NPROC; gp++) begin : g_p
    pst_e        st;
    ph_e         ph;
    int unsigned idx, cnt, ntx;
    laddr_t      rd [NREAD];
    laddr_t      wr [NWRITE];
    tid_t        mytid;
    bit          killed;   // an invalidation or Stop Clock hit this transaction

    function automatic laddr_t pick_line();
      return laddr_t'($urandom % POOL);
    endfunction

    task automatic issue(dir_op_e op, laddr_t a, int unsigned d);
      want[gp]    <= 1'b1;
      w_op[gp]    <= op;
      w_laddr[gp] <= a;
      w_dir[gp]   <= d;
      w_tid[gp]   <= mytid;
      st          <= P_WAIT;
    endtask

    // next request of the current phase, or the move to the next phase
    task automatic next_req();
      case (ph)
        PH_READ:   if (idx < NREAD)  issue(OP_LOAD, rd[idx], rd[idx] % NDIR);
                   else begin st <= P_WORK; cnt <= 5 + $urandom % 16; end
        PH_MARK:   if (idx < NWRITE) issue(OP_MARK, wr[idx], wr[idx] % NDIR);
                   else begin ph <= PH_COMMIT; idx <= 0; end
        PH_COMMIT: if (idx < NWRITE) issue(OP_COMMIT, wr[idx], wr[idx] % NDIR);
                   else begin ph <= PH_DONE; idx <= 0; end
        PH_DONE:   if (idx < NDIR) issue(OP_DONE, '0, idx);
                   else begin
                     tx_end[gp] <= 1'b1;
                     n_commit   <= n_commit + 1;
                     ntx        <= ntx + 1;
                     st <= (ntx + 1 == NTX) ? P_FIN : P_START;
                   end
        PH_ABORT:  if (idx < NDIR) issue(OP_ABORT, '0, idx);
                   else st <= P_DRAIN;
        default: ;
      endcase
    endtask

    always @(posedge clk) begin
      if (!rst_n) begin
        st <= P_START; ph <= PH_READ; idx <= 0; cnt <= 0; ntx <= 0; killed <= 0;
        want[gp] <= 0; w_op[gp] <= OP_LOAD; w_dir[gp] <= 0; w_laddr[gp] <= '0; w_tid[gp] <= '0;
        tid_req[gp] <= 0; inflight_done[gp] <= 0; tx_begin[gp] <= 0; tx_end[gp] <= 0;
        tx_pc[gp] <= '0; mytid <= '0;
        for (int i = 0; i < NREAD; i++) rd[i] <= '0;
        for (int i = 0; i < NWRITE; i++) wr[i] <= '0;
      end else begin
        tx_begin[gp] <= 1'b0;
        tx_end[gp] <= 1'b0;
        inflight_done[gp] <= 1'b0;
        if ((abort_inval[gp] || fetch_stop[gp]) && ph != PH_DONE && ph != PH_ABORT &&
            st != P_FIN && st != P_START)
          killed <= 1'b1;
        case (st)
          P_START: if (fetch_stop[gp]) st <= P_DRAIN; else begin
            // new transaction: choose its lines; its id is its start PC
            for (int i = 0; i < NREAD; i++) rd[i] <= pick_line();
            for (int i = 0; i < NWRITE; i++) wr[i] <= laddr_t'((gp * 5 + i * NDIR + ntx) % POOL);
            tx_pc[gp]    <= txid_t'(64'h1_0000 + gp * 64'h100 + ntx * 4);
            tx_begin[gp] <= 1'b1;
            killed <= 1'b0;
            ph <= PH_READ; idx <= 0; st <= P_REQ;
          end
          P_REQ: begin
            if (killed && ph != PH_DONE && ph != PH_ABORT) begin
              ph <= PH_ABORT; idx <= 0; tid_req[gp] <= 1'b0;
            end else next_req();
          end
          P_WAIT: begin
            if (grant[gp]) want[gp] <= 1'b0;
            if (!want[gp] && drsp_valid[w_dir[gp]] && drsp_pid[w_dir[gp]] == PID_W'(gp)) begin
              if (drsp_code[w_dir[gp]] == RSP_ACK) begin
                idx <= idx + 1;
                st  <= (ph == PH_COMMIT) ? P_CWAIT : P_REQ;
                cnt <= CWAIT;
              end else begin
                if (drsp_code[w_dir[gp]] == RSP_NACK) n_spin <= n_spin + 1;
                st <= P_REQ;   // spin: retry
              end
            end
          end
          P_WORK: begin
            if (killed) begin st <= P_REQ; end
            else if (cnt == 0) begin st <= P_TID; tid_req[gp] <= 1'b1; end
            else cnt <= cnt - 1;
          end
          P_TID: begin
            if (killed) begin st <= P_REQ; tid_req[gp] <= 1'b0; end
            else if (tid_grant_valid && tid_grant_pid == PID_W'(gp)) begin
              tid_req[gp] <= 1'b0;
              mytid <= tid_grant_tid;
              ph <= PH_MARK; idx <= 0; st <= P_REQ;
            end
          end
          P_CWAIT: begin
            if (cnt == 0) st <= P_REQ; else cnt <= cnt - 1;
          end
          P_DRAIN: begin
            // in-flight work finished; wait to be woken if stopped
            if (fetch_stop[gp]) inflight_done[gp] <= 1'b1;
            else begin
              n_restart <= n_restart + 1;
              killed <= 1'b0;
              st <= (ntx == NTX) ? P_FIN : P_START;
            end
          end
          P_FIN: if (fetch_stop[gp]) inflight_done[gp] <= 1'b1;
          default: st <= P_START;
        endcase
      end
    end
    assign fin[gp] = (st == P_FIN);
  end

  // ------------------------------------------------------------ checking
  int n_stop = 0, n_renew = 0, n_on_absent = 0, n_on_cmp = 0, n_null = 0;
  int n_woken_elsewhere = 0, n_self_abort = 0, n_wake = 0, max_gated = 0;
  longint n_gated_cyc = 0;  // processor-cycles spent clock-gated
  int clk_pulse [NPROC], clk_exp [NPROC];
  longint stop_at [NDIR][NPROC];
  logic [NPROC-1:0] stop_q;

  for (genvar gp = 0; gp < NPROC; gp++) begin : g_clk
    always @(posedge core_clk[gp]) clk_pulse[gp]++;
  end

  always @(negedge clk) if (rst_n) begin
    int ng;
    ng = 0;
    for (int p = 0; p < NPROC; p++) begin
      // the gate captures its enable while clk is low: a pulse at the next
      // rising edge is expected unless the unit is gated now
      if (!proc_gated[p]) clk_exp[p]++;
      if (proc_gated[p]) ng++;
      if (stop_q[p] && !fetch_stop[p]) n_wake++;
      if (self_abort[p]) n_self_abort++;
    end
    if (ng > max_gated) max_gated = ng;
    n_gated_cyc += ng;
    stop_q = fetch_stop;
    for (int d = 0; d < NDIR; d++) begin
      if (dir_txrsp_valid[d] && dir_txrsp_null[d]) n_null++;
      for (int p = 0; p < NPROC; p++) begin
        if (dir_stop[d][p]) begin n_stop++; stop_at[d][p] = cyc; end
        if (dir_renew[d][p]) n_renew++;
        // an "on" sent because a request from the OFF processor was served
        // here (it was woken elsewhere, or the request was already in
        // flight) is not a gating-period decision
        if (dir_on[d][p] && dir_gated[d][p] && drsp_valid[d] && drsp_pid[d] == PID_W'(p))
          n_woken_elsewhere++;
        else if (dir_on[d][p]) begin
          if (dir_txrsp_valid[d]) n_on_cmp++; else n_on_absent++;
          chk(cyc - stop_at[d][p] >= W0, $sformatf("D%0d on P%0d after %0d cycles", d, p, cyc - stop_at[d][p]));
        end
      end
    end
  end

  initial begin
    cfg_w0_we = 0; cfg_w0 = W0_W'(W0);
    rst_n = 0;
    stop_q = '0;
    for (int p = 0; p < NPROC; p++) begin clk_pulse[p] = 0; clk_exp[p] = 0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // firmware presets W_0 (same value as the reset default)
    cfg_w0_we = 1; @(posedge clk); #1 cfg_w0_we = 0;
    for (int p = 0; p < NPROC; p++) begin clk_pulse[p] = 0; clk_exp[p] = 0; end
    while (fin != '1 && cyc < MAXCYC) @(posedge clk);
    chk(fin == '1, "every processor finished its transactions");
    // let late gating periods end
    for (int i = 0; i < 20000 && proc_gated != 0; i++) @(posedge clk);
    repeat (4) @(posedge clk);
    #1;
    chk(proc_gated == 0, "no processor left gated");
    for (int d = 0; d < NDIR; d++) chk(dir_gated[d] == 0, $sformatf("D%0d has no OFF entry", d));
    chk(n_commit == NPROC * NTX, $sformatf("%0d commits", n_commit));
    for (int p = 0; p < NPROC; p++)
      chk(clk_pulse[p] == clk_exp[p] || clk_pulse[p] == clk_exp[p] + 1,
          $sformatf("P%0d core clock pulses %0d expected %0d", p, clk_pulse[p], clk_exp[p]));
    chk(n_self_abort == n_wake, $sformatf("self aborts %0d = wake-ups %0d", n_self_abort, n_wake));
    $display("NPROC=%0d W0=%0d gated_cycles=%0d cycles=%0d commits=%0d restarts=%0d stops=%0d renewals=%0d on_absent=%0d on_compare=%0d null_replies=%0d woken_elsewhere=%0d self_aborts=%0d spins=%0d max_gated=%0d",
             NPROC, W0, n_gated_cyc, cyc, n_commit, n_restart, n_stop, n_renew, n_on_absent, n_on_cmp, n_null,
             n_woken_elsewhere, n_self_abort, n_spin, max_gated);
    chk(n_stop > 0, "Stop Clock happened");
    chk(n_renew > 0, "renewal happened");
    chk(n_on_absent > 0, "on with aborter absent happened");
    chk(n_on_cmp > 0, "on after TxInfoReq comparison happened");
    chk(n_woken_elsewhere > 0, "OFF cleared by a request happened");
    chk(n_null > 0, "null TxInfoReq reply happened");
    chk(n_self_abort > 0, "self abort happened");
    chk(n_spin > 0, "commit spin happened");
    chk(max_gated > 1, "several processors gated at once");
    finished = 1;
    if (SELF_FINISH) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  // watchdog
  if (SELF_FINISH) initial begin
    #(longint'(MAXCYC + 40000) * 10);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
