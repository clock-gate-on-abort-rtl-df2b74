// dir_lines: line state of one Scalable-TCC directory (the baseline the
// clock-gating table is added to).
//
// Each of NLINES entries tracks one cached line: its line address, a
// full-bit-vector sharer list, the Marked field (the processor that has
// announced it will commit the line) and the owner. Processors that have
// marked lines here are committers; each is recorded with its commit
// timestamp (TID). Conflicting commits are serialized by TID: only the
// committer with the lowest TID, the oldest, may write lines back; the others
// are refused with NACK and spin. Committing a line makes the committer its
// owner and sends an invalidation to every other sharer: that invalidation is
// the abort, and it is what the gating table logs.
//
// Requests (one per cycle, req_valid strobe):
//   OP_LOAD   pid becomes a sharer of laddr (a line entry is allocated).
//   OP_MARK   pid marks laddr and is recorded as committer with req_tid.
//             If the line is already marked, the older marker keeps the
//             Marked field. A MARK is never refused, so two committers can
//             never wait on each other's marks.
//   OP_COMMIT pid writes back a line: NACK unless pid is the oldest
//             committer here; else owner <= pid, its mark is cleared, the
//             other sharers are invalidated and removed from the sharer list.
//   OP_DONE   pid has committed: its marks and committer record are dropped
//             and commit_vec[pid] pulses (sent to every directory).
//   OP_ABORT  pid's transaction was aborted: marks and record dropped.
// The answer (ACK, NACK, or FULL when no line entry is free) and the
// invalidation strobe appear one cycle after the request. access_vec pulses
// for the requesting processor on every load or store (LOAD, MARK, COMMIT),
// not on the DONE/ABORT control messages.
// The design takes this directory from Scalable TCC and names its fields
// (sharer list, Marked, Owned); the exact request set, the per-processor
// committer record standing in for Scalable TCC's TID bookkeeping, the entry
// count, allocation without eviction and the DONE broadcast are this
// design's own simplifications.
module dir_lines
  import htm_pkg::*;
#(
  parameter int unsigned NPROC  = 16,
  parameter int unsigned PID_W  = (NPROC > 1) ? $clog2(NPROC) : 1,
  parameter int unsigned NLINES = 1024
) (
  input  logic              clk,
  input  logic              rst_n,

  input  logic              req_valid,
  input  dir_op_e           req_op,
  input  logic [PID_W-1:0]  req_pid,
  input  laddr_t            req_laddr,
  input  tid_t              req_tid,

  output logic              rsp_valid,
  output dir_rsp_e          rsp_code,
  output logic [PID_W-1:0]  rsp_pid,

  output logic              inval_valid,
  output logic [NPROC-1:0]  inval_vec,
  output logic [PID_W-1:0]  inval_by,
  output laddr_t            inval_laddr,

  output logic [NPROC-1:0]  access_vec,
  output logic [NPROC-1:0]  commit_vec,

  // oldest committer (the one being served)
  output logic              serving,
  output logic [PID_W-1:0]  serving_pid,
  output tid_t              serving_tid,

  output logic [NLINES-1:0] marked_valid,
  output logic [PID_W-1:0]  marked_pid [NLINES]
);

  localparam int unsigned IDX_W = (NLINES > 1) ? $clog2(NLINES) : 1;

  typedef struct packed {
    logic             valid;
    laddr_t           laddr;
    logic [NPROC-1:0] sharers;
    logic             mk_valid;
    logic [PID_W-1:0] mk_pid;
    logic             own_valid;
    logic [PID_W-1:0] own_pid;
  } line_t;

  line_t            lines [NLINES];
  logic [NPROC-1:0] cm_valid;          // committer record per processor
  tid_t             cm_tid [NPROC];

  logic             hit, free_ok;
  logic [IDX_W-1:0] hit_idx, free_idx, sel_idx;

  always_comb begin
    hit = 1'b0; hit_idx = '0; free_ok = 1'b0; free_idx = '0;
    for (int i = NLINES - 1; i >= 0; i--) begin
      if (lines[i].valid && lines[i].laddr == req_laddr) begin
        hit = 1'b1; hit_idx = IDX_W'(i);
      end
      if (!lines[i].valid) begin
        free_ok = 1'b1; free_idx = IDX_W'(i);
      end
    end
    sel_idx = hit ? hit_idx : free_idx;
  end

  // Oldest committer: lowest TID, lowest pid on a tie.
  always_comb begin
    serving = 1'b0; serving_pid = '0; serving_tid = '0;
    for (int p = 0; p < NPROC; p++)
      if (cm_valid[p] && (!serving || cm_tid[p] < serving_tid)) begin
        serving = 1'b1; serving_pid = PID_W'(p); serving_tid = cm_tid[p];
      end
  end

  logic mark_conflict;
  assign mark_conflict = hit && lines[hit_idx].mk_valid && (lines[hit_idx].mk_pid != req_pid);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NLINES; i++) lines[i] <= '0;
      for (int p = 0; p < NPROC; p++) cm_tid[p] <= '0;
      cm_valid    <= '0;
      rsp_valid   <= 1'b0;
      rsp_code    <= RSP_ACK;
      rsp_pid     <= '0;
      inval_valid <= 1'b0;
      inval_vec   <= '0;
      inval_by    <= '0;
      inval_laddr <= '0;
      access_vec  <= '0;
      commit_vec  <= '0;
    end else begin
      rsp_valid   <= req_valid;
      rsp_pid     <= req_pid;
      rsp_code    <= RSP_ACK;
      inval_valid <= 1'b0;
      inval_vec   <= '0;
      access_vec  <= '0;
      commit_vec  <= '0;
      if (req_valid) begin
        access_vec[req_pid] <= (req_op == OP_LOAD || req_op == OP_MARK || req_op == OP_COMMIT);
        case (req_op)
          OP_LOAD: begin
            if (hit || free_ok) begin
              if (!hit) begin
                lines[sel_idx]       <= '0;
                lines[sel_idx].valid <= 1'b1;
                lines[sel_idx].laddr <= req_laddr;
              end
              lines[sel_idx].sharers[req_pid] <= 1'b1;
            end else begin
              rsp_code <= RSP_FULL;
            end
          end
          OP_MARK: begin
            if (hit || free_ok) begin
              if (!hit) begin
                lines[sel_idx]       <= '0;
                lines[sel_idx].valid <= 1'b1;
                lines[sel_idx].laddr <= req_laddr;
              end
              // the older of two markers keeps the Marked field
              if (!mark_conflict || req_tid < cm_tid[lines[hit_idx].mk_pid]) begin
                lines[sel_idx].mk_valid <= 1'b1;
                lines[sel_idx].mk_pid   <= req_pid;
              end
              cm_valid[req_pid]       <= 1'b1;
              cm_tid[req_pid]         <= req_tid;
            end else begin
              rsp_code <= RSP_FULL;
            end
          end
          OP_COMMIT: begin
            if (!serving || serving_pid != req_pid || !hit) begin
              rsp_code <= RSP_NACK;
            end else begin
              logic [NPROC-1:0] victims;
              victims = lines[hit_idx].sharers;
              victims[req_pid] = 1'b0;
              if (lines[hit_idx].mk_pid == req_pid)
                lines[hit_idx].mk_valid <= 1'b0;
              lines[hit_idx].own_valid <= 1'b1;
              lines[hit_idx].own_pid   <= req_pid;
              lines[hit_idx].sharers   <= '0;
              inval_valid <= (victims != '0);
              inval_vec   <= victims;
              inval_by    <= req_pid;
              inval_laddr <= req_laddr;
            end
          end
          OP_DONE, OP_ABORT: begin
            if (req_op == OP_DONE) commit_vec[req_pid] <= 1'b1;
            cm_valid[req_pid] <= 1'b0;
            for (int i = 0; i < NLINES; i++)
              if (lines[i].mk_valid && lines[i].mk_pid == req_pid)
                lines[i].mk_valid <= 1'b0;
          end
          default: ;
        endcase
      end
    end
  end

  for (genvar i = 0; i < NLINES; i++) begin : g_mk
    assign marked_valid[i] = lines[i].valid && lines[i].mk_valid;
    assign marked_pid[i]   = lines[i].mk_pid;
  end

endmodule
