// token_vendor: the central vendor of commit timestamps (TIDs).
//
// A processor that reaches its commit instruction raises tid_req and holds
// it until it sees a grant for itself. The vendor grants one request per
// cycle, round-robin among the requesters (own choice), and hands out
// consecutive TIDs starting at 1, so a lower TID means an older commit.
// Grant (grant_valid, grant_pid, grant_tid) is registered: it appears the
// cycle after the request is seen. A requester is not granted again while its
// previous grant is still on the outputs.
module token_vendor
  import htm_pkg::*;
#(
  parameter int unsigned NPROC = 16,
  parameter int unsigned PID_W = (NPROC > 1) ? $clog2(NPROC) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NPROC-1:0] tid_req,
  output logic             grant_valid,
  output logic [PID_W-1:0] grant_pid,
  output tid_t             grant_tid
);

  tid_t             next_tid;
  logic [PID_W-1:0] rr_ptr;        // search starts here
  logic             pick_ok;
  logic [PID_W-1:0] pick;
  logic [NPROC-1:0] eligible;

  always_comb begin
    eligible = tid_req;
    if (grant_valid) eligible[grant_pid] = 1'b0;
    pick_ok = 1'b0;
    pick    = '0;
    for (int k = NPROC - 1; k >= 0; k--) begin
      logic [PID_W-1:0] idx;
      idx = PID_W'((int'(rr_ptr) + k) % NPROC);
      if (eligible[idx]) begin
        pick_ok = 1'b1;
        pick    = idx;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      next_tid    <= tid_t'(1);
      rr_ptr      <= '0;
      grant_valid <= 1'b0;
      grant_pid   <= '0;
      grant_tid   <= '0;
    end else begin
      grant_valid <= pick_ok;
      if (pick_ok) begin
        grant_pid <= pick;
        grant_tid <= next_tid;
        next_tid  <= next_tid + 1'b1;
        rr_ptr    <= (int'(pick) == NPROC - 1) ? '0 : PID_W'(pick + 1'b1);
      end
    end
  end

endmodule
