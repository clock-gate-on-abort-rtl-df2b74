// tb_dir_lines: directed test of the directory line state.
// Three processors read line A; P0 marks it (TID 5) and commits it, which
// must invalidate exactly P1 and P2 with P0 as aborter. A younger committer
// (TID 7) is refused (NACK) until P0's DONE; an older one (TID 2) arriving
// later is served first; of two markers of a line the older holds the
// Marked field; DONE pulses commit_vec and drops the marks, ABORT drops them
// without commit_vec; a full directory answers FULL.
// Answers are checked one cycle after each request.
module tb_dir_lines;
  import htm_pkg::*;
  localparam int NP = 4, PW = 2, NL = 4;
  logic clk = 0, rst_n = 0;
  logic req_valid = 0;
  dir_op_e req_op = OP_LOAD;
  logic [PW-1:0] req_pid = 0;
  laddr_t req_laddr = 0;
  tid_t req_tid = 0;
  logic rsp_valid;
  dir_rsp_e rsp_code;
  logic [PW-1:0] rsp_pid;
  logic inval_valid;
  logic [NP-1:0] inval_vec, access_vec, commit_vec;
  logic [PW-1:0] inval_by;
  laddr_t inval_laddr;
  logic serving;
  logic [PW-1:0] serving_pid;
  tid_t serving_tid;
  logic [NL-1:0] marked_valid;
  logic [PW-1:0] marked_pid [NL];
  int checks = 0, failures = 0;

  dir_lines #(.NPROC(NP), .NLINES(NL)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  task automatic req(dir_op_e op, int pid, laddr_t a, int tid, dir_rsp_e exp, string what);
    req_valid = 1; req_op = op; req_pid = PW'(pid); req_laddr = a; req_tid = tid_t'(tid);
    @(posedge clk); #1;
    req_valid = 0;
    chk(rsp_valid && rsp_code == exp && rsp_pid == PW'(pid), $sformatf("%s: code %s", what, rsp_code.name()));
    chk(access_vec == ((op == OP_DONE || op == OP_ABORT) ? '0 : NP'(1 << pid)), {what, ": access strobe"});
  endtask

  function automatic int n_marked();
    int n = 0;
    foreach (marked_valid[i]) n += int'(marked_valid[i]);
    return n;
  endfunction

  localparam laddr_t A = 38'h40_0000_0000 >> 6, B = 38'h123, C = 38'h777;

  initial begin
    repeat (2) @(posedge clk); rst_n = 1; #1;
    req(OP_LOAD, 1, A, 0, RSP_ACK, "P1 load A");
    req(OP_LOAD, 2, A, 0, RSP_ACK, "P2 load A");
    req(OP_LOAD, 0, A, 0, RSP_ACK, "P0 load A");
    chk(!inval_valid && !serving, "no commit yet");
    req(OP_MARK, 0, A, 5, RSP_ACK, "P0 mark A");
    chk(serving && serving_pid == 0 && serving_tid == 5, "serving P0 tid 5");
    chk(n_marked() == 1, "one marked line");
    begin
      bit ok = 0;
      foreach (marked_valid[i]) if (marked_valid[i] && marked_pid[i] == 0) ok = 1;
      chk(ok, "marked by P0");
    end
    req(OP_MARK, 3, A, 7, RSP_ACK, "P3 marks a line marked by P0");
    begin
      bit ok = 0;
      foreach (marked_valid[i]) if (marked_valid[i] && marked_pid[i] == 0) ok = 1;
      chk(ok && n_marked() == 1, "older P0 keeps the Marked field");
    end
    req(OP_MARK, 3, B, 7, RSP_ACK, "P3 (TID 7) marks B");
    chk(serving_pid == 0 && serving_tid == 5, "older P0 still served");
    req(OP_COMMIT, 3, B, 7, RSP_NACK, "younger P3 spins");
    req(OP_COMMIT, 3, A, 7, RSP_NACK, "P3 commit of P0's line refused");
    chk(!inval_valid, "no inval on refused commit");
    req(OP_COMMIT, 0, A, 5, RSP_ACK, "P0 commit A");
    chk(inval_valid && inval_vec == 4'b0110 && inval_by == 0 && inval_laddr == A, "P1,P2 invalidated by P0");
    chk(n_marked() == 1, "P0's mark cleared by commit");
    @(posedge clk); #1;
    chk(!inval_valid, "inval is a strobe");
    req(OP_COMMIT, 0, 38'h555, 5, RSP_NACK, "commit of a line not in the directory");
    req(OP_MARK, 0, C, 5, RSP_ACK, "P0 mark C");
    req(OP_DONE, 0, 0, 0, RSP_ACK, "P0 done");
    chk(commit_vec == 4'b0001 && serving && serving_pid == 3 && n_marked() == 1, "done: commit strobe, P3 served");
    req(OP_DONE, 2, 0, 0, RSP_ACK, "P2 done (not a committer)");
    chk(commit_vec == 4'b0100 && serving_pid == 3, "commit strobe P2");
    // an older committer arriving later is served first
    req(OP_MARK, 1, C, 2, RSP_ACK, "P1 (TID 2) marks C");
    chk(serving_pid == 1 && serving_tid == 2, "older P1 served");
    req(OP_MARK, 1, B, 2, RSP_ACK, "P1 marks B, held by younger P3");
    begin
      bit ok = 0;
      foreach (marked_valid[i]) if (marked_valid[i] && marked_pid[i] == 1) ok = (n_marked() == 2);
      chk(ok, "older P1 takes the Marked field of B");
    end
    req(OP_COMMIT, 3, B, 7, RSP_NACK, "P3 waits for P1");
    req(OP_ABORT, 1, 0, 0, RSP_ACK, "P1 aborts");
    chk(commit_vec == 0 && serving_pid == 3 && n_marked() == 0, "abort: no commit strobe, marks dropped");
    req(OP_COMMIT, 3, B, 7, RSP_ACK, "P3 commit B");
    chk(!inval_valid, "no sharer to invalidate");
    req(OP_DONE, 3, 0, 0, RSP_ACK, "P3 done");
    chk(!serving && n_marked() == 0, "no committer left");
    // re-read A after commit: sharer list restarts
    req(OP_LOAD, 1, A, 0, RSP_ACK, "P1 reload A");
    req(OP_LOAD, 2, 38'h999, 0, RSP_ACK, "4th line");
    req(OP_LOAD, 2, 38'h998, 0, RSP_FULL, "directory full");
    req(OP_MARK, 3, A, 9, RSP_ACK, "P3 mark A");
    req(OP_COMMIT, 3, A, 9, RSP_ACK, "P3 commit A");
    chk(inval_valid && inval_vec == 4'b0010 && inval_by == 3, "only P1 invalidated");
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
