// htm_pkg: types and constants shared by the clock-gate-on-abort directory
// logic of a Scalable-TCC style hardware transactional memory.
//
// The transaction id is the 64-bit program counter of the instruction that
// started the transaction, and the abort counter is 8 bits wide and saturates
// at 255, both as the design specifies. The renew counter width, the commit
// timestamp (TID) width and the line address width are this design's own
// choices. Processor ids are parameter-dependent and are therefore plain
// logic vectors in the modules rather than types here.
package htm_pkg;

  localparam int unsigned TXID_W  = 64;  // transaction id = start PC
  localparam int unsigned ABORT_W = 8;   // abort counter, saturating
  localparam int unsigned RENEW_W = 8;   // renew counter, saturating (own choice)
  localparam int unsigned TID_W   = 32;  // commit timestamp width (own choice)
  localparam int unsigned LADDR_W = 38;  // 44-bit physical address, 64 B lines

  typedef logic [TXID_W-1:0]  txid_t;
  typedef logic [ABORT_W-1:0] abort_cnt_t;
  typedef logic [RENEW_W-1:0] renew_cnt_t;
  typedef logic [TID_W-1:0]   tid_t;
  typedef logic [LADDR_W-1:0] laddr_t;

  // Processor-to-directory request opcodes.
  typedef enum logic [2:0] {
    OP_LOAD   = 3'd0,  // read a line: become a sharer
    OP_MARK   = 3'd1,  // announce intention to commit a line (carries TID)
    OP_COMMIT = 3'd2,  // write a marked line back: become owner
    OP_DONE   = 3'd3,  // transaction committed
    OP_ABORT  = 3'd4   // transaction aborted: give up its marks here
  } dir_op_e;

  // Directory answer to a request.
  typedef enum logic [1:0] {
    RSP_ACK  = 2'd0,
    RSP_NACK = 2'd1,   // directory busy serving another commit: spin
    RSP_FULL = 2'd2    // no free line entry
  } dir_rsp_e;

  // Saturating increment helpers.
  function automatic abort_cnt_t sat_inc_abort(abort_cnt_t v);
    return (v == '1) ? v : abort_cnt_t'(v + 1'b1);
  endfunction

  function automatic renew_cnt_t sat_inc_renew(renew_cnt_t v);
    return (v == '1) ? v : renew_cnt_t'(v + 1'b1);
  endfunction

endpackage
