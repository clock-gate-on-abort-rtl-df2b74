// core_gate: the processor-side end of clock-gate-on-abort.
//
// It runs on the processor's main PLL clock, which keeps running while the
// core is gated, and does three things:
//  * Stop Clock. A stop strobe from any directory stops instruction fetch
//    (fetch_stop); once the core reports that its in-flight instruction has
//    finished (inflight_done) the core clock is gated off (clk_en low).
//  * On. An "on" strobe from any directory while stopping or gated enables
//    the clock again and pulses self_abort for one cycle: the core must abort
//    the transaction it was executing when it was frozen.
//  * TxInfoReq reply. The transaction id is the PC of the instruction that
//    started the running transaction (tx_begin/tx_pc, cleared by tx_end or a
//    self abort). A TxInfoReq from directory d is answered the next cycle on
//    txrsp_valid[d]; the reply is null when the processor is stopped, gated
//    or not in a transaction.
// What the core does on Stop Clock, on wake-up and on TxInfoReq follows the
// design; the strobe interface and the null-when-not-in-a-transaction rule
// are this design's own choices. An "on" while running is ignored; a stop and
// an on in the same cycle count as on.
module core_gate
  import htm_pkg::*;
#(
  parameter int unsigned NDIR = 16
) (
  input  logic            clk,
  input  logic            rst_n,

  input  logic            stop_req,
  input  logic            on_req,
  input  logic            inflight_done,

  input  logic            tx_begin,
  input  txid_t           tx_pc,
  input  logic            tx_end,

  input  logic [NDIR-1:0] txreq,
  output logic [NDIR-1:0] txrsp_valid,
  output logic            txrsp_null,
  output txid_t           txrsp_id,

  output logic            fetch_stop,
  output logic            clk_en,
  output logic            self_abort,
  output logic            gated
);

  typedef enum logic [1:0] {C_RUN, C_DRAIN, C_GATED} cstate_e;

  cstate_e state;
  logic    in_tx;
  txid_t   cur_tx;
  logic    wake;

  assign wake = on_req && (state != C_RUN);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= C_RUN;
      self_abort  <= 1'b0;
      in_tx       <= 1'b0;
      cur_tx      <= '0;
      txrsp_valid <= '0;
      txrsp_null  <= 1'b1;
      txrsp_id    <= '0;
    end else begin
      self_abort <= 1'b0;
      case (state)
        C_RUN:   if (stop_req && !on_req) state <= C_DRAIN;
        C_DRAIN: if (wake) state <= C_RUN;
                 else if (inflight_done) state <= C_GATED;
        C_GATED: if (wake) state <= C_RUN;
        default: state <= C_RUN;
      endcase
      if (wake) begin
        self_abort <= 1'b1;
        in_tx      <= 1'b0;
      end else if (state == C_RUN && tx_begin) begin
        in_tx  <= 1'b1;
        cur_tx <= tx_pc;
      end else if (tx_end) begin
        in_tx <= 1'b0;
      end
      txrsp_valid <= txreq;
      txrsp_null  <= !(in_tx && state == C_RUN);
      txrsp_id    <= (in_tx && state == C_RUN) ? cur_tx : '0;
    end
  end

  assign fetch_stop = (state != C_RUN);
  assign clk_en     = (state != C_GATED);
  assign gated      = (state == C_GATED);

endmodule
