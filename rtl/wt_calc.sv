// wt_calc: gating period of the gating-aware contention manager.
//
//   W_t = W_0 * ( 2^ceil(lg Na) + 2^ceil(lg Nr) )
//
// Na is the abort counter and Nr the renew counter of a gated processor.
// The ceiled logarithms make a staircase: the period only grows when a
// counter crosses a power of two. The formula and W_0 are the design's; the
// value of a term whose count is 0 (lg 0 is undefined) is taken as 0 here,
// so the first abort (Na = 1, Nr = 0) gates for exactly W_0 cycles.
//
// Purely combinational. 2^ceil(lg n) for n >= 1 is 1 << (bit length of n-1),
// so each term is at most 2^CNT_W and the sum fits CNT_W+2 bits.
module wt_calc #(
  parameter int unsigned CNT_W   = 8,            // width of Na and Nr
  parameter int unsigned W0_W    = 8,            // width of the W_0 register
  parameter int unsigned TIMER_W = W0_W + CNT_W + 2
) (
  input  logic [CNT_W-1:0]   na,
  input  logic [CNT_W-1:0]   nr,
  input  logic [W0_W-1:0]    w0,
  output logic [TIMER_W-1:0] wt
);

  localparam int unsigned SUM_W = CNT_W + 2;

  // 2^ceil(lg n), with the n = 0 term defined as 0.
  function automatic logic [SUM_W-1:0] pow2_ceil_lg(logic [CNT_W-1:0] n);
    logic [CNT_W-1:0] m;
    int unsigned      len;
    m   = n - 1'b1;
    len = 0;
    for (int unsigned i = 0; i < CNT_W; i++)
      if (m[i]) len = i + 1;
    if (n == '0) return '0;
    return SUM_W'(1) << len;
  endfunction

  logic [SUM_W-1:0] sum;

  always_comb begin
    sum = pow2_ceil_lg(na) + pow2_ceil_lg(nr);
    wt  = TIMER_W'(w0) * TIMER_W'(sum);
  end

endmodule
