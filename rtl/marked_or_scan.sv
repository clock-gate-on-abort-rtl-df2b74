// marked_or_scan: the wide OR of the ungate check circuit.
//
// When a gate timer expires the directory must know whether the processor
// that caused the abort is still committing here. Every directory line whose
// Marked field is set names a processor that has announced its intention to
// commit; OR-ing the one-hot form of all those ids gives the set of processors
// present in the directory. Because the fan-in is very high the OR takes
// several cycles, as the design states: this module folds LPC lines per clock
// into an accumulator, so a scan of NLINES lines takes ceil(NLINES/LPC)
// cycles after `start`, then `done` pulses for one cycle with `present` valid.
// `present` holds its value until the next `start`. LPC is this design's
// own choice. A `start` while busy is ignored.
module marked_or_scan #(
  parameter int unsigned NPROC  = 16,
  parameter int unsigned PID_W  = (NPROC > 1) ? $clog2(NPROC) : 1,
  parameter int unsigned NLINES = 1024,
  parameter int unsigned LPC    = 32     // lines folded per cycle
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [NLINES-1:0] marked_valid,
  input  logic [PID_W-1:0]  marked_pid [NLINES],
  output logic              busy,
  output logic              done,
  output logic [NPROC-1:0]  present
);

  localparam int unsigned NSTEP = (NLINES + LPC - 1) / LPC;
  localparam int unsigned STEP_W = (NSTEP > 1) ? $clog2(NSTEP) : 1;

  logic [STEP_W-1:0] step;
  logic [NPROC-1:0]  fold;

  // OR of the one-hot ids of the LPC lines selected by `step`.
  always_comb begin
    fold = '0;
    for (int unsigned k = 0; k < LPC; k++) begin
      int unsigned idx;
      idx = int'(step) * LPC + k;
      if (idx < NLINES && marked_valid[idx])
        fold[marked_pid[idx]] = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      step    <= '0;
      present <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy    <= 1'b1;
          step    <= '0;
          present <= '0;
        end
      end else begin
        present <= present | fold;
        if (int'(step) == NSTEP - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          step <= step + 1'b1;
        end
      end
    end
  end

endmodule
