// tb_w0_sweep: sensitivity of the gating scheme to W_0 and to the processor
// count, the sweep the design is evaluated with (W_0 from a few cycles to
// about 35; 4, 8 and 16 processors). Nine systems run side by side, at
// W_0 = 4, 16 and 32 for 4, 8 and 16 processors, each with 4 directories of
// 64 line entries (reduced from the defaults so that the nine fit in one
// short simulation; the W_0 register itself is full width). Each system runs
// the end-to-end harness, which checks the protocol (every transaction
// commits, no "on" earlier than W_0 cycles after Stop Clock, correct core
// clock, every mechanism occurs). On top of that, for each processor count
// the total processor-cycles spent gated must grow with W_0: a larger W_0
// gives longer gating periods.
module tb_w0_sweep;
  localparam int NNP = 3, NW = 3;
  localparam int NP_V [NNP] = '{4, 8, 16};
  localparam int W0_V [NW]  = '{4, 16, 32};

  bit     fin   [NNP][NW];
  int     chks  [NNP][NW];
  int     fails [NNP][NW];
  longint gcyc  [NNP][NW];

  for (genvar i = 0; i < NNP; i++) begin : g_np
    for (genvar j = 0; j < NW; j++) begin : g_w0
      htm_sweep_point #(.NP(NP_V[i]), .ND(4), .NLINES(64), .LPC(8), .W0(W0_V[j])) u_pt ();
      always_comb begin
        fin[i][j]   = u_pt.harness.finished;
        chks[i][j]  = u_pt.harness.checks;
        fails[i][j] = u_pt.harness.failures;
        gcyc[i][j]  = u_pt.harness.n_gated_cyc;
      end
    end
  end

  int checks = 0, failures = 0;

  initial begin
    bit all;
    do begin
      #1000;
      all = 1;
      for (int i = 0; i < NNP; i++)
        for (int j = 0; j < NW; j++) all &= fin[i][j];
    end while (!all);
    for (int i = 0; i < NNP; i++)
      for (int j = 0; j < NW; j++) begin
        checks += chks[i][j];
        failures += fails[i][j];
      end
    for (int i = 0; i < NNP; i++)
      for (int j = 1; j < NW; j++) begin
        checks++;
        if (gcyc[i][j] <= gcyc[i][j-1]) begin
          failures++;
          $display("FAIL %0d processors: gated cycles %0d at W0=%0d not above %0d at W0=%0d",
                   NP_V[i], gcyc[i][j], W0_V[j], gcyc[i][j-1], W0_V[j-1]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    #(64'd3_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
