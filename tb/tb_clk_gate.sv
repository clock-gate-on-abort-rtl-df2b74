// tb_clk_gate: the clock gate must pass exactly the clock pulses whose
// enable was set before the rising edge, and never cut or start a pulse
// while the clock is high, even when the enable changes mid-pulse.
module tb_clk_gate;
  logic clk = 0, en = 0, gclk;
  int checks = 0, failures = 0;
  int exp_pulses = 0, got_pulses = 0;
  bit en_at_rise;

  clk_gate dut (.clk, .en, .gclk);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  always @(posedge gclk) got_pulses++;

  initial begin
    for (int c = 0; c < 300; c++) begin
      // low phase: change enable at a random point
      #($urandom_range(1, 4)) en = 1'($urandom);
      #($urandom_range(1, 4));
      en_at_rise = en;
      clk = 1;
      #1 chk(gclk == en_at_rise, "gclk follows enable sampled in low phase");
      // high phase: enable glitches must not reach gclk
      #1 en = ~en;
      #1 chk(gclk == en_at_rise, "no change while clk high");
      #2 clk = 0;
      #1 chk(gclk == 1'b0, "gclk low while clk low");
      if (en_at_rise) exp_pulses++;
    end
    chk(got_pulses == exp_pulses, $sformatf("pulses %0d exp %0d", got_pulses, exp_pulses));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
