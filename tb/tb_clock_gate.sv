// tb_clock_gate: checks that the gated clock pulses exactly in the cycles
// whose enable was high during the preceding low phase, stays low while the
// clock is low, and is not cut or started by enable changes (glitches)
// while the clock is high.
module tb_clock_gate;
  logic clk = 0, en = 0, gclk;
  int checks = 0, failures = 0;

  clock_gate #(.GATING(1'b1)) dut (.clk, .en, .gclk);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic en_low, exp_pulse;
    int pulses = 0, exp_pulses = 0;
    for (int i = 0; i < 2000; i++) begin
      // low phase: enable settles (as from a register updated at the last edge)
      #1 en = $urandom_range(1);
      #2 checks++;
      if (gclk !== 1'b0) begin failures++; $display("gclk high while clk low"); end
      #2 en_low = en;           // value the latch holds when the clock rises
      clk = 1;                  // rising edge
      exp_pulse = en_low;
      if (exp_pulse) exp_pulses++;
      #1 checks++;
      if (gclk !== exp_pulse) begin failures++; $display("cycle %0d gclk=%b exp %b", i, gclk, exp_pulse); end
      if (gclk) pulses++;
      // glitch the enable while the clock is high
      en = ~en;
      #1 en = ~en;
      #1 en = ~en;
      #1 checks++;
      if (gclk !== exp_pulse) begin failures++; $display("cycle %0d glitch passed", i); end
      #1 clk = 0;
      #0 checks++;
      if (gclk !== 1'b0) begin failures++; $display("gclk did not fall"); end
      #4;
    end
    checks++;
    if (pulses != exp_pulses) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
