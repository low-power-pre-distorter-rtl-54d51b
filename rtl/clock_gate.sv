// clock_gate: glitch-free clock gate for registers that may be switched off.
//
// A plain AND of clock and enable glitches when the enable changes while the
// clock is high. This cell latches the enable while the clock is low (the
// latch is transparent only then) and ANDs the latched enable with the clock,
// so the gated clock can only start or stop on a whole clock pulse. It plays
// the part of an FPGA global clock buffer with enable on an ASIC flow. The
// enable must come from a register, never from combinational logic, as the
// source design requires.
//
// The latch is intended: it is the standard integrated clock-gating cell.
// With GATING = 0 the cell passes the clock straight through and the
// registers behind it rely on their own clock enables instead; the function
// is the same, only the power saving is lost.
//
// Interface: clk in, en (registered, sampled while clk is low), gclk out.
module clock_gate #(
  parameter bit GATING = 1'b1
) (
  input  logic clk,
  input  logic en,
  output logic gclk
);

  if (GATING) begin : g_gate
    logic en_lat;
    always_latch begin
      if (!clk) en_lat = en;
    end
    assign gclk = clk & en_lat;
  end else begin : g_pass
    assign gclk = clk;
  end

endmodule
