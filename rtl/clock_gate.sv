// Latch-based clock gate for one sub-machine (the "L" box and gate of the
// gated-clock network).
//
// The activation function fa (1 = halt) is captured by a latch that is
// transparent while clk is low and holds while clk is high, so the enable
// cannot change during the high phase and the gated clock cannot glitch.
// gclk = clk AND NOT(latched fa). A value of fa settled before the rising
// edge of clk therefore decides whether that edge reaches the sub-machine.
// The latch polarity and the AND gate are this design's choice of the usual
// glitch-free cell.
//
// en_q (the latched enable, 1 = clocked) is brought out for observation.
// The latch below is intentional: it is the gating latch of the cell.
// Inside lp_fsm_top, Verilator's lint may report that no latch is found in
// the always_latch block because its enable is a clock; the block is a
// latch (synthesis maps it to one latch bit).
module clock_gate (
  input  logic clk,   // free-running CLK
  input  logic fa,    // activation function, 1 = halt
  output logic gclk,  // local gated clock
  output logic en_q   // latched enable, 1 = the next rising edge passes
);

  always_latch begin
    if (!clk) en_q = ~fa;
  end

  assign gclk = clk & en_q;

endmodule
