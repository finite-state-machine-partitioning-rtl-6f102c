// Activation function Fa_i of one sub-machine, in negative logic.
//
// fa = 1 means "halt the clock of F_i". The clock is halted while the
// sub-machine sits in its idle state, unless one of the go signals that can
// wake it up is asserted in the current cycle:
//
//   fa = in_reset AND NOT (OR of go[*])
//
// Keeping the clock running in the cycle a go arrives lets the newly woken
// machine take its first step on the same edge on which the old one falls
// back to idle, so both local clocks tick in exactly one cycle per hand-over.
// The go signals enter inverted because a go must keep the clock running;
// N_GO, the number of go signals that enter this sub-machine, is a parameter
// whose default suits the two-machine example.
//
// Purely combinational; the result is sampled by the clock_gate latch.
module activation_fn #(
  parameter int unsigned N_GO = 1
) (
  input  logic            in_reset,  // is_in_reset_i
  input  logic [N_GO-1:0] go,        // go_p,q entering F_i
  output logic            fa         // 1 = halt the clock of F_i
);

  assign fa = in_reset & ~(|go);

endmodule
