// Shared types for the partitioned low-power FSM of Example 1.
//
// The undecomposed machine has four states st0..st3, two primary input bits
// and one output bit. It is split into two sub-machines: F1 holds {st0, st1}
// and F2 holds {st2, st3}; each adds an idle (reset) state of its own. The
// state codes are minimum-length (two bits per sub-machine) as in the
// original experiments; the code values themselves are this design's choice.
package lp_fsm_pkg;

  // Primary inputs, written as in the state-table labels: in[1] in[0].
  typedef logic [1:0] in_t;

  // Sub-machine F1 (partition block P1 = {st0, st1}) plus idle state s01.
  typedef enum logic [1:0] {
    F1_S01 = 2'd0,
    F1_ST0 = 2'd1,
    F1_ST1 = 2'd2
  } f1_state_e;

  // Sub-machine F2 (partition block P2 = {st2, st3}) plus idle state s02.
  typedef enum logic [1:0] {
    F2_S02 = 2'd0,
    F2_ST2 = 2'd1,
    F2_ST3 = 2'd2
  } f2_state_e;

  // The cross-partition edge st1 -> st2 and st3 -> st0 are taken on input 00.
  function automatic logic is_exit_input(in_t in_bits);
    return in_bits == 2'b00;
  endfunction

endpackage
