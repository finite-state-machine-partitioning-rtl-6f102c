// Sub-machine F2 of the partitioned FSM: partition block P2 = {st2, st3}.
//
// F2 replicates every edge of the original machine whose source and
// destination lie in P2, and adds an idle state s02. The original edge
// st3 --00/1--> st0 leaves P2: here it becomes st3 --00/1--> s02 and asserts
// go_out (go_st3,st0) in the same cycle, handing control to F1. In s02 the
// machine outputs 0 and waits for go_in (go_st1,st2) from F1, then enters st2
// with output 0.
//
// Edges inside P2, from the original state table:
//   st2 : --        -> st3, out 0
//   st3 : 1- or -1  -> st2, out 0
//         00        -> s02, out 1, go_out = 1
//
// Outputs are Mealy. The state register is clocked by the local gated clock
// clk2. rst is asynchronous and active high and puts F2 in its idle state
// s02, since the assumed initial state st0 belongs to F1; go_in is only looked
// at in s02.
module sub_fsm2
  import lp_fsm_pkg::*;
(
  input  logic clk,      // gated local clock clk2
  input  logic rst,      // RESET, asynchronous, active high
  input  in_t  in_bits,  // primary inputs
  input  logic go_in,    // go_st1,st2 from F1
  output logic out,      // output contribution (0 while idle)
  output logic go_out,   // go_st3,st0 to F1
  output logic in_res    // in_res2: 1 while in idle state s02
);

  f2_state_e state, state_nx;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) state <= F2_S02;
    else     state <= state_nx;
  end

  always_comb begin
    state_nx = state;
    out      = 1'b0;
    go_out   = 1'b0;
    unique case (state)
      F2_S02: begin
        if (go_in) state_nx = F2_ST2;
      end
      F2_ST2: begin
        state_nx = F2_ST3;
      end
      F2_ST3: begin
        if (is_exit_input(in_bits)) begin
          state_nx = F2_S02;
          out      = 1'b1;
          go_out   = 1'b1;
        end else begin
          state_nx = F2_ST2;
        end
      end
      default: state_nx = F2_S02;
    endcase
  end

  assign in_res = (state == F2_S02);

endmodule
