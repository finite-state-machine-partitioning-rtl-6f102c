// Sub-machine F1 of the partitioned FSM: partition block P1 = {st0, st1}.
//
// F1 replicates every edge of the original machine whose source and
// destination lie in P1, and adds an idle state s01. The original edge
// st1 --00/1--> st2 leaves P1: here it becomes st1 --00/1--> s01 and asserts
// go_out (go_st1,st2) in the same cycle, handing control to F2. In s01 the
// machine outputs 0 and waits for go_in (go_st3,st0) from F2, then enters st0
// with output 0 (the original edge st3 --00/1--> st0 supplies the 1 through
// F2 in that cycle).
//
// Edges inside P1, from the original state table:
//   st0 : --  -> st1, out 1
//   st1 : -1  -> st0, out 1
//         1-  -> st0, out 0   (input 11 is covered by both cubes; the cubes
//                              are ORed, so 11 gives out 1 - a design choice)
//         00  -> s01, out 1, go_out = 1
//
// Outputs are Mealy: out, go_out and in_res depend on the present state and
// the current inputs. The state register is clocked by the local gated clock
// clk1, so it only advances while the activation function lets the clock
// through. rst is asynchronous and active high and puts F1 in st0, the
// assumed initial state of the specification; go_in is only looked at in s01.
module sub_fsm1
  import lp_fsm_pkg::*;
(
  input  logic clk,      // gated local clock clk1
  input  logic rst,      // RESET, asynchronous, active high
  input  in_t  in_bits,  // primary inputs
  input  logic go_in,    // go_st3,st0 from F2
  output logic out,      // output contribution (0 while idle)
  output logic go_out,   // go_st1,st2 to F2
  output logic in_res    // in_res1: 1 while in idle state s01
);

  f1_state_e state, state_nx;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) state <= F1_ST0;
    else     state <= state_nx;
  end

  always_comb begin
    state_nx = state;
    out      = 1'b0;
    go_out   = 1'b0;
    unique case (state)
      F1_S01: begin
        if (go_in) state_nx = F1_ST0;
      end
      F1_ST0: begin
        state_nx = F1_ST1;
        out      = 1'b1;
      end
      F1_ST1: begin
        if (is_exit_input(in_bits)) begin
          state_nx = F1_S01;
          out      = 1'b1;
          go_out   = 1'b1;
        end else begin
          state_nx = F1_ST0;
          out      = in_bits[0];
        end
      end
      default: state_nx = F1_S01;
    endcase
  end

  assign in_res = (state == F1_S01);

endmodule
