// Low-power partitioned FSM: the gated-clock network of interacting
// sub-machines for the four-state example machine.
//
// The original machine (st0..st3, inputs in[1:0], one output) is split into
// F1 = {st0, st1} and F2 = {st2, st3}. At any time exactly one sub-machine
// is active; the other sits in its idle state with its clock stopped, so
// neither its flip-flops nor its logic toggle. When the active machine takes
// an edge that leaves its partition it falls back to idle and asserts a go
// signal; the go keeps the other machine's clock running (its activation
// function drops to 0), so on the same rising edge the second machine leaves
// idle and enters the destination state. In that one hand-over cycle both
// local clocks tick; otherwise only one does.
//
//   CLK -> clock_gate(Fa1) -> clk1 -> sub_fsm1 --go_st1_st2--> sub_fsm2, Fa2
//   CLK -> clock_gate(Fa2) -> clk2 -> sub_fsm2 --go_st3_st0--> sub_fsm1, Fa1
//   out = out1 | out2
//
// The primary output equals that of the undecomposed machine in every cycle.
// Interface: clk, rst (asynchronous, active high; F1 starts in st0, F2
// idle), in_bits, out. go_*, in_res and clk_en are observation outputs added
// by this design. Inputs are sampled on the rising edge of clk; out is
// combinational from the state and the inputs (Mealy).
//
// rst is both the asynchronous reset of the sub-machines and the disable
// condition of the two assertions below; lint may note that double use.
module lp_fsm_top
  import lp_fsm_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  in_t        in_bits,
  output logic       out,
  output logic       go_st1_st2,  // F1 -> F2 hand-over
  output logic       go_st3_st0,  // F2 -> F1 hand-over
  output logic [1:0] in_res,      // {in_res2, in_res1}
  output logic [1:0] clk_en       // latched clock enables {F2, F1}
);

  logic       fa1, fa2;
  logic       clk1, clk2;
  logic [1:0] outs;

  activation_fn #(.N_GO(1)) u_fa1 (
    .in_reset(in_res[0]), .go(go_st3_st0), .fa(fa1)
  );
  activation_fn #(.N_GO(1)) u_fa2 (
    .in_reset(in_res[1]), .go(go_st1_st2), .fa(fa2)
  );

  clock_gate u_cg1 (.clk(clk), .fa(fa1), .gclk(clk1), .en_q(clk_en[0]));
  clock_gate u_cg2 (.clk(clk), .fa(fa2), .gclk(clk2), .en_q(clk_en[1]));

  sub_fsm1 u_f1 (
    .clk(clk1), .rst(rst), .in_bits(in_bits), .go_in(go_st3_st0),
    .out(outs[0]), .go_out(go_st1_st2), .in_res(in_res[0])
  );
  sub_fsm2 u_f2 (
    .clk(clk2), .rst(rst), .in_bits(in_bits), .go_in(go_st1_st2),
    .out(outs[1]), .go_out(go_st3_st0), .in_res(in_res[1])
  );

  out_or #(.N_SUB(2), .W(1)) u_or (.outs(outs), .out(out));

  // Exactly one sub-machine is out of its idle state at every clock edge.
  a_one_active: assert property (@(posedge clk) disable iff (rst)
    in_res[0] ^ in_res[1]);

  // A go is only raised by the machine that is active.
  a_go_from_active: assert property (@(posedge clk) disable iff (rst)
    (go_st1_st2 |-> !in_res[0]) and (go_st3_st0 |-> !in_res[1]));

endmodule
