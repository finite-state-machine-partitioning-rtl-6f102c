// Output combiner of the partitioned FSM.
//
// Every idle sub-machine drives all-zero outputs, and exactly one
// sub-machine is active in each cycle (during a hand-over the waking one is
// still idle for output purposes), so the primary outputs are the bitwise OR
// of the sub-machine outputs. N_SUB sub-machines of W output bits each;
// combinational.
module out_or #(
  parameter int unsigned N_SUB = 2,
  parameter int unsigned W     = 1
) (
  input  logic [N_SUB-1:0][W-1:0] outs,  // one W-bit word per sub-machine
  output logic [W-1:0]            out    // primary outputs
);

  always_comb begin
    out = '0;
    for (int i = 0; i < N_SUB; i++) out |= outs[i];
  end

endmodule
