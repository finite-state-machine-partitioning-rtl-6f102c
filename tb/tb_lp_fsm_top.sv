// End-to-end testbench for lp_fsm_top at its default configuration.
//
// The undecomposed four-state machine is modelled here directly from its
// state table (st0..st3). Random inputs, with 00 made frequent so that
// control passes between the sub-machines often, are applied for many
// cycles; in every cycle the partitioned design's output must equal the
// undecomposed machine's output (cycle-by-cycle equivalence). Also checked
// and counted per cycle:
//   - the active sub-machine is the one whose partition holds the reference
//     state (in_res),
//   - a go signal is raised exactly on the cross-partition edges,
//   - both local clocks are enabled exactly in the hand-over cycles, and one
//     clock is stopped in every other cycle,
//   - the gated clocks tick exactly as often as they were enabled.
// Every mechanism (hand-over F1->F2, hand-over F2->F1, double-clocked
// cycle, stopped clock of F1, stopped clock of F2, reset) must happen at
// least once.
module tb_lp_fsm_top;
  import lp_fsm_pkg::*;

  localparam int N_CYCLES = 20000;

  int checks = 0, failures = 0;

  logic       clk = 1'b0;
  logic       rst = 1'b0;
  in_t        in_bits = '0;
  logic       out, go12, go30;
  logic [1:0] in_res, clk_en;

  lp_fsm_top dut (.clk(clk), .rst(rst), .in_bits(in_bits), .out(out),
                  .go_st1_st2(go12), .go_st3_st0(go30), .in_res(in_res),
                  .clk_en(clk_en));

  always #5 clk = ~clk;

  initial begin
    #((N_CYCLES + 100) * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Gated clock edges of each sub-machine.
  int clk1_ticks = 0, clk2_ticks = 0;

  // Undecomposed machine: next state and output.
  function automatic void mono(input int s, input in_t i, output int ns, output logic o);
    case (s)
      0: begin ns = 1; o = 1; end                                  // st0 --/1 -> st1
      1: if (i == 2'b00) begin ns = 2; o = 1; end                  // st1 00/1 -> st2
         else begin ns = 0; o = i[0]; end                          // -1/1, 1-/0 -> st0
      2: begin ns = 3; o = 0; end                                  // st2 --/0 -> st3
      default: if (i == 2'b00) begin ns = 0; o = 1; end            // st3 00/1 -> st0
               else begin ns = 2; o = 0; end                       // 1-/0, -1/0 -> st2
    endcase
  endfunction

  int n_h12 = 0, n_h30 = 0, n_both = 0, n_f1_off = 0, n_f2_off = 0, n_reset = 0;
  int exp1 = 0, exp2 = 0;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("%0t: %s", $time, what);
    end
  endtask

  task automatic do_reset();
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    n_reset++;
  endtask

  initial begin
    int   ms, ns;
    logic eo;
    logic h12, h30;
    #1 rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    n_reset++;
    ms = 0;
    for (int n = 0; n < N_CYCLES; n++) begin
      if (n == N_CYCLES / 2) begin
        do_reset();
        ms = 0;
      end
      in_bits = ($urandom_range(0, 2) == 0) ? 2'b00 : 2'($urandom);
      #2;
      mono(ms, in_bits, ns, eo);
      h12 = (ms == 1) && (ns == 2);
      h30 = (ms == 3) && (ns == 0);
      check(out === eo, $sformatf("state st%0d in %b: out=%b expected %b", ms, in_bits, out, eo));
      check(in_res === ((ms <= 1) ? 2'b10 : 2'b01),
            $sformatf("state st%0d: in_res=%b", ms, in_res));
      check(go12 === h12 && go30 === h30,
            $sformatf("state st%0d in %b: go12=%b go30=%b", ms, in_bits, go12, go30));
      // Enables as latched for the coming rising edge (the latch is
      // transparent in this low phase).
      check(clk_en === ((h12 || h30) ? 2'b11 : ((ms <= 1) ? 2'b01 : 2'b10)),
            $sformatf("state st%0d in %b: clk_en=%b", ms, in_bits, clk_en));
      if (h12) n_h12++;
      if (h30) n_h30++;
      if (clk_en == 2'b11) n_both++;
      if (!clk_en[0]) n_f1_off++;
      if (!clk_en[1]) n_f2_off++;
      if (clk_en[0]) exp1++;
      if (clk_en[1]) exp2++;
      @(posedge clk);
      #1;
      if (dut.clk1) clk1_ticks++;
      if (dut.clk2) clk2_ticks++;
      ms = ns;
      @(negedge clk);
    end
    @(negedge clk);
    check(clk1_ticks == exp1 && clk2_ticks == exp2,
          $sformatf("gated clock ticks %0d/%0d, expected %0d/%0d", clk1_ticks, clk2_ticks, exp1, exp2));
    check(n_both == n_h12 + n_h30, "double-clocked cycles differ from hand-overs");
    check(n_h12 > 0, "hand-over F1->F2 never happened");
    check(n_h30 > 0, "hand-over F2->F1 never happened");
    check(n_both > 0, "no double-clocked cycle");
    check(n_f1_off > 0, "clock of F1 never stopped");
    check(n_f2_off > 0, "clock of F2 never stopped");
    check(n_reset == 2, "reset not applied twice");
    $display("cycles %0d: hand-overs F1->F2 %0d, F2->F1 %0d, both clocked %0d, F1 stopped %0d, F2 stopped %0d, resets %0d",
             N_CYCLES, n_h12, n_h30, n_both, n_f1_off, n_f2_off, n_reset);
    $display("local clock ticks: F1 %0d, F2 %0d of %0d", clk1_ticks, clk2_ticks, N_CYCLES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
