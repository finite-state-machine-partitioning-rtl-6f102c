// Self-checking testbench for sub_fsm1 (partition block {st0, st1}).
// The sub-machine is clocked directly (as if its clock were never gated).
// Random primary inputs and random go_in (go_st3,st0) are applied; a model
// of the sub-machine written here from its edge list predicts out, go_out
// and in_res in every cycle and the next state on every edge. Inputs 00
// are made frequent so that the hand-over edge st1 -> idle is taken often.
module tb_sub_fsm1;
  import lp_fsm_pkg::*;

  int checks = 0, failures = 0;

  logic clk = 1'b0;
  logic rst = 1'b0;
  in_t  in_bits = '0;
  logic go_in = 1'b0;
  logic out, go_out, in_res;

  sub_fsm1 dut (.clk(clk), .rst(rst), .in_bits(in_bits), .go_in(go_in),
                .out(out), .go_out(go_out), .in_res(in_res));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Model state: 0 = idle s01, 1 = st0, 2 = st1.
  int ms;
  int n_handover = 0, n_wake = 0, n_wait = 0;

  task automatic predict(input int s, input in_t i, input logic g,
                         output int ns, output logic o, output logic go);
    ns = s; o = 0; go = 0;
    case (s)
      0: if (g) ns = 1;
      1: begin ns = 2; o = 1; end
      2: begin
        if (i == 2'b00)      begin ns = 0; o = 1; go = 1; end
        else if (i[0] == 1)  begin ns = 1; o = 1; end
        else                 begin ns = 1; o = 0; end
      end
      default: ;
    endcase
  endtask

  initial begin
    int   ns;
    logic eo, ego;
    #1 rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    ms = 1;
    for (int n = 0; n < 2000; n++) begin
      in_bits = ($urandom_range(0, 2) == 0) ? 2'b00 : 2'($urandom);
      go_in   = ($urandom_range(0, 3) == 0);
      #2;
      predict(ms, in_bits, go_in, ns, eo, ego);
      checks++;
      if (out !== eo || go_out !== ego || in_res !== (ms == 0)) begin
        failures++;
        $display("%0t: state %0d in %b go %b: out=%b go_out=%b in_res=%b, expected %b %b %b",
                 $time, ms, in_bits, go_in, out, go_out, in_res, eo, ego, ms == 0);
      end
      if (ms == 2 && ns == 0) n_handover++;
      if (ms == 0 && ns == 1) n_wake++;
      if (ms == 0 && ns == 0) n_wait++;
      @(posedge clk);
      ms = ns;
      @(negedge clk);
    end
    // asynchronous reset from the idle state returns to st0
    @(negedge clk);
    rst = 1'b1; #1;
    checks++;
    if (in_res !== 1'b0 || dut.state != F1_ST0) begin
      failures++;
      $display("reset does not enter st0");
    end
    rst = 1'b0;
    checks++;
    if (n_handover == 0 || n_wake == 0 || n_wait == 0) begin
      failures++;
      $display("not every edge kind was taken");
    end
    $display("hand-overs %0d, wake-ups %0d, idle cycles %0d", n_handover, n_wake, n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
