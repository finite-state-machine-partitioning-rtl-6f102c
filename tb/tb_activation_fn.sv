// Self-checking testbench for activation_fn.
// Runs every combination of in_reset and the go vector, for the default
// single go input and for a three-input instance, and compares fa with the
// rule "halt only when idle and no go is asserted", evaluated here bit by bit.
module tb_activation_fn;
  int checks = 0, failures = 0;

  logic       r1, fa1;
  logic [0:0] g1;
  logic       r3, fa3;
  logic [2:0] g3;

  activation_fn               dut1 (.in_reset(r1), .go(g1), .fa(fa1));
  activation_fn #(.N_GO(3))   dut3 (.in_reset(r3), .go(g3), .fa(fa3));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    for (int v = 0; v < 4; v++) begin
      {r1, g1} = v[1:0];
      #1;
      exp = (r1 == 1'b1) && (g1 == 1'b0);
      checks++;
      if (fa1 !== exp) begin
        failures++;
        $display("N_GO=1 in_reset=%b go=%b: fa=%b expected %b", r1, g1, fa1, exp);
      end
    end
    for (int v = 0; v < 16; v++) begin
      {r3, g3} = v[3:0];
      #1;
      exp = r3;
      for (int b = 0; b < 3; b++) if (g3[b]) exp = 1'b0;
      checks++;
      if (fa3 !== exp) begin
        failures++;
        $display("N_GO=3 in_reset=%b go=%b: fa=%b expected %b", r3, g3, fa3, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
