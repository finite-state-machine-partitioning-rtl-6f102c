// Self-checking testbench for out_or.
// Exhaustive for the default two one-bit outputs, random for a 3 x 4-bit
// instance; the expected word is written out as an explicit OR here.
module tb_out_or;
  int checks = 0, failures = 0;

  logic [1:0][0:0] o2;
  logic [0:0]      y2;
  logic [2:0][3:0] o3;
  logic [3:0]      y3;

  out_or                         dut2 (.outs(o2), .out(y2));
  out_or #(.N_SUB(3), .W(4))     dut3 (.outs(o3), .out(y3));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      o2 = v[1:0];
      #1;
      checks++;
      if (y2 !== (o2[0] | o2[1])) begin
        failures++;
        $display("outs=%b: out=%b", o2, y2);
      end
    end
    for (int n = 0; n < 200; n++) begin
      o3 = 12'($urandom);
      #1;
      checks++;
      if (y3 !== (o3[0] | o3[1] | o3[2])) begin
        failures++;
        $display("outs=%h: out=%h", o3, y3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
