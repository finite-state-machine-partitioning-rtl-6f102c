// Self-checking testbench for clock_gate.
// A 10-time-unit clock runs; fa is changed at random times in both clock
// phases. The enable that counts for a rising edge is the value fa had while
// the clock was last low, which this bench records itself. Checked: every
// rising clock edge produces a gated edge exactly when that recorded enable
// is 1, the gated clock is never high while clk is low, it never rises
// except on a rising clk edge, and changes of fa in the high phase do not
// reach the gated clock.
module tb_clock_gate;
  int checks = 0, failures = 0;

  logic clk = 1'b0;
  logic fa  = 1'b1;
  logic gclk, en_q;

  clock_gate dut (.clk(clk), .fa(fa), .gclk(gclk), .en_q(en_q));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Enable as seen by an ideal transparent-low latch.
  logic exp_en = 1'b0;
  always @(fa or clk) if (!clk) exp_en = ~fa;

  int gated_edges = 0, passed_edges = 0;
  realtime last_clk_rise = -1.0;

  always @(posedge clk) begin
    last_clk_rise = $realtime;
    #1;
    checks++;
    if (gclk !== exp_en) begin
      failures++;
      $display("%0t: gclk=%b after rising clk, expected %b", $time, gclk, exp_en);
    end
    if (exp_en) passed_edges++; else gated_edges++;
  end

  always @(posedge gclk) begin
    checks++;
    if ($realtime != last_clk_rise || !clk) begin
      failures++;
      $display("%0t: gclk rose away from a rising clk edge", $time);
    end
  end

  always @(negedge clk) begin
    #0;
    checks++;
    if (gclk !== 1'b0) begin
      failures++;
      $display("%0t: gclk high while clk low", $time);
    end
  end

  initial begin
    repeat (400) begin
      // change fa strictly inside a clock phase, never on an edge
      @(clk);
      #($urandom_range(1, 4));
      fa = 1'($urandom);
    end
    if (gated_edges == 0 || passed_edges == 0) begin
      failures++;
      $display("enable never exercised both ways");
    end
    $display("passed edges %0d, gated edges %0d", passed_edges, gated_edges);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
