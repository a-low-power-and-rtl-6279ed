// tb_clock_gate: checks that gated clock pulses appear exactly in the cycles
// whose enable was high before the rising edge, and that an enable change
// while the clock is high neither starts nor cuts a pulse.
module tb_clock_gate;
  logic clk = 1'b0, en = 1'b0, gclk;
  int checks = 0, failures = 0;
  int gedges = 0;

  clock_gate dut (.clk(clk), .en(en), .gclk(gclk));

  always #5 clk = ~clk;
  always @(posedge gclk) gedges++;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] pattern = 32'hB5A3_0F61;
    int expected = 0;
    // Enable set in the low phase: one gated edge per enabled cycle.
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      en = pattern[i];
      if (pattern[i]) expected++;
      @(posedge clk); #1;
      check(gclk == pattern[i], $sformatf("gclk level in cycle %0d", i));
      check(gedges == expected, $sformatf("gated edge count in cycle %0d", i));
    end
    // Enable rising during the high phase must not start a pulse.
    @(negedge clk); en = 1'b0;
    @(posedge clk); #2; en = 1'b1; #1;
    check(gclk == 1'b0, "no pulse from enable rising while clk high");
    // Enable falling during the high phase must not cut a pulse.
    @(negedge clk); en = 1'b1;
    @(posedge clk); #1; en = 1'b0; #1;
    check(gclk == 1'b1, "pulse kept when enable falls while clk high");
    @(negedge clk); #1;
    check(gclk == 1'b0, "gclk low in low phase");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
