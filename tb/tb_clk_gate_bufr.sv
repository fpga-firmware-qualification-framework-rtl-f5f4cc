// Testbench for clk_gate_bufr: a counter on the gated clock counts exactly
// the cycles in which the enable was high at the rising edge before, the
// gated clock stays high while stopped, and no short pulse appears when the
// enable changes right after a rising edge or while the clock is low.
module tb_clk_gate_bufr;
  logic clk = 0, ce = 1, gclk;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  clk_gate_bufr dut (.clk_i(clk), .ce, .clk_o(gclk));

  int gated_edges = 0, expected = 0;
  always @(posedge gclk) gated_edges++;

  // a low phase of the gated clock shorter than half a period is a glitch
  realtime t_fall = 0;
  int glitches = 0;
  always @(negedge gclk) t_fall = $realtime;
  always @(posedge gclk) if (t_fall > 0 && $realtime - t_fall < 4.5) glitches++;

  // ce changes just after a rising edge, as a register on clk would change
  // it: the following low phase must then already be held high when ce is
  // low, and the next rising edge must reach the gated clock only when ce
  // is high
  initial begin
    bit x;
    @(posedge clk); #1;
    gated_edges = 0;
    for (int i = 0; i < 300; i++) begin
      x = ($urandom_range(0, 2) != 0);
      ce = x;
      #6;                               // low phase of clk
      checks++;
      if (gclk !== !x) begin failures++; $display("FAIL gated clock %b with ce %b", gclk, x); end
      if (x) expected++;
      @(posedge clk); #1;
    end
    // ce changing in the low phase, as an unsynchronised request would:
    // the latch is closed then, so the gated clock must not move until the
    // clock rises again
    for (int i = 0; i < 200; i++) begin
      x = ($urandom_range(0, 2) != 0);
      ce = x;
      #6;
      ce = ($urandom_range(0, 1) != 0);
      #2;
      checks++;
      if (gclk !== !x) begin failures++; $display("FAIL low-phase change reached the gated clock"); end
      if (x) expected++;
      @(posedge clk); #1;
    end
    checks++;
    if (gated_edges != expected) begin
      failures++;
      $display("FAIL %0d gated edges, expected %0d", gated_edges, expected);
    end
    checks++;
    if (glitches != 0) begin failures++; $display("FAIL %0d glitches", glitches); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
