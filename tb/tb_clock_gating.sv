// tb_clock_gating: drives a free-running clock and a random enable that
// also changes while the clock is high. Checks that gclk is low whenever
// clk is low, that during each high phase gclk equals the enable value
// present just before the rising edge, and that the number of gclk pulses
// equals the number of enabled edges.
module tb_clock_gating;
  logic clk = 0, en = 0, gclk;
  int checks = 0, failures = 0;
  int pulses = 0, enabled_edges = 0;
  logic en_at_edge;

  clock_gating dut (.clk, .en, .gclk);

  always @(posedge gclk) pulses++;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      // low phase: en may change
      en = 1'($urandom);
      #4;
      checks++;
      if (gclk !== 1'b0) begin failures++; $display("FAIL gclk high while clk low"); end
      en_at_edge = en;
      if (en_at_edge) enabled_edges++;
      #1 clk = 1;
      #2;
      checks++;
      if (gclk !== en_at_edge) begin failures++; $display("FAIL gclk=%b exp %b", gclk, en_at_edge); end
      // change en in the high phase: gclk must not follow
      en = ~en;
      #2;
      checks++;
      if (gclk !== en_at_edge) begin failures++; $display("FAIL glitch: gclk=%b exp %b", gclk, en_at_edge); end
      #1 clk = 0;
    end
    #5;
    checks++;
    if (pulses != enabled_edges) begin
      failures++;
      $display("FAIL pulses %0d enabled edges %0d", pulses, enabled_edges);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
