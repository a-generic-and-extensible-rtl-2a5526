// tb_clock_gen: checks that the gated clock follows the free clock while the
// enable is high, stays low while it is low, and never produces a shortened
// pulse when the enable changes in the middle of the high phase.
module tb_clock_gen;
  logic clk = 0, en = 0, gclk;
  int checks = 0, failures = 0;
  int pulses = 0, exp_pulses = 0;

  clock_gen dut (.clk_i(clk), .en_i(en), .gclk_o(gclk));
  always #5 clk = ~clk;
  always @(posedge gclk) pulses++;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      bit e;
      e = ($urandom_range(1) == 1);
      @(negedge clk); #1 en = e;               // change during the low phase
      if (e) exp_pulses++;
      #2;  // mid low phase
      checks++; if (gclk) begin failures++; $display("FAIL gclk high in low phase"); end
      @(posedge clk); #1;
      checks++; if (gclk !== e) begin failures++; $display("FAIL gclk=%b en=%b", gclk, e); end
      #1 en = ~e;                               // glitch on the enable in the high phase
      #1;
      checks++; if (gclk !== e) begin failures++; $display("FAIL pulse cut or glitch"); end
    end
    @(negedge clk); en = 0;
    @(posedge clk); #1;
    checks++;
    if (pulses != exp_pulses) begin failures++; $display("FAIL pulses %0d exp %0d", pulses, exp_pulses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
