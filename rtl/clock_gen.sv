// clock_gen: stoppable clock of one port management unit (PMU).
//
// The PMU modules are clocked only while the port is active: the clock is
// started when a transaction begins (en_i high) and stopped once the FIFO has
// been emptied and nothing is pending. Implemented as the usual glitch-free
// clock gate: en_i is captured by a latch that is transparent while clk_i is
// low, and the gated clock is clk_i AND the latched enable, so gclk_o only
// ever shows whole clock pulses. The latch is intentional; it is the gating
// cell. The source design's router is asynchronous and starts its own clock;
// gating a free-running clock is this implementation's equivalent.
module clock_gen (
  input  logic clk_i,
  input  logic en_i,
  output logic gclk_o
);
  logic en_lat;

  always_latch begin
    if (!clk_i) en_lat = en_i;
  end

  assign gclk_o = clk_i & en_lat;
endmodule
