// ddr_register -- double-data-rate register: it takes a new value on both
// the rising and the falling clock edge, so a pipeline built from it does the
// work of an edge-triggered pipeline at half the clock frequency.
//
// How it works: two level-sensitive latches share the input d.
//   latch 1  transparent while clk = 1, drives q while clk = 0
//   latch 2  transparent while clk = 0, drives q while clk = 1
// While clk is high, latch 2 is closed and holds the value d had at the
// rising edge, and q shows it. While clk is low, latch 1 holds d from the
// falling edge and q shows that. Each latch drives q only while it is closed,
// so d never reaches q through an open latch.
//
// Interface and timing: q changes right after every clock edge to the value
// d had at that edge. d must be stable around both edges, so its setup and
// hold windows fall at both edges. There is no reset: q is undefined until
// the first edge after d becomes defined.
//
// The two-latch structure with output enables follows the document's DDR
// register for its second chip version. There, each latch has an output
// enable and goes high-impedance when disabled, and the two latch outputs
// share one wire. Here that shared wire is a 2:1 multiplexer selected by clk.
// It gives the same values without an internal tri-state net.
module ddr_register #(
  parameter int W = 14    // data width
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] q1, q2;

  // Latch 1: gate = clk, output enable = ~clk.
  always_latch
    if (clk) q1 = d;

  // Latch 2: gate = ~clk, output enable = clk.
  always_latch
    if (!clk) q2 = d;

  assign q = clk ? q2 : q1;
endmodule
