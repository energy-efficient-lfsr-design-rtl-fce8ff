// xorand_clock_gate: per-flip-flop clock gate of the gated-clock LFSR
// ("XORAND").
//
// A flip-flop needs a clock edge only when its next value differs from its
// present one, that is when D xor Q = 1. The gate has two parts:
//   * a complementary pass-transistor (CPL) XOR/XNOR: with B on, A (resp.
//     A_n) is passed to the XNOR (resp. XOR) node, with B_n on, A_n (resp.
//     A); it takes both polarities of both inputs, which the flip-flops
//     already provide, and produces both polarities of the result;
//   * a transmission gate that passes CLK to CLK_GATED while A xor B = 1.
// The XOR output (the binomial x^(i+1) xor x^i when A is the stage's D and B
// its Q) is brought out so the feedback network can reuse it.
//
// While the transmission gate is off the gated clock is held high. That is
// this design's choice: the transmission gate alone leaves the node floating
// at its last value, which is high because the enable only changes right
// after a rising clock edge. Holding it high means that an enable which rises
// while CLK is high cannot make a false rising edge; the enable must be
// stable while CLK is low, which is the case when A and B come from
// flip-flops clocked by rising edges of the same CLK.
//
// Timing: combinational; clk_gated follows clk while x = 1, else stays 1.
module xorand_clock_gate (
  input  logic clk,
  input  logic a,
  input  logic a_n,
  input  logic b,
  input  logic b_n,
  output logic x,        // a xor b
  output logic x_n,      // a xnor b
  output logic clk_gated
);
  // CPL section: each output is a two-way pass selected by b / b_n.
  assign x_n = (b & a)   | (b_n & a_n);
  assign x   = (b & a_n) | (b_n & a);

  // Transmission-gate section: pass clk while x = 1, hold high otherwise.
  assign clk_gated = x ? clk : 1'b1;
endmodule
