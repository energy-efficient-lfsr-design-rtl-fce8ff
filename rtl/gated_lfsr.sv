// gated_lfsr: N-stage Fibonacci LFSR with a gated clock on every flip-flop
// and a reduced-XOR feedback network.
//
// Stage i holds x^i; on each rising edge of clk it takes the value of stage
// i+1, and the top stage N-1 takes the feedback x^N = XOR of the tapped
// stages. Stage 0 drives the serial output. Instead of clocking every
// flip-flop on every cycle, each flip-flop's clock goes through its own
// XORAND clock gate (xorand_clock_gate), fed with the stage's D and Q in
// both polarities: the flip-flop gets a rising edge only when D differs
// from Q, i.e. only when it would change. In a pseudo-random sequence about
// half of all flip-flop clock pulses are thus suppressed, with the same
// sequence as an ungated LFSR. The XOR outputs of the gates of stages
// 0 .. N-2 are the binomials x^(i+1) xor x^i, which lfsr_feedback reuses to
// save one feedback XOR per couple of adjacent taps.
//
// Following the document: the per-stage XORAND gating, the master-slave
// flip-flops with complementary outputs, the Fibonacci structure with taps
// c_1 .. c_{N-1}, the XOR reduction n_t'' = n_t - m_c, and the default
// polynomial x^7 + x^3 + x^2 + x + 1. This design's own choices: the
// asynchronous active-low reset that loads SEED (needed to leave the all-zero
// state, which the gating would otherwise hold forever), the default SEED,
// and the gated clock resting high while a stage is disabled.
//
// Interface: clk, rst_n in; out = stage 0; state = all stages (bit i = x^i);
// clk_en[i] = 1 when stage i will be clocked at the next rising edge.
// Timing: one shift per clk cycle, the output changes right after a rising
// edge; period 2^N - 1 cycles for a primitive polynomial.
module gated_lfsr
#(
  parameter int unsigned  N    = 7,
  parameter logic [N-1:0] TAPS = 7'b0001111,
  parameter logic [N-1:0] SEED = 7'b0000001
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic         out,
  output logic [N-1:0] state,
  output logic [N-1:0] clk_en
);
  logic [N-1:0] q, q_n;     // stage outputs, both polarities
  logic [N-1:0] d, d_n;     // stage inputs, both polarities
  logic [N-1:0] x_n;        // gate XNOR outputs; the XOR polarity alone drives the rest
  logic [N-1:0] gclk;       // gated clocks
  logic         fb;

  // Stage i is fed by stage i+1; the top stage by the feedback.
  assign d   = {fb, q[N-1:1]};
  assign d_n = {~fb, q_n[N-1:1]};

  for (genvar i = 0; i < N; i++) begin : g_stage
    xorand_clock_gate u_gate (
      .clk       (clk),
      .a         (d[i]),
      .a_n       (d_n[i]),
      .b         (q[i]),
      .b_n       (q_n[i]),
      .x         (clk_en[i]),
      .x_n       (x_n[i]),
      .clk_gated (gclk[i])
    );
    ms_dff #(.INIT(SEED[i])) u_ff (
      .ck    (gclk[i]),
      .rst_n (rst_n),
      .d     (d[i]),
      .q     (q[i]),
      .q_n   (q_n[i])
    );
  end

  lfsr_feedback #(.N(N), .TAPS(TAPS)) u_fb (
    .q     (q),
    .binom (clk_en[N-2:0]),
    .fb    (fb)
  );

  assign out   = q[0];
  assign state = q;

  initial begin
    assert (SEED != '0)
      else $error("gated_lfsr: an all-zero SEED locks the LFSR");
  end
endmodule
