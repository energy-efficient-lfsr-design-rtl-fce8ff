// lfsr_feedback: reduced-XOR feedback network of the gated-clock LFSR.
//
// A Fibonacci LFSR with polynomial x^N + ... + c_1 x + 1 needs the feedback
// bit x^N = XOR of every tapped stage x^j (c_j = 1). A conventional chain
// needs n_t = (number of taps) - 1 two-input XORs. Here the clock gate of
// stage i already computes the binomial x^(i+1) xor x^i (i = 0 .. N-2), so a
// couple of adjacent taps (i+1, i) costs no XOR of its own: the network
// takes that binomial as one term. A tap not in a couple enters as the stage
// output x^i. The chain therefore has n_t'' = n_t - m_c XORs, m_c being the
// number of couples (each tap in at most one couple). Couples are chosen at
// elaboration (lfsr_pkg), lowest taps first; the XORs form a linear chain
// from the lowest term upward, as in a conventional Fibonacci feedback.
//
// Example, x^7 + x^3 + x^2 + x + 1: couples (3,2) and (1,0), feedback =
// binom[2] xor binom[0], one XOR instead of three.
//
// Interface: q is the register state (bit j = x^j), binom[i] = q[i+1] xor
// q[i] from the clock gates, fb is x^N. Purely combinational.
module lfsr_feedback
  import lfsr_pkg::*;
#(
  parameter int unsigned     N    = 7,
  parameter logic [N-1:0]    TAPS = 7'b0001111
) (
  input  logic [N-1:0] q,
  input  logic [N-2:0] binom,
  output logic         fb
);
  localparam tapvec_t TAPV   = tapvec_t'(TAPS);
  localparam tapvec_t COUPLE = couple_low_mask(N, TAPV);
  localparam tapvec_t SINGLE = single_mask(N, TAPV);

  // Number of XOR cells actually instantiated (n_t'').
  localparam int unsigned N_XOR = xor_count_reduced(N, TAPV);

  // True when some term sits at a position below j.
  function automatic bit has_term_below(int unsigned j);
    for (int unsigned k = 0; k < j; k++)
      if (COUPLE[k] || SINGLE[k]) return 1'b1;
    return 1'b0;
  endfunction

  // acc[j] is the XOR of all terms at positions below j.
  logic [N:0] acc;
  assign acc[0] = 1'b0;

  for (genvar j = 0; j < N; j++) begin : g_pos
    if (COUPLE[j] || SINGLE[j]) begin : g_term
      logic term;
      if (COUPLE[j]) begin : g_binom
        assign term = binom[j];
      end else begin : g_single
        assign term = q[j];
      end
      if (has_term_below(j)) begin : g_xor
        xor2 u_xor (.a(acc[j]), .b(term), .out(acc[j+1]));
      end else begin : g_first
        assign acc[j+1] = term;
      end
    end else begin : g_none
      assign acc[j+1] = acc[j];
    end
  end

  assign fb = acc[N];

  initial begin
    assert (TAPS[0] == 1'b1)
      else $error("lfsr_feedback: constant term of the polynomial must be 1");
    assert (N >= 2 && N <= MAX_N)
      else $error("lfsr_feedback: N out of range");
  end
endmodule
