// ms_dff: master-slave positive-edge D flip-flop with true and complementary
// outputs.
//
// The cell is a master latch transparent while CK is low followed by a slave
// latch transparent while CK is high, so D is captured on the rising edge of
// CK. It drives both Q and Q_n; the complementary pair is what the
// pass-transistor XOR/XNOR of the clock gate needs, so no extra inverters
// are required. The RTL is the edge-triggered behaviour of that cell.
//
// The asynchronous active-low reset, which loads INIT, is this design's own
// addition: an LFSR needs a non-zero starting state and the cell as
// described has no reset.
//
// Timing: q and q_n change right after a rising edge of ck, or immediately
// when rst_n falls.
module ms_dff #(
  parameter bit INIT = 1'b0
) (
  input  logic ck,
  input  logic rst_n,
  input  logic d,
  output logic q,
  output logic q_n
);
  always_ff @(posedge ck or negedge rst_n) begin
    if (!rst_n) q <= INIT;
    else        q <= d;
  end
  assign q_n = ~q;
endmodule
