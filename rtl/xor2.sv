// xor2: two-input XOR gate of the LFSR feedback path.
//
// In the transistor-level design this is a speed-optimised static CMOS XOR
// cell from a standard-cell library; only its logic function matters at the
// RTL level, so the module is the Boolean function out = a xor b. It is kept
// as a separate cell so that the feedback network's XOR count can be seen in
// the netlist. Purely combinational, no timing of its own.
module xor2 (
  input  logic a,
  input  logic b,
  output logic out
);
  assign out = a ^ b;
endmodule
