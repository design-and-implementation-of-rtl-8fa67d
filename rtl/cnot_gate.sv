// cnot_gate -- 2x2 reversible CNOT (Feynman) gate.
//
// The control passes through (P = A) and the target is inverted when the
// control is 1 (Q = A xor B). With B tied to 0 the gate makes a copy of A,
// which is the reversible way to fan a signal out; with B carrying a running
// value it accumulates A into it by XOR.
//
// Interface: a, b in; p, q out. Purely combinational, no clock.
// The gate is used by name in the BCD priority encoder; its equations are the
// standard CNOT definition.
module cnot_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  always_comb begin
    p = a;
    q = a ^ b;
  end
endmodule
