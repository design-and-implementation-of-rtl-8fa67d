// toffoli_gate -- 3x3 reversible Toffoli (controlled-controlled-NOT) gate.
//
// The two control inputs pass straight through (P = A, Q = B) and the target
// is inverted when both controls are 1 (R = A.B xor C). The mapping is a
// bijection on the eight input patterns, so no information is lost; the gate
// is its own inverse. With C tied to 0 the R output is A AND B, with C tied
// to 1 it is A NAND B, which is how the encoders in this library obtain
// AND/OR functions from reversible gates.
//
// Interface: a, b, c in; p, q, r out. Purely combinational, no clock.
// The equations and port roles follow the published gate definition, and
// the internal AND net is called s1 as in the published gate schematic
// (an AND feeding an XOR); the lower-case port names are this library's
// choice.
module toffoli_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  logic s1;

  always_comb begin
    s1 = a & b;
    p  = a;
    q  = b;
    r  = s1 ^ c;
  end
endmodule
