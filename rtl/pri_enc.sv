// pri_enc -- reversible 4:2 priority encoder from three Toffoli gates.
//
// Function (I3 has the highest priority, I0 the lowest):
//   Y1 = I2 + I3
//   Y0 = not(I2).I1 + I3
// so y is the index of the highest active request; with only I0 active, or
// with no request at all, y is 00 (the encoder has no valid output, as in
// the published schematic with four input and two output pads).
//
// Structure. The circuit uses exactly the gate inventory of the published
// schematic: three Toffoli gates CHIP1..CHIP3 and five inverters named after
// the nets they drive (s1, s2, s4, and the two outputs). OR terms are made by
// De Morgan: a Toffoli gate whose target C is a constant 0 gives the AND of
// its controls, and the inverters complement inputs and results.
//   s1 = not I2,  s2 = not I3
//   CHIP1: TG(s1, I1, 0) -> s3 = not(I2).I1
//   s4 = not s3
//   CHIP2: TG(s2, s4, 0) -> s5 = not(I3).not(not(I2).I1);   Y0 = not s5
//   CHIP3: TG(s1, s2, 0) -> s6 = not(I2).not(I3);           Y1 = not s6
// The P and Q outputs of each Toffoli gate are the garbage outputs g1..g6 of
// reversible logic; they carry copies of the controls and are left unused.
// The three constant-0 targets are the ancilla inputs.
//
// The printed schematic routes I0 into every gate; that routing does not give
// the published truth table, so the inputs of each gate here were chosen to
// realise the truth table and equations. I0 therefore feeds nothing: in a 4:2
// priority encoder without a valid output the lowest input cannot change the
// code. Linters report it as unused; that is expected.
//
// Interface: i[3:0] in, y[1:0] = {Y1, Y0} out. Combinational, no clock.
module pri_enc (
  input  logic [3:0] i,
  output logic [1:0] y
);
  logic s1, s2, s3, s4, s5, s6;
  logic g1, g2, g3, g4, g5, g6;

  assign s1 = ~i[2];
  assign s2 = ~i[3];

  toffoli_gate chip1 (.a(s1), .b(i[1]), .c(1'b0), .p(g1), .q(g2), .r(s3));

  assign s4 = ~s3;

  toffoli_gate chip2 (.a(s2), .b(s4),   .c(1'b0), .p(g3), .q(g4), .r(s5));
  toffoli_gate chip3 (.a(s1), .b(s2),   .c(1'b0), .p(g5), .q(g6), .r(s6));

  assign y[0] = ~s5;
  assign y[1] = ~s6;
endmodule
