// d2be -- decimal-to-BCD encoder (10 input lines, 4 output lines).
//
// Exactly one of the ten decimal lines D0..D9 is expected to be active; the
// outputs give its value in 8421 BCD:
//   A (weight 8) = D8 + D9
//   B (weight 4) = D4 + D5 + D6 + D7
//   C (weight 2) = D2 + D3 + D6 + D7
//   D (weight 1) = D1 + D3 + D5 + D7 + D9
// These are the published output equations, built here with ordinary OR
// logic. D0 does not appear in any of them (its code is 0000), so it is
// unused. With several lines active the outputs are the OR of their codes;
// that is not a priority encoder (see bcd_pri_enc for that).
//
// Interface: d[9:0] in, bcd[3:0] = {A, B, C, D} out. Combinational.
module d2be (
  input  logic [9:0] d,
  output logic [3:0] bcd
);
  always_comb begin
    bcd[3] = d[8] | d[9];
    bcd[2] = d[4] | d[5] | d[6] | d[7];
    bcd[1] = d[2] | d[3] | d[6] | d[7];
    bcd[0] = d[1] | d[3] | d[5] | d[7] | d[9];
  end
endmodule
