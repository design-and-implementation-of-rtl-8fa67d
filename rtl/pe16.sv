// pe16 -- 16-bit priority encoder (PE16).
//
// q = {Q3..Q0} is the index of the highest set input, D15 being the highest
// priority. Q3 = D8 + ... + D15 says whether the upper byte holds a request;
// the three lower bits then come from the PE8 of whichever byte is chosen:
// the upper byte's code when Q3 = 1, the lower byte's otherwise. This is the
// nesting of the published PE16 equations, in which the lower-byte terms are
// all masked by not(D8..D15), written with two PE8 instances instead of one
// flat expression.
//
// With only D0 set, or nothing set, q is 0; there is no valid output.
//
// Interface: d[15:0] in, q[3:0] out. Combinational.
module pe16 (
  input  logic [15:0] d,
  output logic [3:0]  q
);
  logic [2:0] q_hi, q_lo;

  pe8 u_hi (.d(d[15:8]), .q(q_hi));
  pe8 u_lo (.d(d[7:0]),  .q(q_lo));

  always_comb begin
    q[3]   = |d[15:8];
    q[2:0] = q[3] ? q_hi : q_lo;
  end
endmodule
