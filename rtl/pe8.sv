// pe8 -- 8-bit priority encoder (PE8).
//
// q = {Q2, Q1, Q0} is the index of the highest set input, D7 being the
// highest priority. The sum-of-products form follows the published PE8
// equations, in which each lower term is masked by the inputs above it:
//   Q0 = not D6.(not D4.not D2.D1 + not D4.D3 + D5) + D7
//   Q1 = not D5.not D4.(D2 + D3) + D6 + D7
//   Q2 = D4 + D5 + D6 + D7
// With only D0 set, or no input set, q is 000; there is no valid output
// (callers that need one OR the inputs). D0 is therefore unused.
//
// Interface: d[7:0] in, q[2:0] out. Combinational.
module pe8 (
  input  logic [7:0] d,
  output logic [2:0] q
);
  always_comb begin
    q[0] = (~d[6] & ((~d[4] & ~d[2] & d[1]) | (~d[4] & d[3]) | d[5])) | d[7];
    q[1] = (~d[5] & ~d[4] & (d[2] | d[3])) | d[6] | d[7];
    q[2] = d[4] | d[5] | d[6] | d[7];
  end
endmodule
