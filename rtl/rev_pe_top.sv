// rev_pe_top -- the encoder library side by side.
//
// The encoders are independent circuits; this top simply places them next
// to each other, each with its own ports, so that the whole library can be
// built and checked together:
//   pe4_*   reversible 4:2 priority encoder (three Toffoli gates)
//   bcd_*   reversible 8-to-3 BCD priority encoder (Toffoli + CNOT gates)
//   d2be_*  decimal-to-BCD encoder
//   pe8_*   8-bit priority encoder
//   pe16_*  16-bit priority encoder
//   pe64_*  M x N two-level priority encoder, L = 64 by default
// All paths are combinational; there is no clock or reset.
module rev_pe_top #(
  parameter int M = 8,
  parameter int N = 8
) (
  input  logic [3:0]             pe4_i,
  output logic [1:0]             pe4_y,
  input  logic [7:0]             bcd_i,
  output logic [2:0]             bcd_y,
  input  logic [9:0]             d2be_d,
  output logic [3:0]             d2be_bcd,
  input  logic [7:0]             pe8_d,
  output logic [2:0]             pe8_q,
  input  logic [15:0]            pe16_d,
  output logic [3:0]             pe16_q,
  input  logic [M*N-1:0]         pe64_d,
  output logic [$clog2(M*N)-1:0] pe64_q,
  output logic                   pe64_v
);
  pri_enc     u_pe4  (.i(pe4_i),  .y(pe4_y));
  bcd_pri_enc u_bcd  (.i(bcd_i),  .y(bcd_y));
  d2be        u_d2be (.d(d2be_d), .bcd(d2be_bcd));
  pe8         u_pe8  (.d(pe8_d),  .q(pe8_q));
  pe16        u_pe16 (.d(pe16_d), .q(pe16_q));
  pe2d #(.M(M), .N(N)) u_pe64 (.d(pe64_d), .q(pe64_q), .v(pe64_v));
endmodule
