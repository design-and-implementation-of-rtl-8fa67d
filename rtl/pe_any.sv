// pe_any -- W-input priority encoder with a valid flag, used as a building
// block of the large encoder pe2d.
//
// q is the index of the highest set bit of d (bit W-1 has the highest
// priority) and v says that at least one bit is set; q is 0 when v is 0.
// For the sizes that have a dedicated encoder the dedicated one is used:
// W = 4 the reversible Toffoli encoder pri_enc, W = 8 pe8, W = 16 pe16.
// Any other width (2, 32, ...) uses a plain scan loop. W must be 2 or more.
//
// Interface: d[W-1:0] in, q[$clog2(W)-1:0] and v out. Combinational.
module pe_any #(
  parameter int W = 8
) (
  input  logic [W-1:0]         d,
  output logic [$clog2(W)-1:0] q,
  output logic                 v
);
  localparam int QW = $clog2(W);

  assign v = |d;

  if (W == 4) begin : g_pe4
    pri_enc u_pe (.i(d), .y(q));
  end else if (W == 8) begin : g_pe8
    pe8 u_pe (.d(d), .q(q));
  end else if (W == 16) begin : g_pe16
    pe16 u_pe (.d(d), .q(q));
  end else begin : g_scan
    always_comb begin
      q = '0;
      for (int k = 1; k < W; k++)
        if (d[k]) q = QW'(k);
    end
  end
endmodule
