// pe2d -- large priority encoder of L = M x N inputs, built in two levels.
//
// The L inputs are cut into M groups of N adjacent bits (group m holds bits
// m*N .. m*N+N-1). Every group has its own N-input encoder, which gives the
// index of its highest set bit and whether the group is active. An M-input
// encoder over the group-active flags picks the highest active group, and a
// multiplexer selects that group's local index. Because M and N are powers
// of two, the result is simply {group index, local index}.
//
// The sub-encoders are the library's PE4 (reversible), PE8 and PE16 when N
// or M is 4, 8 or 16, and a scan loop for other widths (2, 32). The default
// (M, N) = (8, 8) with L = 64 is one of the evaluated arrangements; (4, 16),
// (16, 4), (2, 32) and (32, 2) are the others and are set by parameters.
// The group/sub-encoder arrangement is this library's simplest reading of a
// two-dimensional encoder; no pipeline registers are inserted.
//
// Interface: d[M*N-1:0] in; q[$clog2(M*N)-1:0] index of the highest set
// bit; v = any bit set (q = 0 when v = 0). Combinational, no clock.
module pe2d #(
  parameter int M = 8,   // number of groups
  parameter int N = 8    // bits per group
) (
  input  logic [M*N-1:0]         d,
  output logic [$clog2(M*N)-1:0] q,
  output logic                   v
);
  localparam int MW = $clog2(M);
  localparam int NW = $clog2(N);

  if ((1 << MW) != M || (1 << NW) != N || M < 2 || N < 2) begin : g_bad
    $error("pe2d: M and N must be powers of two, 2 or more");
  end

  logic [M-1:0]  grp_v;
  logic [NW-1:0] grp_q [M];
  logic [MW-1:0] sel;

  for (genvar m = 0; m < M; m++) begin : g_grp
    pe_any #(.W(N)) u_grp (.d(d[m*N +: N]), .q(grp_q[m]), .v(grp_v[m]));
  end

  pe_any #(.W(M)) u_sel (.d(grp_v), .q(sel), .v(v));

  assign q = {sel, grp_q[sel]};
endmodule
