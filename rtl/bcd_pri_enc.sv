// bcd_pri_enc -- reversible 8-to-3 BCD priority encoder (Toffoli + CNOT).
//
// Function: y = {C, B, A} is the 3-bit code of the highest active input,
// I7 having the highest priority and I0 the lowest. An active input masks
// every input below it (I7 = 1 with I4 = 1 gives 111, as if only I7 were
// set). With only I0 set, or nothing set, the code is 000.
//
// Structure. Only reversible gates are used: Toffoli gates, CNOT gates and
// NOT gates; no irreversible AND/OR gate appears.
//   1. NOT gates form n_k = not I_k for k = 7..2.
//   2. A chain of five Toffoli gates with constant-0 targets builds the
//      "nothing above" flags h_k = not I7 . ... . not I_k, for k = 6..2
//      (h7 is simply n7).
//   3. The one-hot term e_k = I_k . h_(k+1) says that I_k is the highest
//      active input. Because at most one term is 1, an OR of terms equals
//      their XOR, and a Toffoli gate TG(I_k, h_(k+1), acc) adds e_k into a
//      running output by XOR. Each output starts from a CNOT gate that
//      copies I7 (e7 = I7) into a constant-0 line, then three Toffoli gates
//      add the remaining terms of that output:
//        C = e7 ^ e6 ^ e5 ^ e4
//        B = e7 ^ e6 ^ e3 ^ e2
//        A = e7 ^ e5 ^ e3 ^ e1
// Total: 14 Toffoli gates, 3 CNOT gates, 6 NOT gates. The published design
// quotes 15 Toffoli and 5 CNOT gates (quantum cost 80) but does not show
// their wiring; this netlist is this library's own and realises the same
// truth table with slightly fewer gates. The P/Q outputs of the gates are
// the garbage outputs and are left unused; the flags h_k and inputs fan out
// to several gates, as wires do in the published 4:2 schematic.
//
// Interface: i[7:0] in, y[2:0] = {C, B, A} out. Combinational, no clock.
module bcd_pri_enc (
  input  logic [7:0] i,
  output logic [2:0] y
);
  logic [7:2] n;          // n[k] = not I_k
  logic [7:2] h;          // h[k] = no input among I7..I_k is active
  logic [4:0] gh_p, gh_q; // garbage of the flag chain

  assign n = ~i[7:2];
  assign h[7] = n[7];

  for (genvar k = 6; k >= 2; k--) begin : g_flag
    toffoli_gate u_tg (.a(h[k+1]), .b(n[k]), .c(1'b0),
                       .p(gh_p[k-2]), .q(gh_q[k-2]), .r(h[k]));
  end

  // Running XOR values of the three outputs; index 0 is the CNOT copy of I7.
  logic [3:0] acc_c, acc_b, acc_a;
  logic       gc_p, gb_p, ga_p;       // CNOT garbage (copies of I7)
  logic [2:0] gtc_p, gtc_q, gtb_p, gtb_q, gta_p, gta_q;

  cnot_gate u_cn_c (.a(i[7]), .b(1'b0), .p(gc_p), .q(acc_c[0]));
  cnot_gate u_cn_b (.a(i[7]), .b(1'b0), .p(gb_p), .q(acc_b[0]));
  cnot_gate u_cn_a (.a(i[7]), .b(1'b0), .p(ga_p), .q(acc_a[0]));

  // C: e6, e5, e4
  toffoli_gate u_c6 (.a(i[6]), .b(h[7]), .c(acc_c[0]), .p(gtc_p[0]), .q(gtc_q[0]), .r(acc_c[1]));
  toffoli_gate u_c5 (.a(i[5]), .b(h[6]), .c(acc_c[1]), .p(gtc_p[1]), .q(gtc_q[1]), .r(acc_c[2]));
  toffoli_gate u_c4 (.a(i[4]), .b(h[5]), .c(acc_c[2]), .p(gtc_p[2]), .q(gtc_q[2]), .r(acc_c[3]));
  // B: e6, e3, e2
  toffoli_gate u_b6 (.a(i[6]), .b(h[7]), .c(acc_b[0]), .p(gtb_p[0]), .q(gtb_q[0]), .r(acc_b[1]));
  toffoli_gate u_b3 (.a(i[3]), .b(h[4]), .c(acc_b[1]), .p(gtb_p[1]), .q(gtb_q[1]), .r(acc_b[2]));
  toffoli_gate u_b2 (.a(i[2]), .b(h[3]), .c(acc_b[2]), .p(gtb_p[2]), .q(gtb_q[2]), .r(acc_b[3]));
  // A: e5, e3, e1
  toffoli_gate u_a5 (.a(i[5]), .b(h[6]), .c(acc_a[0]), .p(gta_p[0]), .q(gta_q[0]), .r(acc_a[1]));
  toffoli_gate u_a3 (.a(i[3]), .b(h[4]), .c(acc_a[1]), .p(gta_p[1]), .q(gta_q[1]), .r(acc_a[2]));
  toffoli_gate u_a1 (.a(i[1]), .b(h[2]), .c(acc_a[2]), .p(gta_p[2]), .q(gta_q[2]), .r(acc_a[3]));

  assign y = {acc_c[3], acc_b[3], acc_a[3]};
endmodule
