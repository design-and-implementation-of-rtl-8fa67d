// tb_toffoli_gate -- exhaustive check of the Toffoli gate.
// All eight input patterns are applied; P, Q and R are compared with
// P = A, Q = B, R = A.B xor C worked out here. A second gate fed with the
// first one's outputs must give back the original inputs (the gate is its
// own inverse), and the eight output patterns must all be different
// (the mapping is reversible). A watchdog ends a hung run.
module tb_toffoli_gate;
  int checks = 0, failures = 0;
  logic a, b, c, p, q, r, p2, q2, r2;
  logic [7:0] seen;

  toffoli_gate dut  (.a(a),  .b(b),  .c(c),  .p(p),  .q(q),  .r(r));
  toffoli_gate back (.a(p),  .b(q),  .c(r),  .p(p2), .q(q2), .r(r2));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: a=%0b b=%0b c=%0b -> p=%0b q=%0b r=%0b", what, a, b, c, p, q, r);
    end
  endtask

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int n = 0; n < 8; n++) begin
      {a, b, c} = 3'(n);
      #1;
      check(p == a, "P = A");
      check(q == b, "Q = B");
      check(r == ((n == 6 || n == 7) ? ~c : c), "R = A.B xor C");
      check({p2, q2, r2} == 3'(n), "self-inverse");
      seen[{p, q, r}] = 1'b1;
    end
    checks++;
    if (seen != 8'hFF) begin
      failures++;
      $display("FAIL output patterns not a permutation: %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
