// tb_cnot_gate -- exhaustive check of the CNOT gate.
// All four input patterns are applied and compared with P = A and
// Q = A xor B; a second gate must undo the first. A watchdog ends a hung run.
module tb_cnot_gate;
  int checks = 0, failures = 0;
  logic a, b, p, q, p2, q2;

  cnot_gate dut  (.a(a), .b(b), .p(p),  .q(q));
  cnot_gate back (.a(p), .b(q), .p(p2), .q(q2));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4; n++) begin
      {a, b} = 2'(n);
      #1;
      checks += 3;
      if (p != a) begin failures++; $display("FAIL P: a=%0b b=%0b p=%0b", a, b, p); end
      if (q != (a != b)) begin failures++; $display("FAIL Q: a=%0b b=%0b q=%0b", a, b, q); end
      if ({p2, q2} != 2'(n)) begin failures++; $display("FAIL inverse: %0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
