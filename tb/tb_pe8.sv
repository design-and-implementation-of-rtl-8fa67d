// tb_pe8 -- exhaustive check of the 8-bit priority encoder: all 256 input
// patterns against the index of the highest set bit from a scan loop.
module tb_pe8;
  int checks = 0, failures = 0;
  logic [7:0] d;
  logic [2:0] q, exp;

  pe8 dut (.d(d), .q(q));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 256; n++) begin
      d = 8'(n);
      exp = '0;
      for (int k = 0; k < 8; k++) if (d[k]) exp = 3'(k);
      #1;
      checks++;
      if (q !== exp) begin failures++; $display("FAIL d=%b q=%0d expected %0d", d, q, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
