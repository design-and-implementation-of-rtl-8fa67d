// tb_pe16 -- exhaustive check of the 16-bit priority encoder: all 65536
// input patterns against the index of the highest set bit from a scan loop.
module tb_pe16;
  int checks = 0, failures = 0;
  logic [15:0] d;
  logic [3:0]  q, exp;

  pe16 dut (.d(d), .q(q));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 65536; n++) begin
      d = 16'(n);
      exp = '0;
      for (int k = 0; k < 16; k++) if (d[k]) exp = 4'(k);
      #1;
      checks++;
      if (q !== exp) begin failures++; $display("FAIL d=%h q=%0d expected %0d", d, q, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
