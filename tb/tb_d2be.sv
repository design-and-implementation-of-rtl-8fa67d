// tb_d2be -- check of the decimal-to-BCD encoder.
// Each decimal line 0..9 is raised alone and the output must be its 4-bit
// BCD code. Random patterns with several lines raised must give the OR of
// the single-line codes (the encoder is a plain OR array).
module tb_d2be;
  int checks = 0, failures = 0;
  logic [9:0] d;
  logic [3:0] bcd, exp;

  d2be dut (.d(d), .bcd(bcd));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 10; k++) begin
      d = 10'(1 << k);
      #1;
      checks++;
      if (bcd !== 4'(k)) begin failures++; $display("FAIL digit %0d -> %b", k, bcd); end
    end
    for (int t = 0; t < 500; t++) begin
      d = 10'($urandom);
      exp = '0;
      for (int k = 0; k < 10; k++) if (d[k]) exp |= 4'(k);
      #1;
      checks++;
      if (bcd !== exp) begin failures++; $display("FAIL d=%b -> %b expected %b", d, bcd, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
