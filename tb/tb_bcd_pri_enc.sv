// tb_bcd_pri_enc -- exhaustive check of the reversible 8-to-3 BCD priority
// encoder. All 256 input patterns are applied and {C, B, A} is compared with
// the index of the highest set input found by a scan loop. The eight rows of
// the published truth table (don't-cares as 1 and as 0) and the worked
// example (I7 and I4 active gives 111) are checked on their own.
module tb_bcd_pri_enc;
  int checks = 0, failures = 0, overrides = 0;
  logic [7:0] i;
  logic [2:0] y;

  bcd_pri_enc dut (.i(i), .y(y));

  function automatic logic [2:0] ref_idx(input logic [7:0] v);
    ref_idx = 3'd0;
    for (int k = 0; k < 8; k++) if (v[k]) ref_idx = 3'(k);
  endfunction

  task automatic expect_y(input logic [2:0] exp);
    #1;
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL i=%b y=%b expected %b", i, y, exp);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 256; n++) begin
      i = 8'(n);
      if ($countones(i) > 1) overrides++;
      expect_y(ref_idx(i));
    end
    for (int row = 0; row < 8; row++) begin
      i = 8'(1 << row);             expect_y(3'(row));
      i = 8'((2 << row) - 1);       expect_y(3'(row));
    end
    i = 8'b1001_0000; expect_y(3'b111);
    checks++;
    if (overrides == 0) begin failures++; $display("FAIL no priority override exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
