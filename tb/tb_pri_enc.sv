// tb_pri_enc -- exhaustive check of the reversible 4:2 priority encoder.
// Every one of the 16 input patterns is applied (I3..I0 counted up, as in
// the published simulation) and y is compared with the index of the highest
// set input found by a scan loop; patterns with only I0 or nothing set must
// give 00. The four rows of the published truth table are also checked on
// their own. The number of patterns in which a higher input overrides a
// lower one is counted and must be non-zero.
module tb_pri_enc;
  int checks = 0, failures = 0, overrides = 0;
  logic [3:0] i;
  logic [1:0] y;

  pri_enc dut (.i(i), .y(y));

  function automatic logic [1:0] ref_idx(input logic [3:0] v);
    ref_idx = 2'd0;
    for (int k = 0; k < 4; k++) if (v[k]) ref_idx = 2'(k);
  endfunction

  task automatic expect_y(input logic [1:0] exp);
    #1;
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL i=%b y=%b expected %b", i, y, exp);
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
    for (int n = 0; n < 16; n++) begin
      i = 4'(n);
      if ($countones(i) > 1) overrides++;
      expect_y(ref_idx(i));
    end
    // truth table rows, don't-cares set to 1
    i = 4'b0001; expect_y(2'b00);
    i = 4'b0011; expect_y(2'b01);
    i = 4'b0111; expect_y(2'b10);
    i = 4'b1111; expect_y(2'b11);
    checks++;
    if (overrides == 0) begin failures++; $display("FAIL no priority override exercised"); end
    $display("priority overrides exercised: %0d", overrides);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
