// tb_pe2d -- check of the two-level priority encoder at L = 64 in all five
// (M, N) arrangements: (8, 8), (4, 16), (16, 4), (2, 32) and (32, 2).
// The same 64-bit input drives the five instances; each index and valid
// flag is compared with a scan of the input for its highest set bit.
// Stimulus: the empty input, every single bit, every pair of bits in
// different positions, and random patterns of varying density. The run
// counts, per instance, how often a higher group overrode another active
// group, and fails if that never happened or if the empty input was never
// applied.
module tb_pe2d;
  localparam int L = 64;
  localparam int NCFG = 5;
  int checks = 0, failures = 0, empties = 0;
  int group_overrides [NCFG];
  localparam int CM [NCFG] = '{8, 4, 16, 2, 32};
  localparam int CN [NCFG] = '{8, 16, 4, 32, 2};

  logic [L-1:0] d;
  logic [5:0]   q [NCFG];
  logic         v [NCFG];

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    pe2d #(.M(CM[c]), .N(CN[c])) dut (.d(d), .q(q[c]), .v(v[c]));
  end

  task automatic apply(input logic [L-1:0] val);
    logic [5:0] exp;
    int ngrp;
    d = val;
    exp = '0;
    for (int k = 0; k < L; k++) if (d[k]) exp = 6'(k);
    if (d == '0) empties++;
    #1;
    for (int c = 0; c < NCFG; c++) begin
      ngrp = 0;
      for (int m = 0; m < CM[c]; m++) if (|(d >> (m * CN[c]) & ((64'd1 << CN[c]) - 1))) ngrp++;
      if (ngrp > 1) group_overrides[c]++;
      checks += 2;
      if (v[c] !== (d != '0)) begin
        failures++;
        $display("FAIL (M,N)=(%0d,%0d) d=%h v=%0b", CM[c], CN[c], d, v[c]);
      end
      if (q[c] !== exp) begin
        failures++;
        $display("FAIL (M,N)=(%0d,%0d) d=%h q=%0d expected %0d", CM[c], CN[c], d, q[c], exp);
      end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [L-1:0] r;
    for (int c = 0; c < NCFG; c++) group_overrides[c] = 0;
    apply('0);
    for (int k = 0; k < L; k++) apply(64'd1 << k);
    for (int a = 0; a < L; a++)
      for (int b = 0; b < a; b++) apply((64'd1 << a) | (64'd1 << b));
    for (int t = 0; t < 3000; t++) begin
      r = {$urandom, $urandom};
      // thin the pattern out by a random amount so that sparse inputs occur
      for (int s = 0; s < t % 6; s++) r &= {$urandom, $urandom};
      apply(r);
    end
    for (int c = 0; c < NCFG; c++) begin
      checks++;
      if (group_overrides[c] == 0) begin
        failures++;
        $display("FAIL (M,N)=(%0d,%0d): no group override exercised", CM[c], CN[c]);
      end
      $display("(M,N)=(%0d,%0d) group overrides: %0d", CM[c], CN[c], group_overrides[c]);
    end
    checks++;
    if (empties == 0) begin failures++; $display("FAIL empty input never applied"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
