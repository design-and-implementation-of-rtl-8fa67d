// tb_rev_pe_top -- end-to-end run of the whole library at its default sizes.
// Random and directed inputs are driven into every encoder of the top at
// once and each output is compared with a model written here (scan for the
// highest set bit, OR of BCD codes for the decimal encoder). It counts how
// often each mechanism occurs and fails if any never did:
//   - a higher request masking a lower one in the 4:2 reversible encoder
//   - the same in the 8-to-3 reversible BCD encoder
//   - every decimal digit 0..9 encoded alone by the decimal-to-BCD encoder
//   - the 16-bit encoder choosing its upper and its lower byte
//   - the 64-bit two-level encoder letting a higher group override another
//     active group, and reporting an empty input with v = 0
module tb_rev_pe_top;
  int checks = 0, failures = 0;
  int n_pe4_ovr = 0, n_bcd_ovr = 0, n_hi = 0, n_lo = 0, n_grp_ovr = 0, n_empty = 0;
  logic [9:0] digits_seen = '0;

  logic [3:0]  pe4_i;  logic [1:0] pe4_y;
  logic [7:0]  bcd_i;  logic [2:0] bcd_y;
  logic [9:0]  d2be_d; logic [3:0] d2be_bcd;
  logic [7:0]  pe8_d;  logic [2:0] pe8_q;
  logic [15:0] pe16_d; logic [3:0] pe16_q;
  logic [63:0] pe64_d; logic [5:0] pe64_q; logic pe64_v;

  rev_pe_top dut (.*);

  function automatic int hi_idx(input logic [63:0] v);
    hi_idx = 0;
    for (int k = 0; k < 64; k++) if (v[k]) hi_idx = k;
  endfunction

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic step();
    logic [3:0] e_bcd;
    int ngrp;
    #1;
    chk(pe4_y  == 2'(hi_idx(64'(pe4_i))),  $sformatf("pe4 i=%b y=%b", pe4_i, pe4_y));
    chk(bcd_y  == 3'(hi_idx(64'(bcd_i))),  $sformatf("bcd i=%b y=%b", bcd_i, bcd_y));
    chk(pe8_q  == 3'(hi_idx(64'(pe8_d))),  $sformatf("pe8 d=%b q=%0d", pe8_d, pe8_q));
    chk(pe16_q == 4'(hi_idx(64'(pe16_d))), $sformatf("pe16 d=%h q=%0d", pe16_d, pe16_q));
    chk(pe64_q == 6'(hi_idx(pe64_d)),      $sformatf("pe64 d=%h q=%0d", pe64_d, pe64_q));
    chk(pe64_v == (pe64_d != '0),          $sformatf("pe64 d=%h v=%0b", pe64_d, pe64_v));
    e_bcd = '0;
    for (int k = 0; k < 10; k++) if (d2be_d[k]) e_bcd |= 4'(k);
    chk(d2be_bcd == e_bcd, $sformatf("d2be d=%b bcd=%b", d2be_d, d2be_bcd));
    if ($countones(pe4_i) > 1) n_pe4_ovr++;
    if ($countones(bcd_i) > 1) n_bcd_ovr++;
    if ($countones(d2be_d) == 1) digits_seen |= d2be_d;
    if (|pe16_d[15:8]) n_hi++;
    else if (|pe16_d[7:0]) n_lo++;
    if (pe64_d == '0) n_empty++;
    ngrp = 0;
    for (int m = 0; m < 8; m++) if (|pe64_d[m*8 +: 8]) ngrp++;
    if (ngrp > 1) n_grp_ovr++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pe4_i = '0; bcd_i = '0; d2be_d = '0; pe8_d = '0; pe16_d = '0; pe64_d = '0;
    step();
    for (int t = 0; t < 4000; t++) begin
      pe4_i  = 4'($urandom);
      bcd_i  = 8'($urandom);
      d2be_d = (t % 2 == 0) ? 10'(1 << (t / 2 % 10)) : 10'($urandom);
      pe8_d  = 8'($urandom);
      pe16_d = (t % 3 == 0) ? 16'($urandom) & 16'h00FF : 16'($urandom);
      pe64_d = {$urandom, $urandom};
      for (int s = 0; s < t % 7; s++) pe64_d &= {$urandom, $urandom};
      step();
    end
    chk(n_pe4_ovr > 0,        "pe4 override never exercised");
    chk(n_bcd_ovr > 0,        "bcd override never exercised");
    chk(digits_seen == '1,    "not every decimal digit encoded");
    chk(n_hi > 0 && n_lo > 0, "pe16 byte selection not exercised both ways");
    chk(n_grp_ovr > 0,        "pe64 group override never exercised");
    chk(n_empty > 0,          "pe64 empty input never applied");
    $display("pe4 overrides=%0d bcd overrides=%0d pe16 hi/lo=%0d/%0d pe64 group overrides=%0d empties=%0d",
             n_pe4_ovr, n_bcd_ovr, n_hi, n_lo, n_grp_ovr, n_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
