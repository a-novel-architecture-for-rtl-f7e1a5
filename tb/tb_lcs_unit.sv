// tb_lcs_unit: self-checking testbench of the LCS minimum tree.
//
// Random SCT offers, in-progress StateIds, SC values, exception clamps and
// saturation steps are applied; one cycle later lcs_raw must equal the
// minimum of the valid offers, the valid in-progress StateIds and SC-1, and
// lcs that minimum clamped by the hold value, both with the saturation bit
// cleared after an sb_clear cycle. This checks the one-cycle LCS delay.
module tb_lcs_unit;
  localparam int NL = 32, NIP = 15, SID_W = 10;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NL-1:0]    sct_valid;
  logic [SID_W-1:0] sct_sid [NL];
  logic [NIP-1:0]   ip_valid;
  logic [SID_W-1:0] ip_sid [NIP];
  logic [SID_W-1:0] sc, hold_sid, lcs, lcs_raw;
  logic             hold_valid, sb_clear;

  lcs_unit #(.NL(NL), .NIP(NIP), .SID_W(SID_W)) dut (.*);

  int checks = 0, failures = 0, n_hold = 0, n_clear = 0, n_ip = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    int e_raw, e_lcs, base;
    sct_valid = '0; ip_valid = '0; sc = 1; hold_valid = 0; hold_sid = '0; sb_clear = 0;
    for (int i = 0; i < NL; i++) sct_sid[i] = '0;
    for (int i = 0; i < NIP; i++) ip_sid[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(lcs == 0 && lcs_raw == 0, "reset");
    for (int cyc = 0; cyc < 5000; cyc++) begin
      base = $urandom_range(0, 1) ? 512 : 0;
      sc = SID_W'(base + $urandom_range(1, 500));
      e_raw = sc - 1;
      for (int i = 0; i < NL; i++) begin
        sct_valid[i] = $urandom_range(0, 3) == 0;
        sct_sid[i]   = SID_W'(base + $urandom_range(0, 511));
        if (sct_valid[i] && sct_sid[i] < e_raw) e_raw = sct_sid[i];
      end
      for (int i = 0; i < NIP; i++) begin
        ip_valid[i] = $urandom_range(0, 4) == 0;
        ip_sid[i]   = SID_W'(base + $urandom_range(0, 511));
        if (ip_valid[i] && ip_sid[i] < e_raw) begin e_raw = ip_sid[i]; end
      end
      // make the in-progress path the minimum now and then
      if ($urandom_range(0, 9) == 0) begin
        ip_valid[3] = 1; ip_sid[3] = SID_W'(base); e_raw = base; n_ip++;
      end
      hold_valid = $urandom_range(0, 4) == 0;
      hold_sid   = SID_W'(base + $urandom_range(0, 511));
      e_lcs = (hold_valid && hold_sid < e_raw) ? hold_sid : e_raw;
      if (hold_valid && hold_sid < e_raw) n_hold++;
      sb_clear = (base == 512) && ($urandom_range(0, 9) == 0);
      if (sb_clear) begin e_raw = e_raw % 512; e_lcs = e_lcs % 512; n_clear++; end
      @(negedge clk);
      check(lcs_raw == SID_W'(e_raw), "lcs_raw");
      check(lcs == SID_W'(e_lcs), "lcs");
    end
    check(n_hold > 0 && n_clear > 0 && n_ip > 0, "clamp, saturation and in-progress minimum happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
