// tb_sct: self-checking testbench of one State Control Table.
//
// A directed part replays the renaming example of two renames of logical
// register 8 in one group (first and last of four instructions, SC = 72):
// with RenP on entry 9 the entries 10 and 11 must receive StateIds 72 and 74
// and RenP must end on entry 11. A second directed part checks the
// StateId-to-pointer conversion (range comparators) on entries holding 70,
// 72 and 74 for LCS values 71, 72 and 73.
//
// The random part drives renames, Ready bits, RelB/ComB flags, LCS values and
// recoveries and compares every output, every cycle, with an index-based
// model of the table (circular FIFO of entries with integer pointers). It
// counts how often renames of two entries, bank-full conditions, releases
// and recovery kills happened and fails if one never did. A watchdog ends
// the run.
module tb_sct;
  localparam int N = 16, SID_W = 10, RW = 4, LREG_W = 5, ID = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [RW-1:0]         ren_valid;
  logic [LREG_W-1:0]     ren_lreg [RW];
  logic [$clog2(RW+1)-1:0] ren_off [RW];
  logic [SID_W-1:0]      sc;
  logic                  can_alloc1, can_alloc2;
  logic [$clog2(N)-1:0]  renp_idx;
  logic [SID_W-1:0]      renp_sid;
  logic [N-1:0]          rb, comb_nz, relb_nz;
  logic [SID_W-1:0]      lcs, rec_sid;
  logic                  rec_valid, sb_clear;
  logic                  com_valid;
  logic [SID_W-1:0]      com_sid;
  logic [N-1:0]          alloc_o, release_o, vb_o, renp_o, comp_o, relp_o;

  sct #(.N(N), .SID_W(SID_W), .RW(RW), .LREG_W(LREG_W), .SCT_ID(ID)) dut (.*);

  int checks = 0, failures = 0;
  int n_two = 0, n_full = 0, n_rel = 0, n_kill = 0, n_rec = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ------------------------------------------------------------- model
  bit          m_vb  [N];
  int          m_sid [N];
  int          m_ren, m_com, m_rel;

  function automatic int nx(int j); return (j + 1) % N; endfunction

  function automatic int m_range(int x);
    for (int j = 0; j < N; j++)
      if (m_vb[j] && m_sid[j] <= x && (j == m_ren || m_sid[nx(j)] > x)) return j;
    return -1;
  endfunction

  task automatic model_reset();
    for (int j = 0; j < N; j++) begin m_vb[j] = 0; m_sid[j] = 0; end
    m_vb[0] = 1; m_ren = 0; m_com = 0; m_rel = 0;
  endtask

  // compares outputs for the current inputs, then advances the model
  task automatic model_step(int n_new, int s1, int s2);
    int lcp, recp, cn, rn, j;
    bit [N-1:0] exp_rel, exp_alloc, kill;
    bit cv;
    // outputs that depend on the table only
    check(can_alloc1 == !m_vb[nx(m_ren)], "can_alloc1");
    check(can_alloc2 == (!m_vb[nx(m_ren)] && !m_vb[nx(nx(m_ren))]), "can_alloc2");
    check(renp_idx == m_ren, "renp_idx");
    check(renp_sid == m_sid[m_ren], "renp_sid");
    lcp  = m_range(lcs == 0 ? 0 : lcs - 1);
    recp = m_range(rec_sid);
    // commit pointer
    j = m_com;
    for (int d = 0; d < N; d++) begin
      if (j == m_ren || !rb[j] || comb_nz[j]) break;
      j = nx(j);
    end
    cn = j;
    cv = !rb[cn] || comb_nz[cn];
    check(com_valid == cv, "com_valid");
    if (cv) check(com_sid == m_sid[cn], "com_sid");
    // release pointer
    exp_rel = '0;
    j = m_rel;
    for (int d = 0; d < N; d++) begin
      if (m_sid[nx(j)] >= lcs || j == m_com || j == m_ren || !rb[j] || relb_nz[j] || comb_nz[j]) break;
      exp_rel[j] = 1;
      j = nx(j);
    end
    rn = j;
    kill = '0;
    if (rec_valid)
      for (int k = 0; k < N; k++) if (m_vb[k] && m_sid[k] > rec_sid) kill[k] = 1;
    exp_alloc = '0;
    if (n_new >= 1) exp_alloc[nx(m_ren)] = 1;
    if (n_new == 2) exp_alloc[nx(nx(m_ren))] = 1;
    check(alloc_o == exp_alloc, "alloc_o");
    check(release_o == (exp_rel | kill), "release_o");
    if (exp_rel != 0) n_rel++;
    if (kill != 0) n_kill++;
    // advance
    for (int k = 0; k < N; k++) if (exp_rel[k] || kill[k]) m_vb[k] = 0;
    if (n_new >= 1) begin m_vb[nx(m_ren)] = 1; m_sid[nx(m_ren)] = s1; end
    if (n_new == 2) begin m_vb[nx(nx(m_ren))] = 1; m_sid[nx(nx(m_ren))] = s2; end
    m_rel = rn;
    if (rec_valid && recp >= 0) begin
      m_ren = recp;
      m_com = kill[cn] ? recp : cn;
    end else begin
      m_ren = (m_ren + n_new) % N;
      m_com = cn;
    end
  endtask

  task automatic idle_inputs();
    ren_valid = '0;
    for (int i = 0; i < RW; i++) begin ren_lreg[i] = '0; ren_off[i] = '0; end
    rec_valid = 0; rec_sid = '0; sb_clear = 0;
    comb_nz = '0; relb_nz = '0;
  endtask

  int scv;
  int live_lo;

  initial begin
    idle_inputs();
    sc = 1; lcs = 0; rb = '1;
    model_reset();
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(vb_o == 16'h0001 && renp_o == 16'h0001 && comp_o == 16'h0001 && relp_o == 16'h0001,
          "reset state");

    // ---------------- directed: walk RenP to entry 9 with StateIds 62..70
    scv = 62;
    for (int k = 1; k <= 9; k++) begin
      ren_valid = 4'b0001; ren_lreg[0] = ID; ren_off[0] = 0; sc = SID_W'(scv);
      lcs = 0; rb = '1; relb_nz = '1;   // nothing may be released yet
      #1;
      model_step(1, scv, 0);
      @(posedge clk); #1;
      scv++;
    end
    check(renp_idx == 9, "directed RenP at 9");
    // group of four: instructions 0 and 3 rename register 8 (SC-offsets 0 and 2)
    ren_valid = 4'b1001;
    ren_lreg[0] = ID; ren_off[0] = 0;
    ren_lreg[1] = 3;  ren_off[1] = 1;
    ren_lreg[2] = 5;  ren_off[2] = 2;
    ren_lreg[3] = ID; ren_off[3] = 2;
    sc = 72;
    #1;
    check(can_alloc2, "directed can_alloc2");
    model_step(2, 72, 74);
    @(posedge clk); #1;
    check(renp_idx == 11, "directed RenP at 11");
    check(dut.sid_q[10] == 72 && dut.sid_q[11] == 74, "directed StateIds 72, 74");
    check(vb_o[10] && vb_o[11], "directed Vb set");
    idle_inputs();
    relb_nz = '1;
    // directed pointer conversion: StateIds 70 (entry 9) and 72 (entry 10)
    lcs = 72;
    #1;
    check(dut.lcp == 16'h0400, "LCS 72 selects entry 10 (72 <= 72 < 74)");
    lcs = 73;
    #1;
    check(dut.lcp == 16'h0400, "LCS 73 selects entry 10");
    lcs = 71;
    #1;
    check(dut.lcp == 16'h0200, "LCS 71 selects entry 9 (70 <= 71 < 72)");

    // ---------------- random part
    idle_inputs();
    scv = 100;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      int want, n_new, s1, s2, o1, o2;
      @(negedge clk);
      idle_inputs();
      // oldest live StateId bounds sensible LCS and recovery values
      live_lo = m_sid[m_rel];
      // Ready bits: newly allocated entries become ready at random
      for (int k = 0; k < N; k++) if ($urandom_range(0, 3) == 0) rb[k] = 1;
      relb_nz = '0; comb_nz = '0;
      for (int k = 0; k < N; k++) begin
        if ($urandom_range(0, 7) == 0) relb_nz[k] = 1;
        if ($urandom_range(0, 9) == 0) comb_nz[k] = 1;
      end
      lcs = SID_W'(live_lo + $urandom_range(0, scv - live_lo));
      n_new = 0;
      if ($urandom_range(0, 19) == 0 && scv - 1 > live_lo) begin
        rec_valid = 1;
        rec_sid   = SID_W'(live_lo + $urandom_range(0, scv - 1 - live_lo));
        n_rec++;
      end else begin
        want = $urandom_range(0, 2);
        if (want == 2 && !can_alloc2) begin n_full++; want = can_alloc1 ? 1 : 0; end
        if (want == 1 && !can_alloc1) begin n_full++; want = 0; end
        o1 = $urandom_range(0, 2);
        o2 = o1 + 1 + $urandom_range(0, 2 - o1);
        if (want >= 1) begin ren_valid[o1] = 1; ren_lreg[o1] = ID; ren_off[o1] = o1; end
        if (want == 2) begin ren_valid[o2] = 1; ren_lreg[o2] = ID; ren_off[o2] = o2; n_two++; end
        // another register's rename in the group must be ignored
        if (want < 2) begin ren_valid[3] = 1; ren_lreg[3] = ID + 1; ren_off[3] = 3; end
        n_new = want;
      end
      sc = SID_W'(scv);
      s1 = scv + o1; s2 = scv + o2;
      #1;
      model_step(n_new, s1, s2);
      @(posedge clk); #1;
      for (int k = 0; k < N; k++) if (alloc_o[k]) rb[k] = 0;
      if (rec_valid) scv = rec_sid + 1;
      else if (n_new == 1) scv = s1 + 1;
      else if (n_new == 2) scv = s2 + 1;
      if (scv > 900) begin
        // keep StateIds in range: restart from reset
        rst_n = 0; @(posedge clk); #1; rst_n = 1; model_reset(); scv = 1; rb = '1;
      end
      for (int k = 0; k < N; k++) check(vb_o[k] == m_vb[k], "vb");
      check(renp_o[m_ren] && relp_o[m_rel] && comp_o[m_com], "pointers");
    end
    check(n_two > 0,  "two renames in one cycle happened");
    check(n_full > 0, "bank full happened");
    check(n_rel > 0,  "release happened");
    check(n_kill > 0, "recovery kill happened");
    $display("events: two=%0d full=%0d release=%0d kill=%0d rec=%0d", n_two, n_full, n_rel, n_kill, n_rec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
