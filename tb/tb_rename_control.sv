// tb_rename_control: self-checking testbench of the global renaming control.
//
// Directed: with SC = 72 a group of four instructions writing r8, r3,
// nothing and r8 (SC-offsets 0, 1, -, 2) must get StateIds 72, 73, 73 and
// 74, the two r8 destinations entries RenP+1 and RenP+2 of bank 8, and a
// source of the third instruction reading r8 must see the first r8 rename.
// A group renaming one register three times must stop before the third.
//
// Random: groups with random destinations, sources, SCT free-entry flags,
// pending-exception blocks, recoveries and LCS values. Every output is
// compared with a reference computed in the testbench, and SC is tracked
// across cycles, including the saturation step (SC drops by M when the next
// group could pass the all-ones value and the LCS has its saturation bit
// set). The run counts full-bank stalls, same-register stalls, recoveries
// and saturation steps and fails if one never happened.
module tb_rename_control;
  localparam int RW = 4, NL = 32, N = 16, SID_W = 10, NSRC = 2;
  localparam int M = NL * N, MAXV = (1 << SID_W) - 1;
  localparam int LW = 5, IW = 4, PW = 9;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [RW-1:0]    in_valid, in_has_dst;
  logic [LW-1:0]    in_dst [RW];
  logic [LW-1:0]    in_src [RW][NSRC];
  logic [NL-1:0]    can_alloc1, can_alloc2;
  logic [IW-1:0]    renp_idx [NL];
  logic [SID_W-1:0] renp_sid [NL];
  logic             block, rec_valid;
  logic [SID_W-1:0] rec_sid, lcs;
  logic [RW-1:0]    accept, ren_valid;
  logic             stall, stall_full, stall_same;
  logic [$clog2(RW+1)-1:0] ren_off [RW];
  logic [SID_W-1:0] sid [RW];
  logic [PW-1:0]    dst_preg [RW];
  logic [PW-1:0]    src_preg [RW][NSRC];
  logic [PW-1:0]    state_preg [RW];
  logic [SID_W-1:0] sc;
  logic             sb_clear;

  rename_control #(.RW(RW), .NL(NL), .N(N), .SID_W(SID_W), .NSRC(NSRC)) dut (.*);

  int checks = 0, failures = 0;
  int n_full = 0, n_same = 0, n_rec = 0, n_wrap = 0, n_block = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  int exp_sc;

  // reference: compare all combinational outputs, return the next SC
  task automatic compare();
    int  cnt [NL];
    bit  ok, wrap, e_acc, e_full, e_same;
    int  off, nsc, last_lreg, last_idx;
    int  e_dst_idx [RW];
    check(sc == SID_W'(exp_sc), "sc");
    for (int k = 0; k < NL; k++) cnt[k] = 0;
    wrap = (exp_sc + RW) > MAXV;
    ok = !(block || rec_valid || wrap);
    e_full = 0; e_same = 0; off = 0;
    // current state register: lowest SCT whose RenP StateId is SC-1
    last_lreg = 0; last_idx = 0;
    for (int k = NL - 1; k >= 0; k--)
      if (renp_sid[k] == SID_W'(exp_sc - 1)) begin last_lreg = k; last_idx = renp_idx[k]; end
    for (int i = 0; i < RW; i++) begin
      int d;
      d = in_dst[i];
      if (ok && in_valid[i] && in_has_dst[i]) begin
        if (cnt[d] >= 2) begin ok = 0; e_same = 1; end
        else if (cnt[d] == 0 && !can_alloc1[d]) begin ok = 0; e_full = 1; end
        else if (cnt[d] == 1 && !can_alloc2[d]) begin ok = 0; e_full = 1; end
      end
      e_acc = ok && in_valid[i];
      check(accept[i] == e_acc, "accept");
      check(ren_valid[i] == (e_acc && in_has_dst[i]), "ren_valid");
      if (e_acc) begin
        check(ren_off[i] == off, "ren_off");
        if (in_has_dst[i]) begin
          e_dst_idx[i] = (renp_idx[d] + cnt[d] + 1) % N;
          check(sid[i] == SID_W'(exp_sc + off), "sid (writer)");
          check(dst_preg[i] == PW'(d * N + e_dst_idx[i]), "dst_preg");
          check(state_preg[i] == dst_preg[i], "state_preg (writer)");
        end else begin
          check(sid[i] == SID_W'(exp_sc + off - 1), "sid (non-writer)");
          check(state_preg[i] == PW'(last_lreg * N + last_idx), "state_preg");
        end
        for (int k = 0; k < NSRC; k++) begin
          int s, e;
          s = in_src[i][k];
          e = s * N + renp_idx[s];
          for (int j = 0; j < i; j++)
            if (in_valid[j] && in_has_dst[j] && in_dst[j] == s) e = s * N + e_dst_idx[j];
          check(src_preg[i][k] == PW'(e), "src_preg");
        end
        if (in_has_dst[i]) begin
          cnt[d]++; off++;
          last_lreg = d; last_idx = e_dst_idx[i];
        end
      end
    end
    check(stall == ((in_valid & ~accept) != 0), "stall");
    check(stall_full == e_full, "stall_full");
    check(stall_same == e_same, "stall_same");
    if (e_full) n_full++;
    if (e_same) n_same++;
    check(sb_clear == (wrap && lcs[SID_W-1] && !rec_valid), "sb_clear");
    if (rec_valid) nsc = rec_sid + 1;
    else if (wrap && lcs[SID_W-1]) begin nsc = exp_sc - M; n_wrap++; end
    else nsc = exp_sc + off;
    exp_sc = nsc;
  endtask

  task automatic idle();
    in_valid = '0; in_has_dst = '0; block = 0; rec_valid = 0; rec_sid = '0;
    for (int i = 0; i < RW; i++) begin
      in_dst[i] = '0;
      for (int k = 0; k < NSRC; k++) in_src[i][k] = '0;
    end
  endtask

  initial begin
    idle();
    can_alloc1 = '1; can_alloc2 = '1; lcs = '0;
    for (int k = 0; k < NL; k++) begin renp_idx[k] = '0; renp_sid[k] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    exp_sc = 1;
    @(negedge clk);
    check(sc == 1, "reset SC");

    // ------------------------------------------------ directed group
    // bring SC to 72 with single renames of r0
    while (exp_sc < 72) begin
      idle(); in_valid[0] = 1; in_has_dst[0] = 1; in_dst[0] = 0;
      #1; compare();
      @(negedge clk);
    end
    idle();
    renp_idx[8] = 9; renp_sid[8] = 50;
    renp_idx[0] = 3; renp_sid[0] = 71;
    in_valid = 4'b1111;
    in_has_dst = 4'b1011;
    in_dst[0] = 8; in_dst[1] = 3; in_dst[2] = 0; in_dst[3] = 8;
    in_src[2][0] = 8; in_src[2][1] = 0;
    #1;
    check(sid[0] == 72 && sid[1] == 73 && sid[2] == 73 && sid[3] == 74, "directed StateIds");
    check(ren_off[0] == 0 && ren_off[3] == 2, "directed SC-offsets");
    check(dst_preg[0] == PW'(8*16 + 10) && dst_preg[3] == PW'(8*16 + 11), "directed entries 10 and 11");
    check(src_preg[2][0] == PW'(8*16 + 10), "directed in-group source");
    check(src_preg[2][1] == PW'(0*16 + 3), "directed current mapping");
    check(state_preg[2] == PW'(3*16 + 1), "directed state register");
    check(accept == 4'b1111 && !stall, "directed accepted");
    compare();
    @(negedge clk);
    // three renames of one register: the third stalls
    idle();
    in_valid = 4'b0111; in_has_dst = 4'b0111;
    in_dst[0] = 5; in_dst[1] = 5; in_dst[2] = 5;
    #1;
    check(accept == 4'b0011 && stall && stall_same, "directed third rename stalls");
    compare();
    @(negedge clk);

    // ------------------------------------------------ random
    for (int cyc = 0; cyc < 20000; cyc++) begin
      idle();
      for (int i = 0; i < RW; i++) begin
        in_valid[i]   = $urandom_range(0, 9) != 0;
        in_has_dst[i] = $urandom_range(0, 9) < 7;
        in_dst[i]     = LW'($urandom_range(0, 5));
        for (int k = 0; k < NSRC; k++) in_src[i][k] = LW'($urandom_range(0, 7));
      end
      for (int k = 0; k < NL; k++) begin
        can_alloc1[k] = $urandom_range(0, 15) != 0;
        can_alloc2[k] = can_alloc1[k] && ($urandom_range(0, 3) != 0);
        renp_idx[k]   = IW'($urandom);
        renp_sid[k]   = SID_W'($urandom_range(0, MAXV));
      end
      renp_sid[$urandom_range(0, NL-1)] = SID_W'(exp_sc - 1);
      block = $urandom_range(0, 49) == 0;
      if (block) n_block++;
      if ($urandom_range(0, 199) == 0) begin
        rec_valid = 1;
        rec_sid = SID_W'($urandom_range(M, exp_sc > M ? exp_sc - 1 : M));
        n_rec++;
      end
      lcs = SID_W'($urandom_range(0, 3) == 0 ? 0 : M);
      #1; compare();
      @(negedge clk);
    end
    check(n_full > 0 && n_same > 0 && n_rec > 0 && n_wrap > 0 && n_block > 0, "all events happened");
    $display("events: full=%0d same=%0d rec=%0d wrap=%0d block=%0d", n_full, n_same, n_rec, n_wrap, n_block);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
