// tb_msp_top: end-to-end testbench of the MSP register and state management.
//
// The testbench plays the rest of an out-of-order core around msp_top, at the
// design's default sizes (32 logical registers x 16 physical registers,
// rename group of 4, 128-entry queue, issue width 5):
//   front end   a random program; after a mis-predicted branch it fetches
//               wrong-path instructions until the recovery, after an
//               exception it restarts at the excepting instruction (whose
//               exception is then gone, as if a handler had fixed it);
//   queue       128 entries; an entry issues when the Ready bits of its
//               source registers are set (and, while an exception is
//               pending, only if it is older than the exception);
//   pipeline    Arbitrate (read ports granted or retried), Read, Execute of
//               random latency, write-back (write ports granted or retried).
// Every instruction computes dst = src0 + 2*src1 + k from the values it
// reads. A golden register file, updated in program order at rename and
// rolled back on an exception, predicts every source operand of every
// correct-path instruction; the value read from the banked register file
// must match. At the end the pipeline drains and every logical register's
// current mapping is read and compared, the LCS must equal SC-1, and every
// bank must hold exactly one allocated register.
//
// Mechanisms counted (each must happen at least once): rename stall on a
// full bank, stall on a third rename of one register, two renames of one
// register in a group, branch recovery, exception recovery, register
// release, release by recovery, read-port conflict, read sharing,
// write-port conflict, and the StateId saturation step.
module tb_msp_top;
  import msp_pkg::*;

  localparam int RW_ = RENAME_W, NL = NUM_LREGS, N = REGS_PER_BANK, NP = NUM_PREGS;
  localparam int SW = SID_W, IQN = IQ_SIZE, NI = ISSUE_W, NR = RD_PORTS, NW = WB_PORTS;
  localparam int NIPS = INPROG, PW = $clog2(NP), QW = $clog2(IQ_SIZE);
  localparam int CYCLES = 9000;
  localparam int MAXI = 65536;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // ---------------------------------------------------------------- DUT
  logic [RW_-1:0]       ren_in_valid, ren_has_dst, ren_accept;
  logic [LREG_W-1:0]    ren_dst [RW_];
  logic [NSRC-1:0]      ren_src_valid [RW_];
  logic [LREG_W-1:0]    ren_src [RW_][NSRC];
  logic [QW-1:0]        ren_iq_slot [RW_];
  logic                 ren_stall, ren_stall_full, ren_stall_same;
  logic [PW-1:0]        ren_dst_preg [RW_];
  logic [PW-1:0]        ren_src_preg [RW_][NSRC];
  logic [SW-1:0]        ren_sid [RW_];
  logic [NI-1:0]        iss_valid;
  logic [QW-1:0]        iss_slot [NI];
  logic [IQN-1:0]       cancel_mask;
  logic [NIPS-1:0]      ip_valid;
  logic [SW-1:0]        ip_sid [NIPS];
  logic [NR-1:0]        rd_req_valid, rd_grant;
  logic [PW-1:0]        rd_req_preg [NR];
  logic [DATA_W-1:0]    rd_data [NR];
  logic [NW-1:0]        wb_req_valid, wb_grant;
  logic [PW-1:0]        wb_req_preg [NW];
  logic [DATA_W-1:0]    wb_req_data [NW];
  logic                 br_mispred, exc_valid, exc_new_state;
  logic [SW-1:0]        br_sid, exc_sid;
  logic [SW-1:0]        lcs, sc, rec_sid, issue_limit_sid;
  logic                 rec_valid, exc_taken, exc_pending, issue_limit_valid, sb_clear;
  logic [NP-1:0]        preg_release, rb;

  msp_top dut (.*);

  // ---------------------------------------------------------- bookkeeping
  int checks = 0, failures = 0;
  int c_full = 0, c_same = 0, c_two = 0, c_brrec = 0, c_excrec = 0, c_rel = 0, c_relrec = 0;
  int c_rdconf = 0, c_share = 0, c_wbconf = 0, c_wrap = 0, c_retired = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // program (correct path), generated on demand
  typedef struct {
    bit         has_dst;
    int         dst;
    int         nsrc;
    int         src [2];
    bit         br, mis, exc;
    longint     k;
  } prog_t;
  prog_t prog [MAXI];
  int    prog_len = 0;

  function automatic int pick_reg();
    // a few hot registers so that banks fill up
    return ($urandom_range(0, 9) < 5) ? $urandom_range(1, 3) : $urandom_range(0, NL - 1);
  endfunction

  function automatic prog_t gen_ins(bit wrong);
    prog_t p;
    p.br      = $urandom_range(0, 99) < 12;
    p.has_dst = !p.br && ($urandom_range(0, 9) < 8);
    p.dst     = pick_reg();
    p.nsrc    = $urandom_range(0, 2);
    p.src[0]  = pick_reg();
    p.src[1]  = pick_reg();
    p.mis     = !wrong && p.br && ($urandom_range(0, 99) < 15);
    p.exc     = !wrong && !p.br && ($urandom_range(0, 999) < 4);
    p.k       = longint'($urandom);
    return p;
  endfunction

  // in-flight instructions, indexed by a sequence number
  typedef struct {
    bit      alive, wrong;
    prog_t   p;
    int      pidx, slot, stage, lat;
    logic [SW-1:0] sid;
    logic [PW-1:0] dpreg;
    logic [PW-1:0] spreg [2];
    longint  exp_src [2];
    longint  res;
    longint  old_val;          // golden value of dst before this instruction
  } ins_t;
  ins_t ins [MAXI];
  int   seq_next = 0;
  int   seq_lo = 0;            // no live instruction below this

  longint golden [NL];
  bit     slot_busy [IQN];
  int     slot_seq [IQN];

  int  pc = 0;
  bit  wrong_mode = 0;
  int  br_pend = -1;           // sequence number of the mis-predicted branch
  int  exc_list [$];           // reported exceptions (sequence numbers)
  longint total_alloc = 0, total_rel = 0;

  function automatic longint f(longint a, longint b, longint k);
    return a + (b << 1) + k;
  endfunction

  task automatic clear_inputs();
    ren_in_valid = '0; ren_has_dst = '0;
    for (int i = 0; i < RW_; i++) begin
      ren_dst[i] = '0; ren_src_valid[i] = '0; ren_iq_slot[i] = '0;
      for (int k = 0; k < NSRC; k++) ren_src[i][k] = '0;
    end
    iss_valid = '0;
    for (int i = 0; i < NI; i++) iss_slot[i] = '0;
    cancel_mask = '0;
    ip_valid = '0;
    for (int i = 0; i < NIPS; i++) ip_sid[i] = '0;
    rd_req_valid = '0;
    for (int i = 0; i < NR; i++) rd_req_preg[i] = '0;
    wb_req_valid = '0;
    for (int i = 0; i < NW; i++) begin wb_req_preg[i] = '0; wb_req_data[i] = '0; end
    br_mispred = 0; br_sid = '0; exc_valid = 0; exc_sid = '0; exc_new_state = 0;
  endtask

  // squash every live instruction with sequence number >= first
  task automatic squash_from(int first, bit undo);
    for (int s = seq_next - 1; s >= first; s--) begin
      if (ins[s].alive) begin
        if (ins[s].stage == 0 && slot_busy[ins[s].slot]) begin
          cancel_mask[ins[s].slot] = 1'b1;
          slot_busy[ins[s].slot] = 0;
        end
        ins[s].alive = 0;
      end
      if (undo && !ins[s].wrong && ins[s].p.has_dst && s < seq_next) golden[ins[s].p.dst] = ins[s].old_val;
    end
    for (int j = exc_list.size() - 1; j >= 0; j--) if (exc_list[j] >= first) exc_list.delete(j);
    if (br_pend >= first) br_pend = -1;
  endtask

  function automatic bit src_ready(int s);
    for (int k = 0; k < ins[s].p.nsrc; k++) if (!rb[ins[s].spreg[k]]) return 0;
    return 1;
  endfunction

  // ---------------------------------------------------------------- main
  int rename_block;
  bit dbg_al [NP];
  int undo_limit;

  initial begin
    clear_inputs();
    for (int q = 0; q < IQN; q++) slot_busy[q] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // initial architectural values into entry 0 of every bank
    for (int r0 = 0; r0 < NL; r0 += NW) begin
      clear_inputs();
      for (int w = 0; w < NW; w++)
        if (r0 + w < NL) begin
          golden[r0 + w] = {$urandom, $urandom};
          wb_req_valid[w] = 1; wb_req_preg[w] = PW'((r0 + w) * N); wb_req_data[w] = golden[r0 + w];
        end
      @(negedge clk);
    end
    clear_inputs();
    check(sc == 1 && lcs == 0, "reset state");

    for (int cyc = 0; cyc < CYCLES + 3000; cyc++) begin
      bit drain;
      int n_arb, n_ip, n_iss, free_slots;
      int wb_list [$];
      int arb_list [$];
      drain = cyc >= CYCLES;
      wb_list.delete();
      arb_list.delete();
      clear_inputs();
      #1;
      // ------------------------------------------------ recovery broadcast
      rename_block = 0;
      if (rec_valid) begin
        rename_block = 1;
        if (exc_taken) begin
          int first;
          first = exc_list[0];
          foreach (exc_list[j]) if (exc_list[j] < first) first = exc_list[j];
          check(rec_sid == (prog[ins[first].pidx].has_dst ? ins[first].sid - 1'b1 : ins[first].sid),
                "exception recovery point");
          if (rec_sid != (prog[ins[first].pidx].has_dst ? ins[first].sid - 1'b1 : ins[first].sid))
          pc = ins[first].pidx;
          prog[pc].exc = 0;
          wrong_mode = 0;
          squash_from(first, 1);
          c_excrec++;
        end else begin
          check(br_pend >= 0 && rec_sid == ins[br_pend].sid, "branch recovery point");
          if (br_pend >= 0) begin
            pc = ins[br_pend].pidx + 1;
            prog[ins[br_pend].pidx].mis = 0;
            squash_from(br_pend + 1, 0);
          end
          wrong_mode = 0;
          br_pend = -1;
          c_brrec++;
        end
        if (preg_release != '0) c_relrec++;
      end
      if (sb_clear) c_wrap++;
      // saturation step: clear the top bit of the StateIds the pipeline holds
      if (sb_clear)
        for (int s = 0; s < seq_next; s++)
          if (ins[s].alive || s == br_pend || s inside {exc_list}) ins[s].sid = ins[s].sid[SW-1] ? {1'b0, ins[s].sid[SW-2:0]} : '0;
      // ------------------------------------------------ Read stage results
      for (int s = seq_lo; s < seq_next; s++) begin
        if (!ins[s].alive) continue;
        if (ins[s].stage == 2) begin
          longint v [2];
          v[0] = 0; v[1] = 0;
          for (int k = 0; k < ins[s].p.nsrc; k++) begin
            v[k] = rd_data[2 * ins[s].lat + k];
            if (!ins[s].wrong) check(v[k] == ins[s].exp_src[k], "source operand value");
          end
          ins[s].res   = f(v[0], v[1], ins[s].p.k);
          ins[s].stage = 3;
          ins[s].lat   = $urandom_range(0, 4);
        end
      end
      // ------------------------------------------------ Execute / branches
      for (int s = seq_lo; s < seq_next; s++) begin
        if (!ins[s].alive || ins[s].stage != 3) continue;
        if (ins[s].lat > 0) begin ins[s].lat--; continue; end
        ins[s].stage = 4;
        if (ins[s].p.br && !ins[s].wrong && prog[ins[s].pidx].mis && !rec_valid && br_pend < 0
            && !br_mispred) begin
          br_mispred = 1; br_sid = ins[s].sid; br_pend = s;
        end
      end
      // ------------------------------------------------ write-back
      for (int s = seq_lo; s < seq_next; s++) begin
        if (!ins[s].alive || ins[s].stage != 4) continue;
        if (!ins[s].wrong && prog[ins[s].pidx].exc) begin
          if (!exc_valid) begin
            exc_valid = 1; exc_sid = ins[s].sid; exc_new_state = ins[s].p.has_dst;
            exc_list.push_back(s);
            ins[s].stage = 5;
          end
        end else if (!ins[s].p.has_dst) begin
          ins[s].stage = 5;
        end else if (wb_list.size() < NW) begin
          wb_list.push_back(s);
        end
      end
      foreach (wb_list[w]) begin
        wb_req_valid[w] = 1; wb_req_preg[w] = ins[wb_list[w]].dpreg; wb_req_data[w] = ins[wb_list[w]].res;
      end
      // ------------------------------------------------ Arbitrate
      n_arb = 0;
      for (int s = seq_lo; s < seq_next; s++) begin
        if (!ins[s].alive || ins[s].stage != 1) continue;
        for (int k = 0; k < ins[s].p.nsrc; k++) begin
          rd_req_valid[2 * n_arb + k] = 1;
          rd_req_preg[2 * n_arb + k]  = ins[s].spreg[k];
        end
        ins[s].lat = n_arb;
        arb_list.push_back(s);
        n_arb++;
      end
      // ------------------------------------------------ in-progress StateIds
      n_ip = 0;
      for (int s = seq_lo; s < seq_next; s++)
        if (ins[s].alive && ins[s].stage >= 1 && ins[s].stage <= 4) begin
          ip_valid[n_ip] = 1; ip_sid[n_ip] = ins[s].sid; n_ip++;
        end
      // ------------------------------------------------ issue
      n_iss = 0;
      for (int s = seq_lo; s < seq_next && n_iss < NI - n_arb && n_ip + n_iss < NIPS; s++) begin
        if (!ins[s].alive || ins[s].stage != 0) continue;
        if (issue_limit_valid && ins[s].sid >= issue_limit_sid) continue;
        if (!src_ready(s)) continue;
        if ($urandom_range(0, 3) == 0) continue;   // scheduling noise
        iss_valid[n_iss] = 1; iss_slot[n_iss] = QW'(ins[s].slot);
        n_iss++;
        ins[s].stage = -1;   // becomes Arbitrate after the edge
      end
      // ------------------------------------------------ rename
      free_slots = 0;
      for (int q = 0; q < IQN; q++) if (!slot_busy[q]) free_slots++;
      begin
        prog_t cand [RW_];
        int    qs [RW_];
        int    nq;
        nq = 0;
        if (!drain && !rename_block && !br_mispred && free_slots >= RW_) begin
          for (int q = 0; q < IQN && nq < RW_; q++) if (!slot_busy[q]) begin qs[nq] = q; nq++; end
          for (int i = 0; i < RW_; i++) begin
            if (wrong_mode) cand[i] = gen_ins(1);
            else begin
              if (pc + i >= prog_len) begin prog[prog_len] = gen_ins(0); prog_len++; end
              cand[i] = prog[pc + i];
            end
            ren_in_valid[i] = 1;
            ren_has_dst[i]  = cand[i].has_dst;
            ren_dst[i]      = LREG_W'(cand[i].dst);
            for (int k = 0; k < NSRC; k++) begin
              ren_src_valid[i][k] = k < cand[i].nsrc;
              ren_src[i][k] = LREG_W'(cand[i].src[k]);
            end
            ren_iq_slot[i] = QW'(qs[i]);
          end
        end
        #1;
        if (ren_stall_full) c_full++;
        if (ren_stall_same) c_same++;
        for (int i = 0; i < RW_; i++) begin
          if (!ren_accept[i]) continue;
          for (int j = 0; j < i; j++)
            if (ren_accept[j] && ren_has_dst[i] && ren_has_dst[j] && ren_dst[i] == ren_dst[j]) c_two++;
          ins[seq_next] = '{alive: 1, wrong: wrong_mode, p: cand[i], pidx: pc, slot: qs[i], stage: 0,
                            lat: 0, sid: ren_sid[i], dpreg: ren_dst_preg[i],
                            spreg: '{ren_src_preg[i][0], ren_src_preg[i][1]},
                            exp_src: '{0, 0}, res: 0, old_val: 0};
          for (int k = 0; k < cand[i].nsrc; k++) ins[seq_next].exp_src[k] = golden[cand[i].src[k]];
          if (!wrong_mode) begin
            if (cand[i].has_dst) begin
              longint e;
              e = f(ins[seq_next].exp_src[0], cand[i].nsrc > 1 ? ins[seq_next].exp_src[1] : 0, cand[i].k);
              // operands beyond nsrc read as zero
              if (cand[i].nsrc == 0) e = f(0, 0, cand[i].k);
              if (cand[i].nsrc == 1) e = f(ins[seq_next].exp_src[0], 0, cand[i].k);
              ins[seq_next].old_val = golden[cand[i].dst];
              golden[cand[i].dst] = e;
            end
            if (cand[i].br && cand[i].mis) wrong_mode = 1;
            pc++;
          end
          slot_busy[qs[i]] = 1;
          slot_seq[qs[i]] = seq_next;
          if (cand[i].has_dst) begin total_alloc++; dbg_al[ren_dst_preg[i]] = 1; end
          seq_next++;
        end
      end
      // ------------------------------------------------ grants
      foreach (arb_list[a]) begin
        int s;
        bit ok;
        s = arb_list[a];
        ok = 1;
        for (int k = 0; k < ins[s].p.nsrc; k++) if (!rd_grant[2 * ins[s].lat + k]) ok = 0;
        if (!ok) c_rdconf++;
        else ins[s].stage = 2;
      end
      for (int r = 0; r < NR; r++)
        for (int r2 = 0; r2 < r; r2++)
          if (rd_grant[r] && rd_grant[r2] && rd_req_preg[r] == rd_req_preg[r2]) c_share++;
      foreach (wb_list[w]) begin
        if (wb_grant[w]) begin ins[wb_list[w]].stage = 5; c_retired++; end
        else c_wbconf++;
      end
      for (int p = 0; p < NP; p++) if (preg_release[p]) begin total_rel++; c_rel++; dbg_al[p] = 0; end
      @(posedge clk);
      // issued entries move to Arbitrate and free their queue slot
      for (int s = seq_lo; s < seq_next; s++)
        if (ins[s].alive && ins[s].stage == -1) begin
          ins[s].stage = 1;
          slot_busy[ins[s].slot] = 0;
        end
      for (int s = seq_lo; s < seq_next; s++)
        if (ins[s].alive && ins[s].stage == 5) ins[s].alive = 0;
      while (seq_lo < seq_next && !ins[seq_lo].alive) seq_lo++;
      @(negedge clk);
      if (drain && seq_lo == seq_next && !rec_valid && !exc_pending) break;
    end

    // ---------------------------------------------------- final state
    clear_inputs();
    repeat (4) begin
      for (int p = 0; p < NP; p++) if (preg_release[p]) total_rel++;
      @(negedge clk);
    end
    check(seq_lo == seq_next, "pipeline drained");
    check(lcs == sc - 1'b1, "LCS reaches the current state");
    // allocated registers = initial ones + renamed destinations - released
    check(NL + total_alloc - total_rel == NL, "one register per bank left allocated");
    // read every logical register through its current mapping
    for (int r0 = 0; r0 < NL; r0 += RW_ * NSRC) begin
      clear_inputs();
      for (int i = 0; i < RW_; i++)
        for (int k = 0; k < NSRC; k++) ren_src[i][k] = LREG_W'(r0 + i * NSRC + k);
      #1;
      for (int i = 0; i < RW_; i++)
        for (int k = 0; k < NSRC; k++) begin
          rd_req_valid[i * NSRC + k] = 1;
          rd_req_preg[i * NSRC + k] = ren_src_preg[i][k];
        end
      #1;
      check((rd_grant & rd_req_valid) == rd_req_valid, "final reads granted");
      @(negedge clk);
      for (int i = 0; i < RW_; i++)
        for (int k = 0; k < NSRC; k++)
          check(rd_data[i * NSRC + k] == golden[r0 + i * NSRC + k], "final architectural value");
    end
    $display("mechanisms: bank_full=%0d third_rename=%0d two_renames=%0d branch_rec=%0d exc_rec=%0d",
             c_full, c_same, c_two, c_brrec, c_excrec);
    $display("            release=%0d release_by_recovery=%0d read_conflict=%0d read_share=%0d",
             c_rel, c_relrec, c_rdconf, c_share);
    $display("            wb_conflict=%0d saturation=%0d retired_writes=%0d instructions=%0d",
             c_wbconf, c_wrap, c_retired, seq_next);
    check(c_full > 0, "bank-full stall happened");
    check(c_same > 0, "third-rename stall happened");
    check(c_two > 0, "two renames of one register in a group happened");
    check(c_brrec > 0, "branch recovery happened");
    check(c_excrec > 0, "exception recovery happened");
    check(c_rel > 0, "register release happened");
    check(c_relrec > 0, "release by recovery happened");
    check(c_rdconf > 0, "read-port conflict happened");
    check(c_share > 0, "read sharing happened");
    check(c_wbconf > 0, "write-port conflict happened");
    check(c_wrap > 0, "StateId saturation step happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYCLES + 8000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
