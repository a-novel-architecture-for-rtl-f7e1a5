// sct: State Control Table and local scope control of one logical register.
//
// Each of the N entries stands for one physical register of this logical
// register's bank and holds a Valid bit (Vb) and the Lower StateId of the
// register's StateId range; the Upper StateId is implicit (next entry's
// StateId minus one, open for the newest entry). Three one-hot pointers walk
// the entries as a circular FIFO:
//   RenP  newest allocated entry (the current mapping of the register),
//   ComP  oldest entry whose state is not yet complete,
//   RelP  oldest entry still allocated.
// Range StateId comparators turn a broadcast StateId into a one-hot entry
// pointer: the Last Committed StateId (LCS) gives LCP and the Recovery
// StateId gives RecP. Cyclic priority encoders move ComP and RelP forward by
// any number of entries in one cycle.
//
// Rename: the SCT compares the LogRegIds of the rename group with its own id
// (SCT_ID), takes the first and second match, and writes entries RenP+1 and
// RenP+2 with SC + SC-offset of those instructions; RenP moves by 0, 1 or 2.
// can_alloc1/can_alloc2 tell the renaming control whether one or two free
// entries follow RenP; the SCT itself never overwrites a valid entry.
//
// Commit: ComP stops at the first entry, from ComP on, that is RenP, is not
// ready (Rb=0) or still has issued-pending instructions of its state (ComB
// non-zero). If that entry is incomplete its StateId is this SCT's input to
// the LCS minimum (com_valid), otherwise the SCT offers nothing.
//
// Release: RelP stops at the first entry, from RelP on, whose successor
// entry's StateId is not below the LCS (rel_keep: its range reaches the LCS
// or LCS-1), that is ComP or RenP, is not ready, or still has readers (RelB non-zero) or
// unissued state members (ComB non-zero). Entries passed are freed
// (release_o pulse). An entry is thus freed only when the next entry's
// StateId is below the LCS: the oldest incomplete state may still raise an
// exception and return to the state just before it, so that state keeps its
// mapping.
//
// Recovery: when rec_valid is high every valid entry with StateId greater
// than rec_sid is freed, RenP moves to RecP and ComP is pulled back to RecP
// if it was beyond it.
//
// Saturation: on sb_clear the saturation (top) bit of every stored StateId
// is cleared; an entry whose bit was already zero (a long-committed mapping)
// is set to StateId 0 so it stays older than every live state.
//
// Timing: all table state changes on the rising clock edge; can_alloc*,
// renp_*, com_* and the pointer outputs are combinational from the table
// and the current inputs. Reset: entry 0 valid with StateId 0 (the initial
// architectural mapping), all pointers on entry 0; reset is synchronous.
//
// The table, pointers, comparators, encoders and the renaming logic follow
// the published design; the release limit (successor StateId below LCS),
// the handling of long-lived entries on saturation and the stop conditions of
// the encoders where the design is not explicit are this design's choices.
module sct #(
  parameter int unsigned N      = msp_pkg::REGS_PER_BANK,
  parameter int unsigned SID_W  = msp_pkg::SID_W,
  parameter int unsigned RW     = msp_pkg::RENAME_W,
  parameter int unsigned LREG_W = msp_pkg::LREG_W,
  parameter int unsigned SCT_ID = 0
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // rename group (only accepted instructions with a destination are valid)
  input  logic [RW-1:0]              ren_valid,
  input  logic [LREG_W-1:0]          ren_lreg [RW],
  input  logic [$clog2(RW+1)-1:0]    ren_off  [RW],
  input  logic [SID_W-1:0]           sc,
  output logic                       can_alloc1,
  output logic                       can_alloc2,
  output logic [$clog2(N)-1:0]       renp_idx,
  output logic [SID_W-1:0]           renp_sid,
  // per-entry status from the ready bits and register use tracking
  input  logic [N-1:0]               rb,
  input  logic [N-1:0]               comb_nz,
  input  logic [N-1:0]               relb_nz,
  // global scope
  input  logic [SID_W-1:0]           lcs,
  input  logic                       rec_valid,
  input  logic [SID_W-1:0]           rec_sid,
  input  logic                       sb_clear,
  output logic                       com_valid,
  output logic [SID_W-1:0]           com_sid,
  output logic [N-1:0]               alloc_o,
  output logic [N-1:0]               release_o,
  output logic [N-1:0]               vb_o,
  output logic [N-1:0]               renp_o,
  output logic [N-1:0]               comp_o,
  output logic [N-1:0]               relp_o
);

  localparam int unsigned IDX_W = $clog2(N);

  logic [N-1:0]     vb_q;
  logic [SID_W-1:0] sid_q [N];
  logic [N-1:0]     renp_q, comp_q, relp_q;

  function automatic logic [N-1:0] rotl(input logic [N-1:0] v, input int unsigned by);
    logic [N-1:0] r;
    for (int unsigned j = 0; j < N; j++) r[(j + by) % N] = v[j];
    return r;
  endfunction

  function automatic logic [IDX_W-1:0] oh2idx(input logic [N-1:0] v);
    logic [IDX_W-1:0] r;
    r = '0;
    for (int unsigned j = 0; j < N; j++) if (v[j]) r |= IDX_W'(j);
    return r;
  endfunction

  // Range StateId comparators: one-hot entry whose range holds x.
  function automatic logic [N-1:0] range_ptr(input logic [SID_W-1:0] x);
    logic [N-1:0] r;
    for (int unsigned j = 0; j < N; j++)
      r[j] = vb_q[j] && (sid_q[j] <= x) && (renp_q[j] || (sid_q[(j + 1) % N] > x));
    return r;
  endfunction

  // Cyclic priority encoder: first stop bit at or after one-hot position start.
  function automatic logic [N-1:0] cyc_first(input logic [N-1:0] start,
                                             input logic [N-1:0] stop);
    logic [N-1:0]     r;
    logic [IDX_W-1:0] s, k;
    logic             found;
    r = '0;
    found = 1'b0;
    s = oh2idx(start);
    for (int unsigned d = 0; d < N; d++) begin
      k = s + IDX_W'(d);
      if (!found && stop[k]) begin
        r[k]  = 1'b1;
        found = 1'b1;
      end
    end
    return r;
  endfunction

  // Entries strictly between one-hot positions from (inclusive) and to (exclusive).
  function automatic logic [N-1:0] cyc_span(input logic [N-1:0] from, input logic [N-1:0] to);
    logic [N-1:0]     r;
    logic [IDX_W-1:0] s, k;
    logic             done;
    r = '0;
    done = 1'b0;
    s = oh2idx(from);
    for (int unsigned d = 0; d < N; d++) begin
      k = s + IDX_W'(d);
      if (to[k]) done = 1'b1;
      if (!done) r[k] = 1'b1;
    end
    return r;
  endfunction

  // ---------------------------------------------------------------- rename
  logic [1:0]       n_new;
  logic [SID_W-1:0] new_sid1, new_sid2;

  always_comb begin
    n_new    = 2'd0;
    new_sid1 = '0;
    new_sid2 = '0;
    for (int unsigned i = 0; i < RW; i++) begin
      if (ren_valid[i] && ren_lreg[i] == LREG_W'(SCT_ID)) begin
        if (n_new == 2'd0)      new_sid1 = sc + SID_W'(ren_off[i]);
        else if (n_new == 2'd1) new_sid2 = sc + SID_W'(ren_off[i]);
        if (n_new != 2'd2) n_new = n_new + 2'd1;
      end
    end
  end

  logic [N-1:0] nxt1, nxt2;
  assign nxt1       = rotl(renp_q, 1);
  assign nxt2       = rotl(renp_q, 2);
  assign can_alloc1 = ~|(nxt1 & vb_q);
  assign can_alloc2 = can_alloc1 && ~|(nxt2 & vb_q);
  assign renp_idx   = oh2idx(renp_q);
  always_comb begin
    renp_sid = '0;
    for (int unsigned j = 0; j < N; j++) if (renp_q[j]) renp_sid = sid_q[j];
  end

  // ---------------------------------------------------- commit and release
  logic [N-1:0]     lcp, recp, kill, rel_keep;
  logic [N-1:0] com_stop, rel_stop, comp_nxt, relp_nxt, rel_span;

  assign lcp      = range_ptr(lcs);
  always_comb
    for (int unsigned j = 0; j < N; j++) rel_keep[j] = sid_q[(j + 1) % N] >= lcs;
  assign recp     = range_ptr(rec_sid);
  assign com_stop = renp_q | ~rb | comb_nz;
  assign rel_stop = rel_keep | comp_q | renp_q | ~rb | relb_nz | comb_nz;
  assign comp_nxt = cyc_first(comp_q, com_stop);
  assign relp_nxt = cyc_first(relp_q, rel_stop);
  assign rel_span = cyc_span(relp_q, relp_nxt);

  always_comb begin
    com_valid = 1'b0;
    com_sid   = '0;
    for (int unsigned j = 0; j < N; j++)
      if (comp_nxt[j]) begin
        com_valid = ~rb[j] | comb_nz[j];
        com_sid   = sid_q[j];
      end
  end

  always_comb begin
    for (int unsigned j = 0; j < N; j++) kill[j] = rec_valid && vb_q[j] && (sid_q[j] > rec_sid);
  end

  assign alloc_o   = (n_new >= 2'd1 ? nxt1 : '0) | (n_new == 2'd2 ? nxt2 : '0);
  assign release_o = rel_span | kill;
  assign vb_o      = vb_q;
  assign renp_o    = renp_q;
  assign comp_o    = comp_q;
  assign relp_o    = relp_q;

  // ---------------------------------------------------------------- state
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vb_q   <= N'(1);
      renp_q <= N'(1);
      comp_q <= N'(1);
      relp_q <= N'(1);
      for (int unsigned j = 0; j < N; j++) sid_q[j] <= '0;
    end else begin
      for (int unsigned j = 0; j < N; j++) begin
        if (sb_clear)
          sid_q[j] <= sid_q[j][SID_W-1] ? {1'b0, sid_q[j][SID_W-2:0]} : '0;
        else if (n_new >= 2'd1 && nxt1[j])
          sid_q[j] <= new_sid1;
        else if (n_new == 2'd2 && nxt2[j])
          sid_q[j] <= new_sid2;
      end
      vb_q   <= (vb_q & ~release_o) | alloc_o;
      relp_q <= relp_nxt;
      if (rec_valid && (|recp)) begin
        renp_q <= recp;
        comp_q <= (kill & comp_nxt) != '0 ? recp : comp_nxt;
      end else begin
        renp_q <= rotl(renp_q, int'(n_new));
        comp_q <= comp_nxt;
      end
    end
  end

  // A rename never lands on an allocated entry; pointers stay one-hot.
  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n)
    (alloc_o & vb_q) == '0);
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot(renp_q) && $onehot(comp_q) && $onehot(relp_q));
  a_no_rename_in_recovery: assert property (@(posedge clk) disable iff (!rst_n)
    rec_valid |-> n_new == 2'd0);
  // Allocated entries form one run from RelP to RenP.
  a_contiguous: assert property (@(posedge clk) disable iff (!rst_n)
    vb_q == (cyc_span(relp_q, renp_q) | renp_q));
  // The mapping of every state a recovery can return to is still allocated.
  a_recovery_finds_entry: assert property (@(posedge clk) disable iff (!rst_n)
    rec_valid |-> recp != '0);

endmodule
