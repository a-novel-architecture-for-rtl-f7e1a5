// rename_control: global renaming control and StateId Counter (SC).
//
// Each cycle a group of up to RW decoded instructions arrives. An
// instruction that writes a destination register opens a new processor state;
// SC holds the StateId the next such instruction receives. For instruction i
// the SC-offset is the number of accepted destination writers before it in
// the group: a writer gets StateId SC + offset, any other instruction the
// current state SC + offset - 1.
//
// Stall: the group is accepted in order up to the first instruction that
// cannot be renamed. An instruction fails when its destination register
// already has MAX_SAME (2) renames in this group, or when its register's
// SCT has no free entry for it (can_alloc1 for the first rename,
// can_alloc2 for the second). All renames are held off while 'block' is high
// (a pending exception), in a recovery cycle, and while the saturation step
// is due. stall is high when a valid instruction is not accepted;
// stall_full and stall_same say why.
//
// Mapping: a destination gets physical register {LogRegId, RenP+1} or
// {LogRegId, RenP+2} of its bank. A source gets the destination of the
// newest earlier writer of the same register in the group, otherwise the
// current mapping {LogRegId, RenP}. state_preg names the register whose
// state the instruction belongs to (for ComB tracking of instructions
// without destination): the newest earlier writer in the group, otherwise
// the SCT whose RenP entry holds StateId SC-1.
//
// Saturation: SC has log2(M) bits plus a saturation bit. When a full group
// could leave SC past the all-ones value, and the LCS shows every uncommitted
// state already has the saturation bit set, sb_clear is raised for one cycle
// (all stored StateIds drop the bit) and SC drops by M.
//
// Recovery: on rec_valid SC becomes rec_sid + 1, so the next writer follows
// the recovered state.
//
// Timing: all outputs except sc are combinational from the inputs and SC;
// SC updates on the rising edge. Synchronous reset sets SC to 1 (state 0 is
// the initial mapping of every register).
//
// The StateId assignment, SC offsets, the two-renames-per-register limit and
// the stall follow the published design; the in-order partial acceptance,
// the state_preg lookup and the saturation trigger are this design's own.
module rename_control #(
  parameter int unsigned RW     = msp_pkg::RENAME_W,
  parameter int unsigned NL     = msp_pkg::NUM_LREGS,
  parameter int unsigned N      = msp_pkg::REGS_PER_BANK,
  parameter int unsigned SID_W  = msp_pkg::SID_W,
  parameter int unsigned NSRC   = msp_pkg::NSRC,
  parameter int unsigned MAX_SAME = msp_pkg::MAX_SAME
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic [RW-1:0]                     in_valid,
  input  logic [RW-1:0]                     in_has_dst,
  input  logic [$clog2(NL)-1:0]             in_dst     [RW],
  input  logic [$clog2(NL)-1:0]             in_src     [RW][NSRC],
  input  logic [NL-1:0]                     can_alloc1,
  input  logic [NL-1:0]                     can_alloc2,
  input  logic [$clog2(N)-1:0]              renp_idx   [NL],
  input  logic [SID_W-1:0]                  renp_sid   [NL],
  input  logic                              block,
  input  logic                              rec_valid,
  input  logic [SID_W-1:0]                  rec_sid,
  input  logic [SID_W-1:0]                  lcs,
  output logic [RW-1:0]                     accept,
  output logic                              stall,
  output logic                              stall_full,
  output logic                              stall_same,
  output logic [RW-1:0]                     ren_valid,
  output logic [$clog2(RW+1)-1:0]           ren_off    [RW],
  output logic [SID_W-1:0]                  sid        [RW],
  output logic [$clog2(NL)+$clog2(N)-1:0]   dst_preg   [RW],
  output logic [$clog2(NL)+$clog2(N)-1:0]   src_preg   [RW][NSRC],
  output logic [$clog2(NL)+$clog2(N)-1:0]   state_preg [RW],
  output logic [SID_W-1:0]                  sc,
  output logic                              sb_clear
);

  localparam int unsigned LREG_W = $clog2(NL);
  localparam int unsigned IDX_W  = $clog2(N);
  localparam int unsigned PREG_W = LREG_W + IDX_W;
  localparam int unsigned OFF_W  = $clog2(RW+1);
  localparam int unsigned M      = NL * N;
  localparam logic [SID_W:0] MAXV = {1'b0, {SID_W{1'b1}}};

  logic [SID_W-1:0] sc_q;
  logic             wrap_due, hold;
  logic [OFF_W-1:0] n_dst;
  logic [PREG_W-1:0] cur_state_preg;

  assign sc       = sc_q;
  assign wrap_due = ({1'b0, sc_q} + (SID_W+1)'(RW)) > MAXV;
  assign sb_clear = wrap_due && lcs[SID_W-1] && !rec_valid;
  assign hold     = block || rec_valid || wrap_due;

  // Register holding the current state (StateId SC-1).
  always_comb begin
    cur_state_preg = '0;
    for (int k = NL - 1; k >= 0; k--)
      if (renp_sid[k] == sc_q - 1'b1) cur_state_preg = {LREG_W'(k), renp_idx[k]};
  end

  always_comb begin
    logic             ok;
    logic [1:0]       same;
    logic [OFF_W-1:0] off;
    logic [PREG_W-1:0] last_state;
    logic             fail;
    logic [RW-1:0]    acc;
    acc        = '0;
    ok         = !hold;
    off        = '0;
    last_state = cur_state_preg;
    stall_full = 1'b0;
    stall_same = 1'b0;
    for (int i = 0; i < RW; i++) begin
      // earlier accepted renames of the same register in this group
      same = '0;
      for (int j = 0; j < i; j++)
        if (acc[j] && in_has_dst[j] && in_dst[j] == in_dst[i]) same = same + 2'd1;
      fail = 1'b0;
      if (in_valid[i] && in_has_dst[i]) begin
        if (32'(same) >= MAX_SAME) begin
          fail = 1'b1;
          if (ok) stall_same = 1'b1;
        end else if ((same == 2'd0 && !can_alloc1[in_dst[i]]) ||
                     (same == 2'd1 && !can_alloc2[in_dst[i]])) begin
          fail = 1'b1;
          if (ok) stall_full = 1'b1;
        end
      end
      if (fail) ok = 1'b0;
      acc[i]       = ok && in_valid[i];
      ren_valid[i] = acc[i] && in_has_dst[i];
      ren_off[i]   = off;
      sid[i]       = ren_valid[i] ? sc_q + SID_W'(off) : sc_q + SID_W'(off) - 1'b1;
      dst_preg[i]  = {in_dst[i], renp_idx[in_dst[i]] + IDX_W'(same) + 1'b1};
      state_preg[i] = ren_valid[i] ? dst_preg[i] : last_state;
      for (int k = 0; k < NSRC; k++) begin
        src_preg[i][k] = {in_src[i][k], renp_idx[in_src[i][k]]};
        for (int j = 0; j < i; j++)
          if (ren_valid[j] && in_dst[j] == in_src[i][k]) src_preg[i][k] = dst_preg[j];
      end
      if (ren_valid[i]) begin
        off        = off + 1'b1;
        last_state = dst_preg[i];
      end
    end
    n_dst  = off;
    accept = acc;
  end

  assign stall = (in_valid & ~accept) != '0;

  always_ff @(posedge clk) begin
    if (!rst_n)          sc_q <= SID_W'(1);
    else if (rec_valid)  sc_q <= rec_sid + 1'b1;
    else if (sb_clear)   sc_q <= sc_q - SID_W'(M);
    else                 sc_q <= sc_q + SID_W'(n_dst);
  end

  a_sc_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    !rec_valid && !sb_clear |-> ({1'b0, sc_q} + (SID_W+1)'(n_dst)) <= MAXV);

endmodule
