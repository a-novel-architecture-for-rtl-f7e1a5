// msp_top: register and state management of a Multi-State Processor (MSP).
//
// The MSP keeps hundreds of instructions in flight without a re-order
// buffer and without checkpoints. Every instruction that writes a register
// opens a new processor state, numbered by the StateId Counter. Each
// logical register owns a bank of physical registers and a State Control
// Table (SCT) that records, per physical register, the StateId from which it
// holds the register's value. Renaming, commit, register release and
// recovery to any state are then local, pointer-based operations in each
// SCT, coordinated by a few global values: SC, the Last Committed StateId
// (LCS) and the Recovery StateId.
//
// This block contains everything between decode and write-back that the MSP
// adds or changes:
//   rename_control    StateIds, SC offsets, rename stall, source mapping
//   sct x NL          one State Control Table per logical register
//   ready_bits        Rb per physical register
//   reg_use_tracking  RelB/ComB bit matrices (readers, state members)
//   lcs_unit          minimum tree producing the LCS
//   recovery_control  branch and exception Recovery StateId
//   port_arbiter x2   Arbitrate stage for the read and write-back ports
//   banked_regfile    one 1R/1W bank per logical register
// The instruction queue, the functional units, the store queue and the front
// end are outside; their signals are ports:
//   ren_*      rename group in (up to RW instructions with destination,
//              sources and the instruction-queue entry they go to) and the
//              mapping out in the same cycle; ren_accept is the renamed
//              prefix, ren_stall asks the front end to hold the rest.
//   iss_*      instruction-queue entries issued this cycle.
//   cancel_mask  queue entries squashed by a recovery.
//   ip_*       StateIds of instructions in the Arbitrate/Read/Execute stages.
//   rd_req_*   operand reads in the Arbitrate stage; rd_grant in the same
//              cycle, rd_data one cycle later.
//   wb_req_*   results to write; wb_grant in the same cycle, the write and
//              the Ready bit on the next rising edge.
//   br_*       a mis-predicted branch and its StateId.
//   exc_*      an exception seen at write-back (the instruction does not
//              write back).
//   lcs        oldest uncommitted StateId (the store queue drains older
//              stores); rec_valid/rec_sid the recovery broadcast; sb_clear
//              tells the pipeline to clear the saturation bit of the
//              StateIds it holds.
// Timing and reset are those of the sub-blocks; reset is synchronous.
//
// The structure follows the published micro-architecture; the port counts
// (10 reads, 5 write-backs, 15 in-progress slots) and the interface timing
// are this design's choices.
module msp_top #(
  parameter int unsigned RW    = msp_pkg::RENAME_W,
  parameter int unsigned NL    = msp_pkg::NUM_LREGS,
  parameter int unsigned N     = msp_pkg::REGS_PER_BANK,
  parameter int unsigned SID_W = $clog2(NL*N) + 1,
  parameter int unsigned NSRC  = msp_pkg::NSRC,
  parameter int unsigned IQ    = msp_pkg::IQ_SIZE,
  parameter int unsigned NISS  = msp_pkg::ISSUE_W,
  parameter int unsigned NRD   = msp_pkg::RD_PORTS,
  parameter int unsigned NWB   = msp_pkg::WB_PORTS,
  parameter int unsigned NIP   = msp_pkg::INPROG,
  parameter int unsigned W     = msp_pkg::DATA_W
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // rename
  input  logic [RW-1:0]               ren_in_valid,
  input  logic [RW-1:0]               ren_has_dst,
  input  logic [$clog2(NL)-1:0]       ren_dst       [RW],
  input  logic [NSRC-1:0]             ren_src_valid [RW],
  input  logic [$clog2(NL)-1:0]       ren_src       [RW][NSRC],
  input  logic [$clog2(IQ)-1:0]       ren_iq_slot   [RW],
  output logic [RW-1:0]               ren_accept,
  output logic                        ren_stall,
  output logic                        ren_stall_full,
  output logic                        ren_stall_same,
  output logic [$clog2(NL*N)-1:0]     ren_dst_preg  [RW],
  output logic [$clog2(NL*N)-1:0]     ren_src_preg  [RW][NSRC],
  output logic [SID_W-1:0]            ren_sid       [RW],
  // issue, cancellation, in-progress StateIds
  input  logic [NISS-1:0]             iss_valid,
  input  logic [$clog2(IQ)-1:0]       iss_slot      [NISS],
  input  logic [IQ-1:0]               cancel_mask,
  input  logic [NIP-1:0]              ip_valid,
  input  logic [SID_W-1:0]            ip_sid        [NIP],
  // register read (Arbitrate -> Read)
  input  logic [NRD-1:0]              rd_req_valid,
  input  logic [$clog2(NL*N)-1:0]     rd_req_preg   [NRD],
  output logic [NRD-1:0]              rd_grant,
  output logic [W-1:0]                rd_data       [NRD],
  // write-back
  input  logic [NWB-1:0]              wb_req_valid,
  input  logic [$clog2(NL*N)-1:0]     wb_req_preg   [NWB],
  input  logic [W-1:0]                wb_req_data   [NWB],
  output logic [NWB-1:0]              wb_grant,
  // branch mis-prediction and exceptions
  input  logic                        br_mispred,
  input  logic [SID_W-1:0]            br_sid,
  input  logic                        exc_valid,
  input  logic [SID_W-1:0]            exc_sid,
  input  logic                        exc_new_state,
  // global state
  output logic [SID_W-1:0]            lcs,
  output logic [SID_W-1:0]            sc,
  output logic                        rec_valid,
  output logic [SID_W-1:0]            rec_sid,
  output logic                        exc_taken,
  output logic                        exc_pending,
  output logic                        issue_limit_valid,
  output logic [SID_W-1:0]            issue_limit_sid,
  output logic                        sb_clear,
  output logic [NL*N-1:0]             preg_release,
  output logic [NL*N-1:0]             rb
);

  localparam int unsigned NP     = NL * N;
  localparam int unsigned IDX_W  = $clog2(N);
  localparam int unsigned OFF_W  = $clog2(RW+1);

  // ---------------------------------------------------------- interconnect
  logic [NL-1:0]     can1, can2, com_valid;
  logic [IDX_W-1:0]  renp_idx [NL];
  logic [SID_W-1:0]  renp_sid [NL];
  logic [SID_W-1:0]  com_sid  [NL];
  logic [NP-1:0]     alloc, relb_nz, comb_nz;
  logic [RW-1:0]     ren_valid;
  logic [OFF_W-1:0]  ren_off  [RW];
  logic [$clog2(NP)-1:0] state_preg [RW];
  logic [SID_W-1:0]  lcs_raw, hold_sid;
  logic              hold_valid;

  // ------------------------------------------------------ renaming control
  rename_control #(.RW(RW), .NL(NL), .N(N), .SID_W(SID_W), .NSRC(NSRC)) u_ren (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (ren_in_valid),
    .in_has_dst (ren_has_dst),
    .in_dst     (ren_dst),
    .in_src     (ren_src),
    .can_alloc1 (can1),
    .can_alloc2 (can2),
    .renp_idx   (renp_idx),
    .renp_sid   (renp_sid),
    .block      (exc_pending),
    .rec_valid  (rec_valid),
    .rec_sid    (rec_sid),
    .lcs        (lcs),
    .accept     (ren_accept),
    .stall      (ren_stall),
    .stall_full (ren_stall_full),
    .stall_same (ren_stall_same),
    .ren_valid  (ren_valid),
    .ren_off    (ren_off),
    .sid        (ren_sid),
    .dst_preg   (ren_dst_preg),
    .src_preg   (ren_src_preg),
    .state_preg (state_preg),
    .sc         (sc),
    .sb_clear   (sb_clear)
  );

  // ------------------------------------------------- State Control Tables
  for (genvar l = 0; l < NL; l++) begin : g_sct
    logic [N-1:0] unused_vb, unused_renp, unused_comp, unused_relp;
    sct #(.N(N), .SID_W(SID_W), .RW(RW), .LREG_W($clog2(NL)), .SCT_ID(l)) u_sct (
      .clk        (clk),
      .rst_n      (rst_n),
      .ren_valid  (ren_valid),
      .ren_lreg   (ren_dst),
      .ren_off    (ren_off),
      .sc         (sc),
      .can_alloc1 (can1[l]),
      .can_alloc2 (can2[l]),
      .renp_idx   (renp_idx[l]),
      .renp_sid   (renp_sid[l]),
      .rb         (rb[l*N +: N]),
      .comb_nz    (comb_nz[l*N +: N]),
      .relb_nz    (relb_nz[l*N +: N]),
      .lcs        (lcs),
      .rec_valid  (rec_valid),
      .rec_sid    (rec_sid),
      .sb_clear   (sb_clear),
      .com_valid  (com_valid[l]),
      .com_sid    (com_sid[l]),
      .alloc_o    (alloc[l*N +: N]),
      .release_o  (preg_release[l*N +: N]),
      .vb_o       (unused_vb),
      .renp_o     (unused_renp),
      .comp_o     (unused_comp),
      .relp_o     (unused_relp)
    );
  end

  // ----------------------------------------------------- register use
  logic [RW*NSRC-1:0]    rel_set_valid;
  logic [$clog2(NP)-1:0] rel_set_preg [RW*NSRC];
  logic [$clog2(IQ)-1:0] rel_set_slot [RW*NSRC];
  logic [RW-1:0]         com_set_valid;

  always_comb begin
    for (int i = 0; i < RW; i++) begin
      for (int k = 0; k < NSRC; k++) begin
        rel_set_valid[i*NSRC + k] = ren_accept[i] && ren_src_valid[i][k];
        rel_set_preg [i*NSRC + k] = ren_src_preg[i][k];
        rel_set_slot [i*NSRC + k] = ren_iq_slot[i];
      end
      com_set_valid[i] = ren_accept[i] && !ren_has_dst[i];
    end
  end

  reg_use_tracking #(.NP(NP), .IQ(IQ), .NREL(RW*NSRC), .NCOM(RW), .NISS(NISS)) u_track (
    .clk           (clk),
    .rst_n         (rst_n),
    .rel_set_valid (rel_set_valid),
    .rel_set_preg  (rel_set_preg),
    .rel_set_slot  (rel_set_slot),
    .com_set_valid (com_set_valid),
    .com_set_preg  (state_preg),
    .com_set_slot  (ren_iq_slot),
    .issue_valid   (iss_valid),
    .issue_slot    (iss_slot),
    .cancel_mask   (cancel_mask),
    .relb_nz       (relb_nz),
    .comb_nz       (comb_nz)
  );

  // -------------------------------------------------------- write-back
  logic [NL-1:0]    wb_bank_en;
  logic [IDX_W-1:0] wb_bank_idx [NL];

  port_arbiter #(.NREQ(NWB), .NB(NL), .IDX_W(IDX_W), .SHARE(1'b0)) u_wb_arb (
    .req_valid (wb_req_valid),
    .req_preg  (wb_req_preg),
    .grant     (wb_grant),
    .bank_en   (wb_bank_en),
    .bank_idx  (wb_bank_idx)
  );

  ready_bits #(.NP(NP), .N(N), .NWB(NWB)) u_rb (
    .clk      (clk),
    .rst_n    (rst_n),
    .alloc    (alloc),
    .wb_valid (wb_grant),
    .wb_preg  (wb_req_preg),
    .rb       (rb)
  );

  // ---------------------------------------------------------- read ports
  logic [NL-1:0]    rd_bank_en;
  logic [IDX_W-1:0] rd_bank_idx [NL];

  port_arbiter #(.NREQ(NRD), .NB(NL), .IDX_W(IDX_W), .SHARE(1'b1)) u_rd_arb (
    .req_valid (rd_req_valid),
    .req_preg  (rd_req_preg),
    .grant     (rd_grant),
    .bank_en   (rd_bank_en),
    .bank_idx  (rd_bank_idx)
  );

  banked_regfile #(.NB(NL), .N(N), .W(W), .NRD(NRD), .NWR(NWB)) u_rf (
    .clk      (clk),
    .rd_valid (rd_grant),
    .rd_preg  (rd_req_preg),
    .rd_data  (rd_data),
    .wr_valid (wb_grant),
    .wr_preg  (wb_req_preg),
    .wr_data  (wb_req_data)
  );

  // ----------------------------------------------------- LCS and recovery
  lcs_unit #(.NL(NL), .NIP(NIP), .SID_W(SID_W)) u_lcs (
    .clk        (clk),
    .rst_n      (rst_n),
    .sct_valid  (com_valid),
    .sct_sid    (com_sid),
    .ip_valid   (ip_valid),
    .ip_sid     (ip_sid),
    .sc         (sc),
    .hold_valid (hold_valid),
    .hold_sid   (hold_sid),
    .sb_clear   (sb_clear),
    .lcs        (lcs),
    .lcs_raw    (lcs_raw)
  );

  recovery_control #(.SID_W(SID_W)) u_rec (
    .clk               (clk),
    .rst_n             (rst_n),
    .br_valid          (br_mispred),
    .br_sid            (br_sid),
    .exc_valid         (exc_valid),
    .exc_sid           (exc_sid),
    .exc_new_state     (exc_new_state),
    .lcs_raw           (lcs_raw),
    .sb_clear          (sb_clear),
    .rec_valid         (rec_valid),
    .rec_sid           (rec_sid),
    .exc_taken         (exc_taken),
    .block             (exc_pending),
    .hold_valid        (hold_valid),
    .hold_sid          (hold_sid),
    .issue_limit_valid (issue_limit_valid),
    .issue_limit_sid   (issue_limit_sid)
  );

endmodule
