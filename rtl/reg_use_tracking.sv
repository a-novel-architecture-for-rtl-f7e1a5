// reg_use_tracking: RelB and ComB bit matrices of the register use tracking.
//
// Each physical register p owns two bit vectors with one bit per
// instruction-queue entry q:
//   RelB[p][q]  the instruction in queue entry q still has to read p;
//   ComB[p][q]  the instruction in queue entry q has no destination, belongs
//               to the state p opened, and has not yet issued.
// Renaming sets bits (rel_set_* once per renamed source operand, com_set_*
// once per renamed instruction without destination). Issue of queue entry q
// clears column q of both matrices, which removes that instruction's
// reads and its state membership at once. A recovery clears the columns of
// all cancelled queue entries (cancel_mask). Clears are applied before sets,
// so a queue entry re-used in the same cycle keeps its new bits.
//
// The outputs relb_nz[p] and comb_nz[p] are the OR of each row; the SCTs use
// them to advance the release (RelP) and commit (ComP) pointers. The
// matrices change on the rising edge, the outputs follow the registered
// matrices. Synchronous reset clears everything.
//
// The bit-vector scheme, its set/clear events and its use follow the
// published design; port counts are set by the rename and issue widths.
module reg_use_tracking #(
  parameter int unsigned NP    = msp_pkg::NUM_PREGS,
  parameter int unsigned IQ    = msp_pkg::IQ_SIZE,
  parameter int unsigned NREL  = msp_pkg::RENAME_W * msp_pkg::NSRC,
  parameter int unsigned NCOM  = msp_pkg::RENAME_W,
  parameter int unsigned NISS  = msp_pkg::ISSUE_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NREL-1:0]       rel_set_valid,
  input  logic [$clog2(NP)-1:0] rel_set_preg [NREL],
  input  logic [$clog2(IQ)-1:0] rel_set_slot [NREL],
  input  logic [NCOM-1:0]       com_set_valid,
  input  logic [$clog2(NP)-1:0] com_set_preg [NCOM],
  input  logic [$clog2(IQ)-1:0] com_set_slot [NCOM],
  input  logic [NISS-1:0]       issue_valid,
  input  logic [$clog2(IQ)-1:0] issue_slot   [NISS],
  input  logic [IQ-1:0]         cancel_mask,
  output logic [NP-1:0]         relb_nz,
  output logic [NP-1:0]         comb_nz
);

  logic [IQ-1:0] relb_q [NP];
  logic [IQ-1:0] comb_q [NP];
  logic [IQ-1:0] clr;

  always_comb begin
    clr = cancel_mask;
    for (int i = 0; i < NISS; i++)
      if (issue_valid[i]) clr[issue_slot[i]] = 1'b1;
  end

  for (genvar p = 0; p < NP; p++) begin : g_row
    logic [IQ-1:0] rel_set, com_set;

    always_comb begin
      rel_set = '0;
      com_set = '0;
      for (int i = 0; i < NREL; i++)
        if (rel_set_valid[i] && rel_set_preg[i] == $clog2(NP)'(p)) rel_set[rel_set_slot[i]] = 1'b1;
      for (int i = 0; i < NCOM; i++)
        if (com_set_valid[i] && com_set_preg[i] == $clog2(NP)'(p)) com_set[com_set_slot[i]] = 1'b1;
    end

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        relb_q[p] <= '0;
        comb_q[p] <= '0;
      end else begin
        relb_q[p] <= (relb_q[p] & ~clr) | rel_set;
        comb_q[p] <= (comb_q[p] & ~clr) | com_set;
      end
    end
  end

  for (genvar p = 0; p < NP; p++) begin : g_nz
    assign relb_nz[p] = |relb_q[p];
    assign comb_nz[p] = |comb_q[p];
  end

endmodule
