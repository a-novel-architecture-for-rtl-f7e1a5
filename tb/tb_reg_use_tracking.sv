// tb_reg_use_tracking: self-checking testbench of the RelB/ComB matrices.
//
// Random renames set bits for random physical registers and queue entries,
// random issues clear queue columns, and occasional recoveries clear a
// random set of columns. A bit-matrix model in the testbench predicts the
// per-register non-zero flags, which are compared every cycle. A directed
// case checks that a column cleared and set again in the same cycle (queue
// entry re-used) keeps its new bit.
module tb_reg_use_tracking;
  localparam int NP = 512, IQ = 128, NREL = 8, NCOM = 4, NISS = 5;
  localparam int PW = 9, QW = 7;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NREL-1:0] rel_set_valid;
  logic [PW-1:0]   rel_set_preg [NREL];
  logic [QW-1:0]   rel_set_slot [NREL];
  logic [NCOM-1:0] com_set_valid;
  logic [PW-1:0]   com_set_preg [NCOM];
  logic [QW-1:0]   com_set_slot [NCOM];
  logic [NISS-1:0] issue_valid;
  logic [QW-1:0]   issue_slot [NISS];
  logic [IQ-1:0]   cancel_mask;
  logic [NP-1:0]   relb_nz, comb_nz;

  reg_use_tracking #(.NP(NP), .IQ(IQ), .NREL(NREL), .NCOM(NCOM), .NISS(NISS)) dut (.*);

  bit m_rel [NP][IQ];
  bit m_com [NP][IQ];
  int checks = 0, failures = 0, n_cancel = 0, n_clear_to_zero = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic idle();
    rel_set_valid = '0; com_set_valid = '0; issue_valid = '0; cancel_mask = '0;
    for (int i = 0; i < NREL; i++) begin rel_set_preg[i] = '0; rel_set_slot[i] = '0; end
    for (int i = 0; i < NCOM; i++) begin com_set_preg[i] = '0; com_set_slot[i] = '0; end
    for (int i = 0; i < NISS; i++) issue_slot[i] = '0;
  endtask

  task automatic model_step();
    bit clr [IQ];
    for (int q = 0; q < IQ; q++) clr[q] = cancel_mask[q];
    for (int i = 0; i < NISS; i++) if (issue_valid[i]) clr[issue_slot[i]] = 1;
    for (int p = 0; p < NP; p++)
      for (int q = 0; q < IQ; q++)
        if (clr[q]) begin m_rel[p][q] = 0; m_com[p][q] = 0; end
    for (int i = 0; i < NREL; i++) if (rel_set_valid[i]) m_rel[rel_set_preg[i]][rel_set_slot[i]] = 1;
    for (int i = 0; i < NCOM; i++) if (com_set_valid[i]) m_com[com_set_preg[i]][com_set_slot[i]] = 1;
  endtask

  task automatic compare();
    for (int p = 0; p < NP; p++) begin
      bit r, c;
      r = 0; c = 0;
      for (int q = 0; q < IQ; q++) begin r |= m_rel[p][q]; c |= m_com[p][q]; end
      check(relb_nz[p] == r, "relb_nz");
      check(comb_nz[p] == c, "comb_nz");
    end
  endtask

  initial begin
    idle();
    for (int p = 0; p < NP; p++) for (int q = 0; q < IQ; q++) begin m_rel[p][q] = 0; m_com[p][q] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    compare();
    // directed: register 7 read by queue entry 5, entry 5 issues and is re-used
    rel_set_valid[0] = 1; rel_set_preg[0] = 7; rel_set_slot[0] = 5;
    model_step(); @(negedge clk); compare();
    check(relb_nz[7], "directed set");
    idle();
    issue_valid[0] = 1; issue_slot[0] = 5;
    rel_set_valid[1] = 1; rel_set_preg[1] = 9; rel_set_slot[1] = 5;
    model_step(); @(negedge clk); compare();
    check(!relb_nz[7] && relb_nz[9], "directed re-use of a queue entry");
    idle();
    // random
    for (int cyc = 0; cyc < 600; cyc++) begin
      idle();
      // few registers so that rows fill and empty
      for (int i = 0; i < NREL; i++) begin
        rel_set_valid[i] = $urandom_range(0, 2) == 0;
        rel_set_preg[i]  = PW'($urandom_range(0, 40));
        rel_set_slot[i]  = QW'($urandom_range(0, IQ - 1));
      end
      for (int i = 0; i < NCOM; i++) begin
        com_set_valid[i] = $urandom_range(0, 2) == 0;
        com_set_preg[i]  = PW'($urandom_range(0, 40));
        com_set_slot[i]  = QW'($urandom_range(0, IQ - 1));
      end
      for (int i = 0; i < NISS; i++) begin
        issue_valid[i] = $urandom_range(0, 1);
        issue_slot[i]  = QW'($urandom_range(0, IQ - 1));
      end
      if ($urandom_range(0, 29) == 0) begin
        for (int q = 0; q < IQ; q++) cancel_mask[q] = $urandom_range(0, 1);
        n_cancel++;
      end
      begin
        bit r3_pre, r3_post;
        r3_pre = relb_nz[3];
        model_step();
        @(negedge clk);
        r3_post = relb_nz[3];
        if (r3_pre && !r3_post) n_clear_to_zero++;
      end
      compare();
    end
    check(n_cancel > 0 && n_clear_to_zero > 0, "cancellation and release of all readers happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
