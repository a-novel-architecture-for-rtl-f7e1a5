// tb_recovery_control: self-checking testbench of the Recovery StateId logic.
//
// Directed sequences:
//  1. a mis-predicted branch with StateId 40 gives rec_valid with 40 one
//     cycle later, for one cycle;
//  2. an exception at StateId 50 that opened a new state blocks renaming,
//     limits issue to StateIds below 50, clamps the LCS at 49, and is taken
//     (recovery to 49, exc_taken) only once lcs_raw reaches 50;
//  3. an exception without a new state recovers to its own StateId;
//  4. a younger exception reported after an older one is ignored, an older
//     one replaces it;
//  5. a branch recovery older than a pending exception drops the exception;
//  6. a saturation step clears the top bit of the pending StateIds.
module tb_recovery_control;
  localparam int SID_W = 10;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic             br_valid, exc_valid, exc_new_state, sb_clear;
  logic [SID_W-1:0] br_sid, exc_sid, lcs_raw;
  logic             rec_valid, exc_taken, block, hold_valid, issue_limit_valid;
  logic [SID_W-1:0] rec_sid, hold_sid, issue_limit_sid;

  recovery_control #(.SID_W(SID_W)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic idle();
    br_valid = 0; br_sid = '0; exc_valid = 0; exc_sid = '0; exc_new_state = 0; sb_clear = 0;
  endtask

  initial begin
    idle(); lcs_raw = 10;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!rec_valid && !block, "reset");
    // 1. branch
    br_valid = 1; br_sid = 40;
    @(negedge clk); idle();
    check(rec_valid && rec_sid == 40 && !exc_taken, "branch recovery");
    @(negedge clk);
    check(!rec_valid, "recovery lasts one cycle");
    // 2. exception that opened a new state
    exc_valid = 1; exc_sid = 50; exc_new_state = 1; lcs_raw = 45;
    @(negedge clk); idle();
    check(block && issue_limit_valid && issue_limit_sid == 50, "exception pending blocks and limits issue");
    check(hold_valid && hold_sid == 49, "clamp at previous state");
    repeat (3) @(negedge clk);
    check(!rec_valid && block, "not taken while older states are open");
    lcs_raw = 50;
    @(negedge clk);
    check(rec_valid && rec_sid == 49 && exc_taken, "taken when oldest, recovery to previous state");
    check(!block, "block released");
    @(negedge clk);
    // 3. exception without a new state
    lcs_raw = 60;
    exc_valid = 1; exc_sid = 70; exc_new_state = 0;
    @(negedge clk); idle();
    check(hold_sid == 70, "clamp at own state");
    lcs_raw = 70;
    @(negedge clk);
    check(rec_valid && rec_sid == 70 && exc_taken, "recovery to own state");
    @(negedge clk);
    // 4. ordering of exceptions
    lcs_raw = 80;
    exc_valid = 1; exc_sid = 90; exc_new_state = 0;
    @(negedge clk);
    exc_sid = 95;
    @(negedge clk);
    check(issue_limit_sid == 90, "younger exception ignored");
    exc_sid = 85;
    @(negedge clk); idle();
    check(issue_limit_sid == 85, "older exception replaces");
    // 5. older branch drops the exception
    br_valid = 1; br_sid = 82;
    @(negedge clk); idle();
    check(rec_valid && rec_sid == 82 && !exc_taken && !block, "branch drops younger exception");
    @(negedge clk);
    // 6. saturation step
    lcs_raw = 600;
    exc_valid = 1; exc_sid = 700; exc_new_state = 1;
    @(negedge clk); idle();
    sb_clear = 1;
    @(negedge clk); idle();
    check(issue_limit_sid == 700 - 512 && hold_sid == 699 - 512, "saturation bit cleared");
    lcs_raw = 700 - 512;
    @(negedge clk);
    check(rec_valid && rec_sid == 699 - 512, "taken after saturation step");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
