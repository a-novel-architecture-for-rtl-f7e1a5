// tb_rf_bank: self-checking testbench of one register-file bank.
//
// All 16 entries are written first, then random simultaneous reads and
// writes are compared with an array model. The read data must appear one
// cycle after the read, and a read of the entry written in the same cycle
// must return the old value.
module tb_rf_bank;
  localparam int N = 16, W = 64;

  logic clk = 0;
  always #5 clk = ~clk;

  logic         we, re;
  logic [3:0]   waddr, raddr;
  logic [W-1:0] wdata, rdata;

  rf_bank #(.N(N), .W(W)) dut (.*);

  logic [W-1:0] m [N];
  int checks = 0, failures = 0, n_rw_same = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    logic [W-1:0] exp;
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0;
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      we = 1; waddr = 4'(i); wdata = {$urandom, $urandom}; m[i] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      we = $urandom_range(0, 1); waddr = 4'($urandom); wdata = {$urandom, $urandom};
      re = 1; raddr = ($urandom_range(0, 3) == 0) ? waddr : 4'($urandom);
      exp = m[raddr];
      if (we && waddr == raddr) n_rw_same++;
      if (we) m[waddr] = wdata;
      @(negedge clk);
      check(rdata == exp, "read data one cycle later, old value on same-entry write");
    end
    // rdata holds while re is low
    re = 0; we = 0; exp = rdata;
    @(negedge clk);
    check(rdata == exp, "read data holds");
    check(n_rw_same > 0, "read and write of one entry happened");
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
