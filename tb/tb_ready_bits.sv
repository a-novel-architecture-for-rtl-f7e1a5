// tb_ready_bits: self-checking testbench of the Ready bits.
//
// After reset only entry 0 of every bank must be ready. Random allocations
// clear bits and random write-backs set them; a model in the testbench
// predicts every bit after every edge.
module tb_ready_bits;
  localparam int NP = 512, N = 16, NWB = 5, PW = 9;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NP-1:0]  alloc, rb;
  logic [NWB-1:0] wb_valid;
  logic [PW-1:0]  wb_preg [NWB];

  ready_bits #(.NP(NP), .N(N), .NWB(NWB)) dut (.*);

  bit m [NP];
  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    alloc = '0; wb_valid = '0;
    for (int i = 0; i < NWB; i++) wb_preg[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int p = 0; p < NP; p++) begin
      m[p] = (p % N) == 0;
      check(rb[p] == m[p], "reset value");
    end
    for (int cyc = 0; cyc < 2000; cyc++) begin
      alloc = '0;
      for (int k = 0; k < 4; k++) alloc[$urandom_range(0, NP - 1)] = 1'b1;
      for (int i = 0; i < NWB; i++) begin
        wb_valid[i] = $urandom_range(0, 1);
        wb_preg[i]  = PW'($urandom_range(0, NP - 1));
      end
      for (int i = 0; i < NWB; i++) if (wb_valid[i]) m[wb_preg[i]] = 1;
      for (int p = 0; p < NP; p++) if (alloc[p]) m[p] = 0;
      @(negedge clk);
      for (int p = 0; p < NP; p++) check(rb[p] == m[p], "rb");
    end
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
