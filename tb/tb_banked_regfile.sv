// tb_banked_regfile: self-checking testbench of the banked register file.
//
// Every physical register is written once through the write ports, then
// random conflict-free groups of reads and writes (at most one entry per bank
// per cycle, reads of the same register shared) are applied and the read
// data, one cycle later, are compared with a model of all 512 registers.
module tb_banked_regfile;
  localparam int NB = 32, N = 16, W = 64, NRD = 10, NWR = 5, PW = 9;

  logic clk = 0;
  always #5 clk = ~clk;

  logic [NRD-1:0] rd_valid;
  logic [PW-1:0]  rd_preg [NRD];
  logic [W-1:0]   rd_data [NRD];
  logic [NWR-1:0] wr_valid;
  logic [PW-1:0]  wr_preg [NWR];
  logic [W-1:0]   wr_data [NWR];

  banked_regfile #(.NB(NB), .N(N), .W(W), .NRD(NRD), .NWR(NWR)) dut (.*);

  logic [W-1:0] m [NB*N];
  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    logic [W-1:0] exp [NRD];
    int  rbank_idx [NB];
    bit  wbank [NB];
    rd_valid = '0; wr_valid = '0;
    for (int r = 0; r < NRD; r++) rd_preg[r] = '0;
    for (int w = 0; w < NWR; w++) begin wr_preg[w] = '0; wr_data[w] = '0; end
    // fill: one register per bank per cycle, on write port (bank % NWR)
    for (int e = 0; e < N; e++)
      for (int b0 = 0; b0 < NB; b0 += NWR) begin
        @(negedge clk);
        wr_valid = '0;
        for (int w = 0; w < NWR; w++)
          if (b0 + w < NB) begin
            wr_valid[w] = 1; wr_preg[w] = PW'((b0 + w) * N + e);
            wr_data[w] = {$urandom, $urandom}; m[(b0 + w) * N + e] = wr_data[w];
          end
      end
    @(negedge clk);
    wr_valid = '0;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      for (int b = 0; b < NB; b++) begin rbank_idx[b] = -1; wbank[b] = 0; end
      rd_valid = '0; wr_valid = '0;
      for (int r = 0; r < NRD; r++) begin
        int b, x;
        b = $urandom_range(0, 7); x = $urandom_range(0, N - 1);
        if (rbank_idx[b] >= 0) x = rbank_idx[b];  // share the bank's entry
        rbank_idx[b] = x;
        rd_valid[r] = 1; rd_preg[r] = PW'(b * N + x); exp[r] = m[b * N + x];
      end
      for (int w = 0; w < NWR; w++) begin
        int b;
        b = $urandom_range(0, NB - 1);
        if (!wbank[b]) begin
          wbank[b] = 1;
          wr_valid[w] = 1; wr_preg[w] = PW'(b * N + $urandom_range(0, N - 1)); wr_data[w] = {$urandom, $urandom};
        end
      end
      @(negedge clk);
      for (int w = 0; w < NWR; w++) if (wr_valid[w]) m[wr_preg[w]] = wr_data[w];
      for (int r = 0; r < NRD; r++) check(rd_data[r] == exp[r], "read data");
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
