// rf_bank: one bank of the banked physical register file.
//
// A bank holds the N physical registers of one logical register, each W bits
// wide, with one read port and one write port. The write happens on the
// rising edge when we is high. The read is synchronous: with re high the
// entry at raddr appears on rdata after the next rising edge and stays there
// until the next read. A read and a write of the same entry in one cycle
// return the old value. The array has no reset.
//
// The size (16 x 64 bits for the 16-SP configuration) and the 1R/1W port
// structure follow the published design; the read timing is this design's.
module rf_bank #(
  parameter int unsigned N = msp_pkg::REGS_PER_BANK,
  parameter int unsigned W = msp_pkg::DATA_W
) (
  input  logic                 clk,
  input  logic                 we,
  input  logic [$clog2(N)-1:0] waddr,
  input  logic [W-1:0]         wdata,
  input  logic                 re,
  input  logic [$clog2(N)-1:0] raddr,
  output logic [W-1:0]         rdata
);

  logic [W-1:0] mem [N];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
