// banked_regfile: the physical register file, one rf_bank per logical
// register.
//
// Physical register numbers are {bank, index}. The read and write ports
// carry only requests already granted by the port arbiter, so no two of them
// address different entries of one bank in a cycle (two reads of the same
// register may share). Each bank takes the entry addressed by the requests
// for it; read data come back on every read port one cycle later (the Read
// stage), selected by the bank the port addressed. Writes take effect on the
// rising edge.
//
// The bank-per-logical-register organisation with one read and one write
// port per bank follows the published design; port counts and timing are
// this design's choices.
module banked_regfile #(
  parameter int unsigned NB  = msp_pkg::NUM_LREGS,
  parameter int unsigned N   = msp_pkg::REGS_PER_BANK,
  parameter int unsigned W   = msp_pkg::DATA_W,
  parameter int unsigned NRD = msp_pkg::RD_PORTS,
  parameter int unsigned NWR = msp_pkg::WB_PORTS
) (
  input  logic                          clk,
  input  logic [NRD-1:0]                rd_valid,
  input  logic [$clog2(NB*N)-1:0]       rd_preg [NRD],
  output logic [W-1:0]                  rd_data [NRD],
  input  logic [NWR-1:0]                wr_valid,
  input  logic [$clog2(NB*N)-1:0]       wr_preg [NWR],
  input  logic [W-1:0]                  wr_data [NWR]
);

  localparam int unsigned IDX_W = $clog2(N);
  localparam int unsigned B_W   = $clog2(NB);

  logic [NB-1:0]    re, we;
  logic [IDX_W-1:0] raddr [NB];
  logic [IDX_W-1:0] waddr [NB];
  logic [W-1:0]     wdata [NB];
  logic [W-1:0]     rdata [NB];
  logic [B_W-1:0]   rbank_q [NRD];

  always_comb begin
    re = '0;
    we = '0;
    for (int b = 0; b < NB; b++) begin
      raddr[b] = '0;
      waddr[b] = '0;
      wdata[b] = '0;
    end
    for (int r = 0; r < NRD; r++)
      if (rd_valid[r]) begin
        re[rd_preg[r][B_W+IDX_W-1:IDX_W]]    = 1'b1;
        raddr[rd_preg[r][B_W+IDX_W-1:IDX_W]] = rd_preg[r][IDX_W-1:0];
      end
    for (int w = 0; w < NWR; w++)
      if (wr_valid[w]) begin
        we[wr_preg[w][B_W+IDX_W-1:IDX_W]]    = 1'b1;
        waddr[wr_preg[w][B_W+IDX_W-1:IDX_W]] = wr_preg[w][IDX_W-1:0];
        wdata[wr_preg[w][B_W+IDX_W-1:IDX_W]] = wr_data[w];
      end
  end

  for (genvar b = 0; b < NB; b++) begin : g_bank
    rf_bank #(.N(N), .W(W)) u_bank (
      .clk  (clk),
      .we   (we[b]),
      .waddr(waddr[b]),
      .wdata(wdata[b]),
      .re   (re[b]),
      .raddr(raddr[b]),
      .rdata(rdata[b])
    );
  end

  always_ff @(posedge clk) begin
    for (int r = 0; r < NRD; r++) rbank_q[r] <= rd_preg[r][B_W+IDX_W-1:IDX_W];
  end

  always_comb begin
    for (int r = 0; r < NRD; r++) rd_data[r] = rdata[rbank_q[r]];
  end

endmodule
