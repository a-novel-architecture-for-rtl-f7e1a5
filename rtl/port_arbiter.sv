// port_arbiter: bank conflict arbitration of the Arbitrate pipeline stage.
//
// Every register-file bank has a single read port and a single write port,
// so at most one access per bank can be granted in a cycle. Requests are
// served in fixed priority order (lower index first). With SHARE set (read
// ports) a request for exactly the same physical register as the request
// already granted in that bank is granted too and shares its read ("read
// sharing"). Requests that are not granted must be retried by the issue
// logic. bank_en/bank_idx give, per bank, whether it is accessed and which
// entry. Purely combinational.
//
// One access per bank, the arbitration stage and read sharing follow the
// published design; the fixed priority order is this design's choice.
module port_arbiter #(
  parameter int unsigned NREQ  = msp_pkg::RD_PORTS,
  parameter int unsigned NB    = msp_pkg::NUM_LREGS,
  parameter int unsigned IDX_W = msp_pkg::IDX_W,
  parameter bit          SHARE = 1'b1
) (
  input  logic [NREQ-1:0]                 req_valid,
  input  logic [$clog2(NB)+IDX_W-1:0]     req_preg [NREQ],
  output logic [NREQ-1:0]                 grant,
  output logic [NB-1:0]                   bank_en,
  output logic [IDX_W-1:0]                bank_idx [NB]
);

  localparam int unsigned B_W = $clog2(NB);

  always_comb begin
    logic [B_W-1:0]   b;
    logic [IDX_W-1:0] x;
    grant   = '0;
    bank_en = '0;
    for (int k = 0; k < NB; k++) bank_idx[k] = '0;
    for (int r = 0; r < NREQ; r++) begin
      b = req_preg[r][B_W+IDX_W-1:IDX_W];
      x = req_preg[r][IDX_W-1:0];
      if (req_valid[r]) begin
        if (!bank_en[b]) begin
          grant[r]    = 1'b1;
          bank_en[b]  = 1'b1;
          bank_idx[b] = x;
        end else if (SHARE && bank_idx[b] == x) begin
          grant[r] = 1'b1;
        end
      end
    end
  end

endmodule
