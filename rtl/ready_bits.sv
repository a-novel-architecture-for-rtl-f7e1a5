// ready_bits: one Ready bit (Rb) per physical register.
//
// Rb[p] says that the value of physical register p has been produced. It is
// cleared when renaming allocates p to a new destination (alloc) and set
// when a write-back port writes p (wb_valid/wb_preg). Allocation wins if both
// hit the same register in one cycle, which a correct pipeline never does.
// After a synchronous reset entry 0 of every bank (the initial architectural
// mapping of each logical register) is ready and all others are not.
// Updates on the rising edge; rb is the registered vector.
//
// The Ready bits and their set/clear events follow the published design; the
// reset values are this design's choice.
module ready_bits #(
  parameter int unsigned NP  = msp_pkg::NUM_PREGS,
  parameter int unsigned N   = msp_pkg::REGS_PER_BANK,
  parameter int unsigned NWB = msp_pkg::WB_PORTS
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NP-1:0]         alloc,
  input  logic [NWB-1:0]        wb_valid,
  input  logic [$clog2(NP)-1:0] wb_preg [NWB],
  output logic [NP-1:0]         rb
);

  logic [NP-1:0] rb_q, set;

  always_comb begin
    set = '0;
    for (int i = 0; i < NWB; i++)
      if (wb_valid[i]) set[wb_preg[i]] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int p = 0; p < NP; p++) rb_q[p] <= (p % N) == 0;
    end else begin
      rb_q <= (rb_q | set) & ~alloc;
    end
  end

  assign rb = rb_q;

endmodule
