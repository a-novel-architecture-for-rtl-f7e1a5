// lcs_unit: Last Committed StateId (LCS) computation.
//
// The LCS is the oldest StateId that is not yet complete: every state with a
// smaller StateId is committed and can never be recovered to. It is the
// minimum of
//   - the StateId at ComP of every SCT that offers one (sct_valid),
//   - the StateIds of instructions issued but still in the pipeline
//     (ip_valid/ip_sid, the Arbitrate, Read and Execute stages),
//   - SC-1, the current state, which is never committed while it is current.
// The minimum is found by a binary tree of comparator/multiplexer nodes
// (five levels for the 32 SCTs, more here because the in-progress StateIds
// and the current state are leaves of the same tree) and registered, so the
// LCS reaches the SCTs one cycle after the state it was computed from.
//
// lcs_raw is that minimum. lcs is additionally clamped to hold_sid while
// hold_valid is high: a pending exception whose recovery point lies before
// its own state keeps that point from being committed. On sb_clear both
// registers store the new value with the saturation bit cleared, like every
// other stored StateId.
//
// The comparator tree and the registered one-cycle delay follow the
// published design; the current-state leaf and the exception clamp are this
// design's own. Synchronous reset to StateId 0.
module lcs_unit #(
  parameter int unsigned NL    = msp_pkg::NUM_LREGS,
  parameter int unsigned NIP   = msp_pkg::INPROG,
  parameter int unsigned SID_W = msp_pkg::SID_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NL-1:0]    sct_valid,
  input  logic [SID_W-1:0] sct_sid [NL],
  input  logic [NIP-1:0]   ip_valid,
  input  logic [SID_W-1:0] ip_sid  [NIP],
  input  logic [SID_W-1:0] sc,
  input  logic             hold_valid,
  input  logic [SID_W-1:0] hold_sid,
  input  logic             sb_clear,
  output logic [SID_W-1:0] lcs,
  output logic [SID_W-1:0] lcs_raw
);

  localparam int unsigned LEAVES = NL + NIP + 1;
  localparam int unsigned P      = 1 << $clog2(LEAVES);

  typedef struct packed {
    logic             valid;
    logic [SID_W-1:0] sid;
  } node_t;

  function automatic node_t min_node(input node_t a, input node_t b);
    if (a.valid && (!b.valid || a.sid <= b.sid)) return a;
    return b;
  endfunction

  node_t            tree [2*P-1];
  logic [SID_W-1:0] m_raw, m_hold;
  logic [SID_W-1:0] lcs_q, raw_q;

  always_comb begin
    for (int i = 0; i < 2 * P - 1; i++) tree[i] = '0;
    // leaves occupy tree[P-1 .. 2P-2]
    for (int i = 0; i < NL; i++)  tree[P - 1 + i]      = '{valid: sct_valid[i], sid: sct_sid[i]};
    for (int i = 0; i < NIP; i++) tree[P - 1 + NL + i] = '{valid: ip_valid[i], sid: ip_sid[i]};
    tree[P - 1 + NL + NIP] = '{valid: 1'b1, sid: sc - 1'b1};
    for (int i = P - 2; i >= 0; i--) tree[i] = min_node(tree[2*i+1], tree[2*i+2]);
    m_raw  = tree[0].sid;
    m_hold = (hold_valid && hold_sid < m_raw) ? hold_sid : m_raw;
    if (sb_clear) begin
      m_raw[SID_W-1]  = 1'b0;
      m_hold[SID_W-1] = 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lcs_q <= '0;
      raw_q <= '0;
    end else begin
      lcs_q <= m_hold;
      raw_q <= m_raw;
    end
  end

  assign lcs     = lcs_q;
  assign lcs_raw = raw_q;

endmodule
