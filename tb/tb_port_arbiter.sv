// tb_port_arbiter: self-checking testbench of the bank-conflict arbiter.
//
// Two instances are checked, a read arbiter with read sharing and a
// write arbiter without. Random requests, concentrated on a few banks so
// that conflicts are frequent, are compared with a model: per bank the
// lowest-numbered request wins, and with sharing every other request for the
// very same register is granted too. Directed: two reads of the same
// register share, two reads of different registers of one bank conflict.
module tb_port_arbiter;
  localparam int NREQ = 10, NB = 32, IW = 4, PW = 9;

  logic [NREQ-1:0] req_valid, grant_r, grant_w;
  logic [PW-1:0]   req_preg [NREQ];
  logic [NB-1:0]   en_r, en_w;
  logic [IW-1:0]   idx_r [NB];
  logic [IW-1:0]   idx_w [NB];

  port_arbiter #(.NREQ(NREQ), .NB(NB), .IDX_W(IW), .SHARE(1'b1)) u_rd (
    .req_valid(req_valid), .req_preg(req_preg), .grant(grant_r), .bank_en(en_r), .bank_idx(idx_r));
  port_arbiter #(.NREQ(NREQ), .NB(NB), .IDX_W(IW), .SHARE(1'b0)) u_wr (
    .req_valid(req_valid), .req_preg(req_preg), .grant(grant_w), .bank_en(en_w), .bank_idx(idx_w));

  int checks = 0, failures = 0, n_conf = 0, n_share = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic compare();
    int owner [NB];
    bit er, ew;
    for (int b = 0; b < NB; b++) owner[b] = -1;
    for (int r = 0; r < NREQ; r++)
      if (req_valid[r] && owner[req_preg[r] / 16] < 0) owner[req_preg[r] / 16] = r;
    for (int r = 0; r < NREQ; r++) begin
      int b;
      b = req_preg[r] / 16;
      ew = req_valid[r] && owner[b] == r;
      er = req_valid[r] && (owner[b] == r || req_preg[owner[b]] == req_preg[r]);
      check(grant_w[r] == ew, "write grant");
      check(grant_r[r] == er, "read grant");
      if (req_valid[r] && !er) n_conf++;
      if (er && !ew) n_share++;
    end
    for (int b = 0; b < NB; b++) begin
      check(en_r[b] == (owner[b] >= 0) && en_w[b] == (owner[b] >= 0), "bank enable");
      if (owner[b] >= 0) check(idx_r[b] == req_preg[owner[b]] % 16, "bank index");
    end
  endtask

  initial begin
    req_valid = '0;
    for (int r = 0; r < NREQ; r++) req_preg[r] = '0;
    // directed
    req_valid = 10'b11; req_preg[0] = PW'(3*16 + 5); req_preg[1] = PW'(3*16 + 5);
    #1; check(grant_r == 10'b11 && grant_w == 10'b01, "same register shares a read");
    req_preg[1] = PW'(3*16 + 6);
    #1; check(grant_r == 10'b01, "different registers of one bank conflict");
    compare();
    for (int cyc = 0; cyc < 3000; cyc++) begin
      for (int r = 0; r < NREQ; r++) begin
        req_valid[r] = $urandom_range(0, 3) != 0;
        req_preg[r]  = PW'($urandom_range(0, 3) * 16 + $urandom_range(0, 2));
      end
      #1; compare();
    end
    check(n_conf > 0 && n_share > 0, "conflicts and read sharing happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
