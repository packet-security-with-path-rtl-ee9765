// tb_prio_rand_arbiter: checks every grant of the prioritized random
// arbiter (8 requesters, odd ones secure) against a reference that picks the
// pool member closest after the random start index, and checks the
// statistics: with secure and normal requests pending, a secure requester
// must win about SEC_PROB/256 + (1-SEC_PROB/256)*share of the draws; with no
// secure request every requester must win now and then.
module tb_prio_rand_arbiter;
  localparam int N = 8;
  localparam int SEC_PROB = 192;

  int checks = 0, failures = 0;

  logic [N-1:0] req, sec, gnt;
  logic [31:0]  rnd;
  logic         sec_pool;

  prio_rand_arbiter #(.N(N), .SEC_PROB(SEC_PROB)) dut (
    .req(req), .sec(sec), .rnd(rnd), .gnt(gnt), .sec_pool(sec_pool));

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s req=%b gnt=%b rnd=%h", what, req, gnt, rnd);
    end
  endtask

  function automatic logic [N-1:0] ref_gnt(logic [N-1:0] rq, logic [N-1:0] sc, logic [31:0] r);
    logic [N-1:0] pool;
    int best, bestd, d, st;
    pool = ((rq & sc) != 0 && r[7:0] < SEC_PROB) ? (rq & sc) : rq;
    st   = r[23:8] % N;
    best = -1; bestd = N;
    for (int i = 0; i < N; i++) begin
      d = (i - st + N) % N;
      if (pool[i] && d < bestd) begin best = i; bestd = d; end
    end
    return (best < 0) ? '0 : (N'(1) << best);
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sec_wins, draws;
    int wins [N];
    sec = 8'b1010_1010;
    // exhaustive-ish functional check
    for (int n = 0; n < 3000; n++) begin
      req = N'($urandom);
      rnd = $urandom;
      #1;
      chk(gnt == ref_gnt(req, sec, rnd), "grant");
      chk($onehot0(gnt) && ((gnt & ~req) == 0), "one-hot subset");
      chk((req == 0) == (gnt == 0), "grant iff request");
    end
    // statistics: one secure (bit 1) against three normal requesters
    sec_wins = 0; draws = 4000;
    for (int n = 0; n < draws; n++) begin
      req = 8'b0001_0111; rnd = $urandom; #1;
      if (gnt[1]) sec_wins++;
    end
    // expected 0.75 + 0.25/4 = 0.81; plain random would give 0.25
    chk(sec_wins > draws * 3 / 4 && sec_wins < draws * 7 / 8,
        $sformatf("secure share %0d of %0d", sec_wins, draws));
    // no secure requests: plain random arbitration, every requester wins
    for (int i = 0; i < N; i++) wins[i] = 0;
    for (int n = 0; n < 4000; n++) begin
      req = 8'b0101_0101; rnd = $urandom; #1;
      for (int i = 0; i < N; i++) if (gnt[i]) wins[i]++;
    end
    for (int i = 0; i < N; i += 2) chk(wins[i] > 500, $sformatf("requester %0d wins %0d", i, wins[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
