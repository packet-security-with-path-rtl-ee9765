// prio_rand_arbiter: prioritized random arbiter.
//
// Grants one of N requesters at random, weighting requesters flagged secure
// (virtual channels that carry AMD-encoded, security-critical traffic).
// With no secure request pending it behaves as a plain random arbiter.
// The P-Sec proposal gives only this behaviour; the weighting is this design's:
//   - if a secure request is pending, the draw picks from the secure
//     requesters only with probability SEC_PROB/256 (rnd[7:0] < SEC_PROB),
//     otherwise from all requesters;
//   - within the chosen pool, the first requester at or after a random start
//     index (rnd[23:8] mod N) wins, wrapping around.
//
// Purely combinational: gnt is one-hot (or zero when nothing requests) and
// is a subset of req.  rnd must change every cycle for fair draws.
module prio_rand_arbiter #(
  parameter int unsigned N        = 8,
  parameter int unsigned SEC_PROB = 192
) (
  input  logic [N-1:0] req,
  input  logic [N-1:0] sec,
  input  logic [31:0]  rnd,
  output logic [N-1:0] gnt,
  output logic         sec_pool   // 1: the draw was restricted to secure requesters
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [N-1:0] sec_req;
  logic [N-1:0] pool;
  logic [IW-1:0] start;

  assign sec_req  = req & sec;
  assign sec_pool = (sec_req != '0) && ({24'd0, rnd[7:0]} < SEC_PROB);
  assign pool     = sec_pool ? sec_req : req;
  assign start    = IW'({16'd0, rnd[23:8]} % N);

  always_comb begin
    logic found;
    int unsigned idx;
    gnt   = '0;
    found = 1'b0;
    for (int unsigned k = 0; k < N; k++) begin
      idx = (int'(start) + k) % N;
      if (!found && pool[idx]) begin
        gnt[idx] = 1'b1;
        found    = 1'b1;
      end
    end
  end

endmodule
