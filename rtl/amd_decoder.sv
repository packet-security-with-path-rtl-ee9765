// amd_decoder: checker for the AMD codeword C = (y, pi, f) of amd_encoder.
//
// The random number x is not sent; it is recovered as x = pi ^ y1 ^ ... ^ yB.
// f(y, x) is then recomputed with an amd_encoder instance and compared with
// the received f.  Any error pattern on (y, pi, f) that the attacker chooses
// independently of x is missed with probability at most about D/2^M.
// The P-Sec proposal describes the encoder and states that decoding compares the
// AMD signature; the recovery of x from pi and the reuse of the encoder's
// pipeline are this design's own choices.
//
// Ports: in_valid/y/pi_in/f_in are sampled each cycle, out_valid/err appear
// LATENCY cycles later (err = 1: codeword invalid).
module amd_decoder #(
  parameter int unsigned M       = 17,
  parameter int unsigned B       = 12,
  parameter int unsigned K       = 204,
  parameter int unsigned LATENCY = 2,
  parameter logic [M:0]  POLY    = 18'h20009
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [K-1:0] y,
  input  logic [M-1:0] pi_in,
  input  logic [M-1:0] f_in,
  output logic         out_valid,
  output logic         err
);

  localparam int unsigned YW = B * M;

  logic [YW-1:0] y_pad;
  logic [M-1:0]  x_rec;
  assign y_pad = YW'(y);

  always_comb begin
    x_rec = pi_in;
    for (int unsigned i = 0; i < B; i++) x_rec = x_rec ^ y_pad[i*M +: M];
  end

  logic [M-1:0] pi_unused;
  logic [M-1:0] f_calc;

  amd_encoder #(.M(M), .B(B), .K(K), .LATENCY(LATENCY), .POLY(POLY)) u_enc (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .y        (y),
    .x        (x_rec),
    .out_valid(out_valid),
    .pi       (pi_unused),
    .f        (f_calc)
  );

  // delay the received f to line up with the recomputed one
  logic [M-1:0] f_d [LATENCY+1];
  assign f_d[0] = f_in;
  for (genvar i = 0; i < LATENCY; i++) begin : g_dly
    always_ff @(posedge clk) f_d[i+1] <= f_d[i];
  end

  assign err = (f_calc != f_d[LATENCY]);

endmodule
