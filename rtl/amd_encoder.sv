// amd_encoder: algebraic manipulation detection (AMD) encoder.
//
// The K-bit data word y is zero-extended to B symbols y1..yB of M bits
// (y1 in the least significant bits).  With an M-bit random number x the
// encoder produces the two M-bit redundancy symbols of the codeword
// C = (y, pi, f):
//     pi = y1 ^ y2 ^ ... ^ yB ^ x                (masks x on the wire)
//     f  = y1*x + y2*x^2 + ... + yB*x^B + x^D    (in GF(2^M))
// with D = B+2 for even B and D = B+3 for odd B, as the P-Sec proposal specifies.
// f is evaluated by Horner's rule: h = x^(D-B) + yB, then h = y(i) + x*h for
// i = B-1 .. 1, and finally f = x*h, which takes B field multiplications.
//
// LATENCY register stages split the multiplication chain evenly; LATENCY=0 is
// purely combinational (out_valid = in_valid).  The P-Sec proposal gives a two-cycle
// penalty for packet encoding and no penalty for flit and header encoding;
// the instances in the network interface use LATENCY=2 and 0 accordingly.
// The field polynomial is this design's choice (the P-Sec proposal names none).
//
// Ports: in_valid/y/x are sampled every cycle; out_valid/pi/f appear LATENCY
// cycles later.  There is no back-pressure: the pipeline always advances.
module amd_encoder #(
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
  input  logic [M-1:0] x,
  output logic         out_valid,
  output logic [M-1:0] pi,
  output logic [M-1:0] f
);

  localparam int unsigned YW   = B * M;
  localparam int unsigned NSEG = (LATENCY == 0) ? 1 : LATENCY;
  localparam int unsigned XPOW = (B % 2 == 0) ? 2 : 3;   // D - B

  // multiplication in GF(2^M) modulo POLY
  function automatic logic [M-1:0] gmul(input logic [M-1:0] a, input logic [M-1:0] b);
    logic [M-1:0] r;
    r = '0;
    for (int i = M - 1; i >= 0; i--) begin
      r = r[M-1] ? ((r << 1) ^ POLY[M-1:0]) : (r << 1);
      if (b[i]) r = r ^ a;
    end
    return r;
  endfunction

  function automatic logic [M-1:0] sym(input logic [YW-1:0] v, input int unsigned i);
    return v[(i-1)*M +: M];   // symbol y(i), i = 1..B
  endfunction

  logic [YW-1:0] y_pad;
  assign y_pad = YW'(y);

  // pi: xor of all symbols and x
  logic [M-1:0] pi_c;
  always_comb begin
    pi_c = x;
    for (int unsigned i = 1; i <= B; i++) pi_c = pi_c ^ sym(y_pad, i);
  end

  // Horner start value h = x^XPOW + yB
  logic [M-1:0] h_init;
  always_comb begin
    logic [M-1:0] p;
    p = x;
    for (int unsigned i = 1; i < XPOW; i++) p = gmul(p, x);
    h_init = p ^ sym(y_pad, B);
  end

  // per-stage state: entry values of segment s
  logic [M-1:0]  h_s  [NSEG+1];
  logic [M-1:0]  x_s  [NSEG+1];
  logic [YW-1:0] y_s  [NSEG+1];
  logic [M-1:0]  pi_s [NSEG+1];
  logic          v_s  [NSEG+1];

  assign h_s[0]  = h_init;
  assign x_s[0]  = x;
  assign y_s[0]  = y_pad;
  assign pi_s[0] = pi_c;
  assign v_s[0]  = in_valid;

  // Horner step t (t = 0..B-1): h = x*h + y(B-1-t), the last step adds nothing
  for (genvar s = 0; s < NSEG; s++) begin : g_seg
    localparam int unsigned LO = s * B / NSEG;
    localparam int unsigned HI = (s + 1) * B / NSEG;
    logic [M-1:0] h_out;
    always_comb begin
      h_out = h_s[s];
      for (int unsigned t = 0; t < B; t++) begin
        if (t >= LO && t < HI) begin
          h_out = gmul(h_out, x_s[s]);
          if (t < B - 1) h_out = h_out ^ sym(y_s[s], B - 1 - t);
        end
      end
    end

    if (LATENCY == 0) begin : g_comb
      assign h_s[s+1]  = h_out;
      assign x_s[s+1]  = x_s[s];
      assign y_s[s+1]  = y_s[s];
      assign pi_s[s+1] = pi_s[s];
      assign v_s[s+1]  = v_s[s];
    end else begin : g_reg
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          v_s[s+1] <= 1'b0;
        end else begin
          v_s[s+1] <= v_s[s];
        end
      end
      always_ff @(posedge clk) begin
        h_s[s+1]  <= h_out;
        x_s[s+1]  <= x_s[s];
        y_s[s+1]  <= y_s[s];
        pi_s[s+1] <= pi_s[s];
      end
    end
  end

  assign out_valid = v_s[NSEG];
  assign pi        = pi_s[NSEG];
  assign f         = h_s[NSEG];

endmodule
