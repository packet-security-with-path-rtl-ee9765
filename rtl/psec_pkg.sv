// psec_pkg: shared types and constants of the P-Sec network-on-chip.
//
// P-Sec protects packets end to end with one of three payload encodings,
// chosen per packet by the sending network interface (NI):
//   ENC_CRC      : CRC-32 over the 204-bit payload (default, non-critical traffic)
//   ENC_AMD_PKT  : AMD (204,17,17) code over the whole payload (secure traffic)
//   ENC_AMD_FLIT : AMD (64,8,8) code on every 64-bit flit (secure, low overhead)
// The 23-bit header of every packet is separately AMD (23,7,7) encoded.
// The code sizes come from the P-Sec proposal; the header field widths, the flit
// layout and the packet length are this design's own choices (see README).
package psec_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned FLIT_W    = 64;   // flit data width (AMD (64,8,8))
  localparam int unsigned CHK_W     = 16;   // flit-level AMD redundancy (8+8)
  localparam int unsigned PAYLOAD_W = 204;  // packet payload y (b*m = 12*17)
  localparam int unsigned BODY_FLITS = 4;   // 4*64 = 256 >= 204+34
  localparam int unsigned PKT_FLITS = 1 + BODY_FLITS;
  localparam int unsigned BLOCK_W   = BODY_FLITS * FLIT_W;

  // packet-level AMD (204,17,17)
  localparam int unsigned PM = 17;
  localparam int unsigned PB = 12;
  // flit-level AMD (64,8,8)
  localparam int unsigned FM = 8;
  localparam int unsigned FB = 8;
  // header AMD (23,7,7)
  localparam int unsigned HDR_W = 23;
  localparam int unsigned HM = 7;
  localparam int unsigned HB = 4;           // ceil(23/7), header zero-padded to 28 bits

  // irreducible field polynomials, bit m set (x^m + ...)
  localparam logic [PM:0] POLY17 = 18'h20009;   // x^17 + x^3 + 1
  localparam logic [FM:0] POLY8  = 9'h11B;      // x^8 + x^4 + x^3 + x + 1
  localparam logic [HM:0] POLY7  = 8'h83;       // x^7 + x + 1

  localparam int unsigned CRC_W = 32;
  localparam logic [31:0] CRC32_POLY = 32'h04C1_1DB7;
  localparam logic [31:0] CRC32_INIT = 32'hFFFF_FFFF;

  // header fields
  localparam int unsigned ID_W  = 6;        // 64 cores
  localparam int unsigned SIG_W = 7;

  typedef enum logic [1:0] {
    ENC_CRC      = 2'd0,
    ENC_AMD_PKT  = 2'd1,
    ENC_AMD_FLIT = 2'd2,
    ENC_RSVD     = 2'd3
  } enc_mode_e;

  typedef enum logic [1:0] {
    PT_DATA = 2'd0,
    PT_NACK = 2'd1,
    PT_RSV2 = 2'd2,
    PT_RSV3 = 2'd3
  } pkt_type_e;

  // 23-bit header: src(6) dst(6) enc(2) type(2) signature(7)
  typedef struct packed {
    logic [ID_W-1:0]  src;
    logic [ID_W-1:0]  dst;
    enc_mode_e        enc;
    pkt_type_e        ptype;
    logic [SIG_W-1:0] sig;
  } hdr_t;

  typedef enum logic [1:0] {
    FT_BODY     = 2'd0,
    FT_HEAD     = 2'd1,
    FT_TAIL     = 2'd2,
    FT_HEADTAIL = 2'd3
  } flit_type_e;

  // link flit: type, 64 data bits, 16 flit-level check bits {pi8, f8}
  typedef struct packed {
    flit_type_e        ftype;
    logic [FLIT_W-1:0] data;
    logic [CHK_W-1:0]  chk;
  } flit_t;

  localparam int unsigned FLIT_T_W = $bits(flit_t);

  // head flit data: {zeros, hdr_f(7), hdr_pi(7), hdr(23)}
  localparam int unsigned HEAD_USED_W = HDR_W + 2 * HM;

  // why the receiving NI dropped a packet
  typedef enum logic [2:0] {
    DROP_NONE = 3'd0,
    DROP_HDR  = 3'd1,   // header AMD check failed
    DROP_DST  = 3'd2,   // authentic header, but not addressed to this core
    DROP_FLIT = 3'd3,   // flit-level AMD check failed
    DROP_DATA = 3'd4,   // packet CRC-32 / AMD check failed
    DROP_DUP  = 3'd5    // signature already seen: duplicated / replayed packet
  } drop_e;

  function automatic logic is_head(flit_type_e t);
    return (t == FT_HEAD) || (t == FT_HEADTAIL);
  endfunction

  function automatic logic is_tail(flit_type_e t);
    return (t == FT_TAIL) || (t == FT_HEADTAIL);
  endfunction

endpackage
