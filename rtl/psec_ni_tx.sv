// psec_ni_tx: sending half of the P-Sec network interface.
//
// Takes one 204-bit payload from the core, encodes it and sends it as a
// five-flit packet (head + four body flits) on the injection link.
//
// Encoding-mode state machine.  The NI starts in CRC mode.  When the core
// turns P-Sec on (psec_on) it moves to AMD mode, at packet level or, with
// flit_level, at flit level; turning P-Sec off returns it to CRC.  The mode
// is sampled only when a packet is accepted, so it never changes inside a
// packet; mode_switch pulses on every change.
//
// Packet encodings (block = payload plus redundancy, 256 bits in 4 flits):
//   CRC      : {20'b0, crc32(payload), payload}
//   AMD_PKT  : {18'b0, f17, pi17, payload}; the AMD (204,17,17) encoder is
//              pipelined, adding PKT_LAT (2) cycles before the first flit
//   AMD_FLIT : {52'b0, payload}; every flit, head included, carries
//              {pi8, f8} of an AMD (64,8,8) code in its check field
// The head flit holds the 23-bit header {src, dst, enc, type, signature} and
// its AMD (23,7,7) redundancy {f7, pi7}.  Every codeword uses a fresh random x
// from rnd.  The signature is a per-destination sequence number, so that the
// receiver can recognise a duplicated packet.
//
// Nack requests from the receiving half (nack_valid/nack_dst) take priority
// over core packets and go out as single head-tail flits in CRC mode.
//
// The code sizes, the two-cycle packet penalty, the header fields and the
// default CRC mode follow the P-Sec proposal; the flit layout, the signature
// scheme and the nack format are this design's own choices.
//
// Interfaces: core side tx_valid/tx_ready handshake; nack side
// nack_valid/nack_ready; link side out_valid/out_ready, flit held stable
// while out_valid && !out_ready.
module psec_ni_tx
  import psec_pkg::*;
#(
  parameter int unsigned N_DST   = 64,
  parameter int unsigned PKT_LAT = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [ID_W-1:0]      node_id,   // this core's number
  // core
  input  logic                 tx_valid,
  output logic                 tx_ready,
  input  logic [ID_W-1:0]      tx_dst,
  input  logic [PAYLOAD_W-1:0] tx_payload,
  input  logic                 psec_on,
  input  logic                 flit_level,
  // nack requests from the receiver
  input  logic                 nack_valid,
  input  logic [ID_W-1:0]      nack_dst,
  output logic                 nack_ready,
  // randomness
  input  logic [31:0]          rnd,
  // injection link
  output logic                 out_valid,
  output flit_t                out_flit,
  input  logic                 out_ready,
  // status
  output enc_mode_e            mode,
  output logic                 mode_switch
);

  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_SEND} state_e;

  state_e            state;
  enc_mode_e         cur_mode;      // encoding-mode state machine
  enc_mode_e         pkt_enc;       // encoding of the packet being sent
  logic [PAYLOAD_W-1:0] payload_q;
  logic [HEAD_USED_W-1:0] head_q;
  logic [2*PM-1:0]   amd_red_q;     // {f17, pi17}
  logic [2:0]        nflits_q;
  logic [2:0]        cnt;
  logic [FM-1:0]     x8_q;
  logic [SIG_W-1:0]  sig_ctr [N_DST];

  // ---------------------------------------------------- accept decision
  logic take_nack, take_pkt, accept;
  assign take_nack  = (state == S_IDLE) && nack_valid;
  assign take_pkt   = (state == S_IDLE) && !nack_valid && tx_valid;
  assign accept     = take_nack || take_pkt;
  assign nack_ready = (state == S_IDLE);
  assign tx_ready   = (state == S_IDLE) && !nack_valid;

  enc_mode_e next_mode;
  always_comb begin
    if (!psec_on)        next_mode = ENC_CRC;
    else if (flit_level) next_mode = ENC_AMD_FLIT;
    else                 next_mode = ENC_AMD_PKT;
  end

  // --------------------------------------------------- header + its AMD
  logic [ID_W-1:0] dst_sel;
  hdr_t            hdr_c;
  assign dst_sel = take_nack ? nack_dst : tx_dst;

  always_comb begin
    hdr_c.src   = node_id;
    hdr_c.dst   = dst_sel;
    hdr_c.enc   = take_nack ? ENC_CRC : next_mode;
    hdr_c.ptype = take_nack ? PT_NACK : PT_DATA;
    hdr_c.sig   = sig_ctr[int'(dst_sel) % N_DST];
  end

  logic          hdr_v_unused;
  logic [HM-1:0] hdr_pi, hdr_f;
  amd_encoder #(.M(HM), .B(HB), .K(HDR_W), .LATENCY(0), .POLY(POLY7)) u_hdr_enc (
    .clk(clk), .rst_n(rst_n), .in_valid(accept), .y(hdr_c), .x(rnd[HM-1:0]),
    .out_valid(hdr_v_unused), .pi(hdr_pi), .f(hdr_f)
  );

  // ------------------------------------------- packet-level AMD encoder
  logic          pkt_in_v, pkt_out_v;
  logic [PM-1:0] pkt_pi, pkt_f;
  assign pkt_in_v = take_pkt && (next_mode == ENC_AMD_PKT);

  amd_encoder #(.M(PM), .B(PB), .K(PAYLOAD_W), .LATENCY(PKT_LAT), .POLY(POLY17)) u_pkt_enc (
    .clk(clk), .rst_n(rst_n), .in_valid(pkt_in_v), .y(tx_payload), .x(rnd[HM +: PM]),
    .out_valid(pkt_out_v), .pi(pkt_pi), .f(pkt_f)
  );

  // ------------------------------------------------------------ CRC-32
  logic [CRC_W-1:0] crc;
  crc32_gen #(.DW(PAYLOAD_W), .POLY(CRC32_POLY), .INIT(CRC32_INIT)) u_crc (
    .data(payload_q), .crc(crc)
  );

  // ------------------------------------------------------ flit assembly
  logic [BLOCK_W-1:0] block;
  always_comb begin
    unique case (pkt_enc)
      ENC_CRC:     block = BLOCK_W'({crc, payload_q});
      ENC_AMD_PKT: block = BLOCK_W'({amd_red_q, payload_q});
      default:     block = BLOCK_W'(payload_q);
    endcase
  end

  flit_t           flit_c;
  logic            fl_v_unused;
  logic [FM-1:0]   fl_pi, fl_f;

  always_comb begin
    flit_c.chk = '0;
    if (cnt == 3'd0) begin
      flit_c.data  = FLIT_W'(head_q);
      flit_c.ftype = (nflits_q == 3'd1) ? FT_HEADTAIL : FT_HEAD;
    end else begin
      flit_c.data  = block[(int'(cnt) - 1) * FLIT_W +: FLIT_W];
      flit_c.ftype = (cnt == nflits_q - 3'd1) ? FT_TAIL : FT_BODY;
    end
  end

  amd_encoder #(.M(FM), .B(FB), .K(FLIT_W), .LATENCY(0), .POLY(POLY8)) u_flit_enc (
    .clk(clk), .rst_n(rst_n), .in_valid(out_valid), .y(flit_c.data), .x(x8_q),
    .out_valid(fl_v_unused), .pi(fl_pi), .f(fl_f)
  );

  always_comb begin
    out_flit = flit_c;
    if (pkt_enc == ENC_AMD_FLIT) out_flit.chk = {fl_pi, fl_f};
  end

  assign out_valid = (state == S_SEND);
  assign mode      = cur_mode;

  // -------------------------------------------------------- sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      cur_mode    <= ENC_CRC;
      pkt_enc     <= ENC_CRC;
      nflits_q    <= 3'd0;
      cnt         <= 3'd0;
      mode_switch <= 1'b0;
      x8_q        <= '0;
      payload_q   <= '0;
      head_q      <= '0;
      amd_red_q   <= '0;
      for (int i = 0; i < int'(N_DST); i++) sig_ctr[i] <= '0;
    end else begin
      mode_switch <= 1'b0;
      if (!(out_valid && !out_ready)) x8_q <= rnd[31 -: FM];
      if (pkt_out_v) amd_red_q <= {pkt_f, pkt_pi};

      unique case (state)
        S_IDLE: begin
          if (accept) begin
            head_q <= {hdr_f, hdr_pi, hdr_c};
            cnt    <= 3'd0;
            sig_ctr[int'(dst_sel) % N_DST] <= sig_ctr[int'(dst_sel) % N_DST] + 1'b1;
            if (take_nack) begin
              pkt_enc   <= ENC_CRC;
              nflits_q  <= 3'd1;
              payload_q <= '0;
              state     <= S_SEND;
            end else begin
              pkt_enc   <= next_mode;
              nflits_q  <= 3'(PKT_FLITS);
              payload_q <= tx_payload;
              cur_mode  <= next_mode;
              mode_switch <= (next_mode != cur_mode);
              state     <= (next_mode == ENC_AMD_PKT && PKT_LAT != 0) ? S_WAIT : S_SEND;
            end
          end
        end
        S_WAIT: begin
          if (pkt_out_v) state <= S_SEND;
        end
        S_SEND: begin
          if (out_ready) begin
            if (cnt == nflits_q - 3'd1) begin
              state <= S_IDLE;
              cnt   <= 3'd0;
            end else begin
              cnt <= cnt + 3'd1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
