// psec_ni_rx: receiving half of the P-Sec network interface.
//
// Collects the flits of one packet from the ejection link, then validates
// it before anything reaches the core.  Checks, in this order:
//   1. header AMD (23,7,7): a failed header is dropped without a nack,
//      because its source field cannot be trusted;
//   2. destination: an authentic header addressed to another core (a packet
//      duplicated or misrouted by a compromised router) is dropped;
//   3. flit-level AMD (64,8,8) on every flit, for packets sent in flit mode;
//   4. payload: CRC-32 or AMD (204,17,17), as the header's encoding field says;
//   5. signature: per source the last accepted signature is kept; a packet
//      whose signature is not newer (within half the 7-bit sequence space)
//      is a duplicate and is dropped.
// Failures 2-4 of a data packet make the NI queue a nack to the header's
// source.  A good data packet is delivered (rx_valid), a good nack packet
// is reported (rx_nack).  Exactly one of rx_valid, rx_nack, rx_drop pulses
// per received packet.
//
// The header check, the destination check, the signature check, the drop
// and the nack follow the P-Sec proposal; the check order, the freshness window
// and the single-entry nack queue (a second nack while one waits is lost,
// reported by nack_lost) are this design's choices.
//
// Timing: the link is accepted (in_ready) only while a packet is being
// collected.  The verdict (one of the pulses) comes PKT_LAT+2 cycles after
// the clock edge that accepts the tail flit: one cycle to start the packet
// AMD decoder, PKT_LAT cycles in it, and the evaluation cycle.
module psec_ni_rx
  import psec_pkg::*;
#(
  parameter int unsigned N_SRC   = 64,
  parameter int unsigned PKT_LAT = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [ID_W-1:0]      node_id,   // this core's number
  // ejection link
  input  logic                 in_valid,
  input  flit_t                in_flit,
  output logic                 in_ready,
  // to the core
  output logic                 rx_valid,
  output logic [ID_W-1:0]      rx_src,
  output enc_mode_e            rx_enc,
  output logic [PAYLOAD_W-1:0] rx_payload,
  output logic                 rx_nack,
  output logic                 rx_drop,
  output drop_e                rx_drop_reason,
  // nack requests to the sending half
  output logic                 nack_valid,
  output logic [ID_W-1:0]      nack_dst,
  input  logic                 nack_ready,
  output logic                 nack_lost
);

  typedef enum logic [1:0] {S_COLLECT, S_CHECK, S_WAIT, S_EVAL} state_e;

  state_e                 state;
  logic [HEAD_USED_W-1:0] head_q;
  logic [BLOCK_W-1:0]     block_q;
  logic [2:0]             nbody_q;
  logic                   flit_err_q;
  logic                   pkt_err_q;
  logic [SIG_W-1:0]       last_sig [N_SRC];
  logic                   seen     [N_SRC];

  assign in_ready = (state == S_COLLECT);

  // ------------------------------------------------ flit-level checking
  hdr_t      in_hdr, hdr;
  enc_mode_e flit_enc;
  assign in_hdr   = hdr_t'(in_flit.data[HDR_W-1:0]);
  assign hdr      = hdr_t'(head_q[HDR_W-1:0]);
  assign flit_enc = is_head(in_flit.ftype) ? in_hdr.enc : hdr.enc;

  logic fl_v_unused, fl_err;
  amd_decoder #(.M(FM), .B(FB), .K(FLIT_W), .LATENCY(0), .POLY(POLY8)) u_flit_dec (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .y(in_flit.data),
    .pi_in(in_flit.chk[CHK_W-1 -: FM]), .f_in(in_flit.chk[FM-1:0]),
    .out_valid(fl_v_unused), .err(fl_err)
  );

  // ---------------------------------------------- packet-level decoding
  logic dec_in_v, dec_out_v, dec_err;
  assign dec_in_v = (state == S_CHECK);

  amd_decoder #(.M(PM), .B(PB), .K(PAYLOAD_W), .LATENCY(PKT_LAT), .POLY(POLY17)) u_pkt_dec (
    .clk(clk), .rst_n(rst_n), .in_valid(dec_in_v), .y(block_q[PAYLOAD_W-1:0]),
    .pi_in(block_q[PAYLOAD_W +: PM]), .f_in(block_q[PAYLOAD_W+PM +: PM]),
    .out_valid(dec_out_v), .err(dec_err)
  );

  logic [CRC_W-1:0] crc_calc;
  crc32_gen #(.DW(PAYLOAD_W), .POLY(CRC32_POLY), .INIT(CRC32_INIT)) u_crc (
    .data(block_q[PAYLOAD_W-1:0]), .crc(crc_calc)
  );

  logic hdr_v_unused, hdr_err;
  amd_decoder #(.M(HM), .B(HB), .K(HDR_W), .LATENCY(0), .POLY(POLY7)) u_hdr_dec (
    .clk(clk), .rst_n(rst_n), .in_valid(state == S_EVAL), .y(head_q[HDR_W-1:0]),
    .pi_in(head_q[HDR_W +: HM]), .f_in(head_q[HDR_W+HM +: HM]),
    .out_valid(hdr_v_unused), .err(hdr_err)
  );

  // ----------------------------------------------------------- verdict
  logic [SIG_W-1:0] sig_delta;
  logic             fresh, data_err, len_err;
  drop_e            reason;
  int unsigned      src_idx;

  assign src_idx   = int'(hdr.src) % N_SRC;
  assign sig_delta = hdr.sig - last_sig[src_idx];
  assign fresh     = !seen[src_idx] || (sig_delta != '0 && !sig_delta[SIG_W-1]);

  always_comb begin
    len_err = (hdr.ptype == PT_NACK) ? (nbody_q != 3'd0) : (nbody_q != 3'(BODY_FLITS));
    unique case (hdr.enc)
      ENC_CRC:      data_err = (hdr.ptype == PT_DATA) && (crc_calc != block_q[PAYLOAD_W +: CRC_W]);
      ENC_AMD_PKT:  data_err = pkt_err_q;
      ENC_AMD_FLIT: data_err = 1'b0;
      default:      data_err = 1'b1;
    endcase
    data_err = data_err || len_err || (hdr.ptype != PT_DATA && hdr.ptype != PT_NACK);

    if (hdr_err)                        reason = DROP_HDR;
    else if (hdr.dst != node_id)        reason = DROP_DST;
    else if (flit_err_q)                reason = DROP_FLIT;
    else if (data_err)                  reason = DROP_DATA;
    else if (!fresh)                    reason = DROP_DUP;
    else                                reason = DROP_NONE;
  end

  logic eval, ok, want_nack;
  assign eval      = (state == S_EVAL);
  assign ok        = eval && (reason == DROP_NONE);
  assign want_nack = eval && (hdr.ptype == PT_DATA) &&
                     (reason == DROP_DST || reason == DROP_FLIT || reason == DROP_DATA);

  assign rx_valid       = ok && (hdr.ptype == PT_DATA);
  assign rx_nack        = ok && (hdr.ptype == PT_NACK);
  assign rx_drop        = eval && (reason != DROP_NONE);
  assign rx_drop_reason = eval ? reason : DROP_NONE;
  assign rx_src         = hdr.src;
  assign rx_enc         = hdr.enc;
  assign rx_payload     = block_q[PAYLOAD_W-1:0];

  // -------------------------------------------------------- sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_COLLECT;
      head_q     <= '0;
      block_q    <= '0;
      nbody_q    <= '0;
      flit_err_q <= 1'b0;
      pkt_err_q  <= 1'b0;
      nack_valid <= 1'b0;
      nack_dst   <= '0;
      nack_lost  <= 1'b0;
      for (int i = 0; i < int'(N_SRC); i++) begin
        last_sig[i] <= '0;
        seen[i]     <= 1'b0;
      end
    end else begin
      nack_lost <= 1'b0;
      if (nack_valid && nack_ready) nack_valid <= 1'b0;
      if (dec_out_v) pkt_err_q <= dec_err;

      unique case (state)
        S_COLLECT: begin
          if (in_valid) begin
            if (is_head(in_flit.ftype)) begin
              head_q     <= in_flit.data[HEAD_USED_W-1:0];
              nbody_q    <= '0;
              flit_err_q <= (flit_enc == ENC_AMD_FLIT) && fl_err;
              block_q    <= '0;
              pkt_err_q  <= 1'b0;
            end else begin
              if (nbody_q < 3'(BODY_FLITS))
                block_q[int'(nbody_q) * FLIT_W +: FLIT_W] <= in_flit.data;
              if (nbody_q != 3'd7) nbody_q <= nbody_q + 3'd1;
              if ((flit_enc == ENC_AMD_FLIT) && fl_err) flit_err_q <= 1'b1;
            end
            if (is_tail(in_flit.ftype)) state <= S_CHECK;
          end
        end
        S_CHECK, S_WAIT: begin
          state <= dec_out_v ? S_EVAL : S_WAIT;
        end
        S_EVAL: begin
          state <= S_COLLECT;
          if (ok) begin
            last_sig[src_idx] <= hdr.sig;
            seen[src_idx]     <= 1'b1;
          end
          if (want_nack) begin
            if (nack_valid && !nack_ready) begin
              nack_lost <= 1'b1;
            end else begin
              nack_valid <= 1'b1;
              nack_dst   <= hdr.src;
            end
          end
        end
        default: state <= S_COLLECT;
      endcase
    end
  end

endmodule
