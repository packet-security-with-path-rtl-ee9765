// psec_ni: P-Sec network interface of one core.
//
// Joins the sending half (psec_ni_tx: encoding-mode state machine, CRC-32,
// packet/flit/header AMD encoders) and the receiving half (psec_ni_rx:
// header authentication, destination, flit, payload and signature checks)
// with a random number source for the AMD encoders.  Nack requests raised by
// the receiver are sent by the transmitter ahead of the core's packets.
//
// Interfaces: the core sees a tx_valid/tx_ready packet port and one-cycle
// rx_valid / rx_nack / rx_drop pulses; the router sees an injection link
// (inj_*) and an ejection link (ej_*), both valid/ready flit streams.
module psec_ni
  import psec_pkg::*;
#(
  parameter int unsigned N_IDS   = 64,
  parameter int unsigned PKT_LAT = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [ID_W-1:0]      node_id,   // this core's number (a strap)
  // core: send
  input  logic                 tx_valid,
  output logic                 tx_ready,
  input  logic [ID_W-1:0]      tx_dst,
  input  logic [PAYLOAD_W-1:0] tx_payload,
  input  logic                 psec_on,
  input  logic                 flit_level,
  output enc_mode_e            mode,
  output logic                 mode_switch,
  // core: receive
  output logic                 rx_valid,
  output logic [ID_W-1:0]      rx_src,
  output enc_mode_e            rx_enc,
  output logic [PAYLOAD_W-1:0] rx_payload,
  output logic                 rx_nack,
  output logic                 rx_drop,
  output drop_e                rx_drop_reason,
  output logic                 nack_lost,
  // injection link
  output logic                 inj_valid,
  output flit_t                inj_flit,
  input  logic                 inj_ready,
  // ejection link
  input  logic                 ej_valid,
  input  flit_t                ej_flit,
  output logic                 ej_ready
);

  logic [31:0]     rnd;
  logic            nack_valid, nack_ready;
  logic [ID_W-1:0] nack_dst;

  lfsr_rng u_rng (
    .clk(clk), .rst_n(rst_n), .seed(32'h9E37_79B9 ^ (32'(node_id) * 32'h0101_0101)),
    .en(1'b1), .rnd(rnd)
  );

  psec_ni_tx #(.N_DST(N_IDS), .PKT_LAT(PKT_LAT)) u_tx (
    .clk(clk), .rst_n(rst_n), .node_id(node_id),
    .tx_valid(tx_valid), .tx_ready(tx_ready), .tx_dst(tx_dst), .tx_payload(tx_payload),
    .psec_on(psec_on), .flit_level(flit_level),
    .nack_valid(nack_valid), .nack_dst(nack_dst), .nack_ready(nack_ready),
    .rnd(rnd),
    .out_valid(inj_valid), .out_flit(inj_flit), .out_ready(inj_ready),
    .mode(mode), .mode_switch(mode_switch)
  );

  psec_ni_rx #(.N_SRC(N_IDS), .PKT_LAT(PKT_LAT)) u_rx (
    .clk(clk), .rst_n(rst_n), .node_id(node_id),
    .in_valid(ej_valid), .in_flit(ej_flit), .in_ready(ej_ready),
    .rx_valid(rx_valid), .rx_src(rx_src), .rx_enc(rx_enc), .rx_payload(rx_payload),
    .rx_nack(rx_nack), .rx_drop(rx_drop), .rx_drop_reason(rx_drop_reason),
    .nack_valid(nack_valid), .nack_dst(nack_dst), .nack_ready(nack_ready),
    .nack_lost(nack_lost)
  );

endmodule
