// psec_noc: P-Sec network-on-chip, a MESH_X x MESH_Y concentrated mesh with
// CONC cores per router (default 4x4x4 = 64 cores).
//
// Every core has a P-Sec network interface (psec_ni) that encodes outgoing
// packets with CRC-32, packet-level AMD or flit-level AMD, always with an
// AMD-encoded header, and that validates incoming packets end to end before
// handing them to the core.  The routers (psec_router) route XY and let the
// virtual channels of AMD traffic win contention more often.  Core c is at
// local port c mod CONC of router c / CONC; router r is at
// (r mod MESH_X, r / MESH_X).  The mesh size and concentration follow the
// document; the rest is described in psec_router and psec_ni.
//
// Attack model (test hooks, tied off in normal use):
//  * Each injection link (NI -> router) and each ejection link
//    (router -> NI) XORs the 80-bit mask {data, chk} into one flit of every
//    packet that crosses it, the flit whose position in its packet is
//    fault_*_flit (0 = head).  A small counter per link tracks the position.
//    A zero mask leaves the link intact.  This is the hardware trojan or
//    fault injection attack on a compromised link.
//  * Each router can be made to steer packets for one target core to one of
//    its output ports (ht_en / ht_target / ht_port): a compromised router
//    delivering packets to a rogue core.
//
// Ports: per-core arrays of the NI's core ports (see psec_ni), the fault
// ports, the per-router trojan controls and the routers' prio_event pulses.
module psec_noc
  import psec_pkg::*;
#(
  parameter int unsigned MESH_X    = 4,
  parameter int unsigned MESH_Y    = 4,
  parameter int unsigned CONC      = 4,
  parameter int unsigned BUF_DEPTH = 4,
  parameter int unsigned PKT_LAT   = 2,
  localparam int unsigned NR       = MESH_X * MESH_Y,
  localparam int unsigned N        = NR * CONC,
  localparam int unsigned P        = CONC + ((NR > 1) ? 4 : 0)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // per-core send
  input  logic [N-1:0]         tx_valid,
  output logic [N-1:0]         tx_ready,
  input  logic [ID_W-1:0]      tx_dst         [N],
  input  logic [PAYLOAD_W-1:0] tx_payload     [N],
  input  logic [N-1:0]         psec_on,
  input  logic [N-1:0]         flit_level,
  output enc_mode_e            mode           [N],
  output logic [N-1:0]         mode_switch,
  // per-core receive
  output logic [N-1:0]         rx_valid,
  output logic [ID_W-1:0]      rx_src         [N],
  output enc_mode_e            rx_enc         [N],
  output logic [PAYLOAD_W-1:0] rx_payload     [N],
  output logic [N-1:0]         rx_nack,
  output logic [N-1:0]         rx_drop,
  output drop_e                rx_drop_reason [N],
  output logic [N-1:0]         nack_lost,
  // link attacks
  input  logic [FLIT_W+CHK_W-1:0] fault_inj_mask [N],
  input  logic [2:0]              fault_inj_flit [N],
  input  logic [FLIT_W+CHK_W-1:0] fault_ej_mask  [N],
  input  logic [2:0]              fault_ej_flit  [N],
  // compromised routers
  input  logic [NR-1:0]        ht_en,
  input  logic [ID_W-1:0]      ht_target      [NR],
  input  logic [3:0]           ht_port        [NR],
  // routers
  output logic [P-1:0]         prio_event     [NR]
);

  // router port signals
  logic  rin_valid  [NR][P];
  flit_t rin_flit   [NR][P];
  logic  rin_ready  [NR][P];
  logic  rout_valid [NR][P];
  flit_t rout_flit  [NR][P];
  logic  rout_ready [NR][P];

  // ------------------------------------------------ cores and their links
  for (genvar c = 0; c < N; c++) begin : g_core
    localparam int unsigned R  = c / CONC;
    localparam int unsigned LP = c % CONC;

    logic  rxv, rxn, rxd, ms, nl, txr;
    logic  inj_valid, inj_ready, ej_valid, ej_ready;
    flit_t inj_flit, inj_flit_f, ej_flit, ej_flit_f;

    psec_ni #(.N_IDS(1 << ID_W), .PKT_LAT(PKT_LAT)) u_ni (
      .clk(clk), .rst_n(rst_n), .node_id(ID_W'(c)),
      .tx_valid(tx_valid[c]), .tx_ready(txr), .tx_dst(tx_dst[c]), .tx_payload(tx_payload[c]),
      .psec_on(psec_on[c]), .flit_level(flit_level[c]),
      .mode(mode[c]), .mode_switch(ms),
      .rx_valid(rxv), .rx_src(rx_src[c]), .rx_enc(rx_enc[c]), .rx_payload(rx_payload[c]),
      .rx_nack(rxn), .rx_drop(rxd), .rx_drop_reason(rx_drop_reason[c]), .nack_lost(nl),
      .inj_valid(inj_valid), .inj_flit(inj_flit), .inj_ready(inj_ready),
      .ej_valid(ej_valid), .ej_flit(ej_flit_f), .ej_ready(ej_ready)
    );

    assign tx_ready[c]    = txr;
    assign rx_valid[c]    = rxv;
    assign rx_nack[c]     = rxn;
    assign rx_drop[c]     = rxd;
    assign mode_switch[c] = ms;
    assign nack_lost[c]   = nl;

    assign rin_valid[R][LP]  = inj_valid;
    assign rin_flit[R][LP]   = inj_flit_f;
    assign inj_ready         = rin_ready[R][LP];
    assign ej_valid          = rout_valid[R][LP];
    assign ej_flit           = rout_flit[R][LP];
    assign rout_ready[R][LP] = ej_ready;

    // compromised-link models: position of the current flit in its packet
    logic [2:0] inj_pos, ej_pos;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        inj_pos <= '0;
        ej_pos  <= '0;
      end else begin
        if (inj_valid && inj_ready) inj_pos <= is_tail(inj_flit.ftype) ? 3'd0 : inj_pos + 3'd1;
        if (ej_valid && ej_ready)   ej_pos  <= is_tail(ej_flit.ftype)  ? 3'd0 : ej_pos + 3'd1;
      end
    end

    always_comb begin
      inj_flit_f = inj_flit;
      if (inj_pos == fault_inj_flit[c])
        {inj_flit_f.data, inj_flit_f.chk} = {inj_flit.data, inj_flit.chk} ^ fault_inj_mask[c];
      ej_flit_f = ej_flit;
      if (ej_pos == fault_ej_flit[c])
        {ej_flit_f.data, ej_flit_f.chk} = {ej_flit.data, ej_flit.chk} ^ fault_ej_mask[c];
    end
  end

  // ----------------------------------------------------- routers and mesh
  for (genvar r = 0; r < NR; r++) begin : g_router
    localparam int unsigned RX = r % MESH_X;
    localparam int unsigned RY = r / MESH_X;

    psec_router #(
      .CONC(CONC), .MESH_X(MESH_X), .MESH_Y(MESH_Y), .DEPTH(BUF_DEPTH)
    ) u_router (
      .clk(clk), .rst_n(rst_n),
      .my_x(4'(RX)), .my_y(4'(RY)), .seed(32'h5EC0_0C5E ^ (32'(r) * 32'h0001_0003)),
      .ht_en(ht_en[r]), .ht_target(ht_target[r]), .ht_port(ht_port[r]),
      .in_valid(rin_valid[r]), .in_flit(rin_flit[r]), .in_ready(rin_ready[r]),
      .out_valid(rout_valid[r]), .out_flit(rout_flit[r]), .out_ready(rout_ready[r]),
      .prio_event(prio_event[r])
    );

    if (NR > 1) begin : g_mesh
      // port CONC+0 east, +1 west, +2 north, +3 south; a link feeds the
      // opposite port of the neighbour, edge ports are tied off
      for (genvar d = 0; d < 4; d++) begin : g_dir
        localparam bit HAS_NB = (d == 0) ? (RX + 1 < MESH_X) :
                                (d == 1) ? (RX > 0) :
                                (d == 2) ? (RY + 1 < MESH_Y) : (RY > 0);
        localparam int unsigned NB = (d == 0) ? r + 1 : (d == 1) ? r - 1 :
                                     (d == 2) ? r + MESH_X : r - MESH_X;
        localparam int unsigned OPP = (d == 0) ? 1 : (d == 1) ? 0 : (d == 2) ? 3 : 2;
        if (HAS_NB) begin : g_link
          assign rin_valid[NB][CONC+OPP]  = rout_valid[r][CONC+d];
          assign rin_flit[NB][CONC+OPP]   = rout_flit[r][CONC+d];
          assign rout_ready[r][CONC+d]    = rin_ready[NB][CONC+OPP];
        end else begin : g_edge
          assign rin_valid[r][CONC+d]  = 1'b0;
          assign rin_flit[r][CONC+d]   = '0;
          assign rout_ready[r][CONC+d] = 1'b1;
        end
      end
    end
  end

endmodule
