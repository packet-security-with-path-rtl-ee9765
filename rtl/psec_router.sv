// psec_router: concentrated-mesh wormhole router with a normal and a secure
// virtual channel (VC) per input and prioritized random switch allocation.
//
// Ports 0..CONC-1 connect the CONC local network interfaces; in a mesh
// (MESH_X*MESH_Y > 1) ports CONC+0..CONC+3 lead east (+x), west (-x), north
// (+y) and south (-y).  Core d sits at local port d mod CONC of router
// d / CONC, and router r at (r mod MESH_X, r / MESH_X); a router learns its
// own position from the my_x / my_y inputs.  Routing is
// dimension-ordered (XY): first along x, then along y, then to the local port.
//
// Each input demultiplexes arriving packets into two VC buffers: a head
// flit whose header encoding field says AMD (packet or flit level) goes to
// the secure VC (1), CRC traffic to the normal VC (0); body flits follow
// their head.  A head flit at the front of a buffer requests the output
// given by its destination.  Each output has a
// prio_rand_arbiter over the 2*P input VCs, with the secure VCs weighted, so
// that security-critical packets move ahead under contention.  A grant locks
// the output to that VC until the tail flit has left (wormhole switching).
//
// The P-Sec proposal specifies the prioritized random arbitration on the AMD flag
// of the header and the 4x4 concentrated mesh of 64 cores; the VC count,
// buffer depth, XY routing and wormhole flow control are this design's
// choices.
//
// Attack hook: while ht_en is set, head flits addressed to core ht_target
// are sent to output ht_port instead, modelling a compromised router that
// steers its target packets to a rogue core.  Tie ht_en low in normal use.
//
// Timing: an arbitration cycle, then one flit per cycle per output.
// Links are valid/ready; in_ready depends on the VC the arriving flit maps to.
// prio_event pulses when an output grants a secure VC while a normal VC was
// also requesting it.
module psec_router
  import psec_pkg::*;
#(
  parameter int unsigned CONC     = 4,
  parameter int unsigned MESH_X   = 4,
  parameter int unsigned MESH_Y   = 4,
  parameter int unsigned DEPTH    = 4,
  parameter int unsigned SEC_PROB = 192,
  localparam int unsigned P       = CONC + ((MESH_X * MESH_Y > 1) ? 4 : 0)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [3:0]   my_x,        // this router's mesh coordinates (straps)
  input  logic [3:0]   my_y,
  input  logic [31:0]  seed,        // reset value of the arbitration LFSR
  input  logic         ht_en,
  input  logic [ID_W-1:0] ht_target,
  input  logic [3:0]   ht_port,
  input  logic         in_valid  [P],
  input  flit_t        in_flit   [P],
  output logic         in_ready  [P],
  output logic         out_valid [P],
  output flit_t        out_flit  [P],
  input  logic         out_ready [P],
  output logic [P-1:0] prio_event
);

  // output port toward core d
  function automatic int unsigned route(input logic [ID_W-1:0] d);
    int unsigned r, rx, ry;
    r  = (int'(d) / CONC) % (MESH_X * MESH_Y);
    rx = r % MESH_X;
    ry = r / MESH_X;
    if (rx > int'(my_x))      return CONC + 0;
    else if (rx < int'(my_x)) return CONC + 1;
    else if (ry > int'(my_y)) return CONC + 2;
    else if (ry < int'(my_y)) return CONC + 3;
    else             return int'(d) % CONC;
  endfunction

  localparam int unsigned NR = 2 * P;                       // requesters: input*2 + vc
  localparam int unsigned RW = (NR > 1) ? $clog2(NR) : 1;

  logic [31:0] rnd;
  lfsr_rng u_rng (.clk(clk), .rst_n(rst_n), .seed(seed), .en(1'b1), .rnd(rnd));

  // ----------------------------------------------------------- inputs
  logic   cur_vc [P];
  logic   in_vc  [P];
  logic   push   [NR];
  logic   pop    [NR];
  flit_t  front  [NR];
  logic   empty  [NR];
  logic   full   [NR];

  for (genvar i = 0; i < P; i++) begin : g_in
    hdr_t h;
    assign h        = hdr_t'(in_flit[i].data[HDR_W-1:0]);
    assign in_vc[i] = is_head(in_flit[i].ftype) ? (h.enc != ENC_CRC) : cur_vc[i];
    assign in_ready[i] = !full[2*i + int'(in_vc[i])];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                                              cur_vc[i] <= 1'b0;
      else if (in_valid[i] && in_ready[i] && is_head(in_flit[i].ftype)) cur_vc[i] <= in_vc[i];
    end

    for (genvar v = 0; v < 2; v++) begin : g_vc
      logic [FLIT_T_W-1:0] rdata;
      assign push[2*i+v]  = in_valid[i] && in_ready[i] && (int'(in_vc[i]) == v);
      assign front[2*i+v] = flit_t'(rdata);
      flit_fifo #(.W(FLIT_T_W), .DEPTH(DEPTH)) u_buf (
        .clk(clk), .rst_n(rst_n),
        .push(push[2*i+v]), .wdata(in_flit[i]),
        .pop(pop[2*i+v]), .rdata(rdata),
        .empty(empty[2*i+v]), .full(full[2*i+v])
      );
    end
  end

  // ------------------------------------------------ switch allocation
  logic          locked [P];
  logic [RW-1:0] owner  [P];
  logic [NR-1:0] req    [P];
  logic [NR-1:0] gnt    [P];
  logic [NR-1:0] sec_mask;
  logic          fwd    [P];

  always_comb begin
    for (int r = 0; r < int'(NR); r++) sec_mask[r] = (r % 2) == 1;
  end

  for (genvar o = 0; o < P; o++) begin : g_out
    localparam int unsigned ROT = (o * 7) % 32;   // decorrelate the outputs' draws
    logic        sec_pool_unused;
    logic [63:0] rnd2;
    assign rnd2 = {rnd, rnd};
    always_comb begin
      for (int r = 0; r < int'(NR); r++) begin
        hdr_t fh;
        fh = hdr_t'(front[r].data[HDR_W-1:0]);
        req[o][r] = !locked[o] && !empty[r] && is_head(front[r].ftype) &&
                    (((ht_en && fh.dst == ht_target) ? int'(ht_port) : route(fh.dst)) == o);
      end
    end

    prio_rand_arbiter #(.N(NR), .SEC_PROB(SEC_PROB)) u_arb (
      .req(req[o]), .sec(sec_mask), .rnd(rnd2[ROT +: 32]),
      .gnt(gnt[o]), .sec_pool(sec_pool_unused)
    );

    assign out_valid[o] = locked[o] && !empty[owner[o]];
    assign out_flit[o]  = front[owner[o]];
    assign fwd[o]       = out_valid[o] && out_ready[o];
    assign prio_event[o] = ((gnt[o] & sec_mask) != '0) && ((req[o] & ~sec_mask) != '0);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        locked[o] <= 1'b0;
        owner[o]  <= '0;
      end else if (!locked[o]) begin
        if (gnt[o] != '0) begin
          locked[o] <= 1'b1;
          for (int r = 0; r < int'(NR); r++) if (gnt[o][r]) owner[o] <= RW'(r);
        end
      end else if (fwd[o] && is_tail(out_flit[o].ftype)) begin
        locked[o] <= 1'b0;
      end
    end
  end

  always_comb begin
    for (int r = 0; r < int'(NR); r++) begin
      pop[r] = 1'b0;
      for (int o = 0; o < int'(P); o++)
        if (fwd[o] && int'(owner[o]) == r) pop[r] = 1'b1;
    end
  end

endmodule
