// tb_psec_router: four sources push tagged packets into a 4-port router
// under random output back-pressure.  The sinks check that every packet
// arrives whole, at the port its destination selects, without interleaving
// with other packets, and in order per source and VC.  A contention phase
// (three inputs to one output, one of them AMD/secure) checks that the
// prioritized arbiter lets the secure VC win most grants.  A second router,
// at (1,2) of a 4x4 mesh, gets one packet for each of the 64 cores and must
// send it out of the port that XY routing selects; with its trojan hook
// enabled, packets for the target core must leave by the trojan's port.
module tb_psec_router;
  import psec_pkg::*;
  import psec_ref_pkg::*;

  localparam int P = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic         in_valid  [P];
  flit_t        in_flit   [P];
  logic         in_ready  [P];
  logic         out_valid [P];
  flit_t        out_flit  [P];
  logic         out_ready [P];
  logic [P-1:0] prio_event;

  psec_router #(.CONC(P), .MESH_X(1), .MESH_Y(1)) dut (
    .clk(clk), .rst_n(rst_n), .my_x(4'd0), .my_y(4'd0), .seed(32'h5EC0_0C5E),
    .ht_en(1'b0), .ht_target('0), .ht_port('0),
    .in_valid(in_valid), .in_flit(in_flit), .in_ready(in_ready),
    .out_valid(out_valid), .out_flit(out_flit), .out_ready(out_ready),
    .prio_event(prio_event));

  // mesh router at (1,2): ports 0-3 local, 4 east, 5 west, 6 north, 7 south
  localparam int MP = 8;
  logic         m_in_valid  [MP];
  flit_t        m_in_flit   [MP];
  logic         m_in_ready  [MP];
  logic         m_out_valid [MP];
  flit_t        m_out_flit  [MP];
  logic         m_out_ready [MP];
  logic [MP-1:0] m_prio;
  logic         m_ht_en;
  logic [5:0]   m_ht_target;
  logic [3:0]   m_ht_port;

  psec_router #(.CONC(4), .MESH_X(4), .MESH_Y(4)) dut_mesh (
    .clk(clk), .rst_n(rst_n), .my_x(4'd1), .my_y(4'd2), .seed(32'h0BAD_F00D),
    .ht_en(m_ht_en), .ht_target(m_ht_target), .ht_port(m_ht_port),
    .in_valid(m_in_valid), .in_flit(m_in_flit), .in_ready(m_in_ready),
    .out_valid(m_out_valid), .out_flit(m_out_flit), .out_ready(m_out_ready),
    .prio_event(m_prio));

  function automatic int xy_port(int d);
    int r, rx, ry;
    r = d / 4; rx = r % 4; ry = r / 4;
    if (rx > 1) return 4;
    if (rx < 1) return 5;
    if (ry > 2) return 6;
    if (ry < 2) return 7;
    return d % 4;
  endfunction

  int m_seen_port = -1;
  int m_seen_dst  = -1;
  always @(posedge clk) if (rst_n)
    for (int o = 0; o < MP; o++)
      if (m_out_valid[o] && m_out_ready[o] && is_head(m_out_flit[o].ftype)) begin
        m_seen_port = o;
        m_seen_dst  = m_out_flit[o].data[16:11];
      end

  task automatic mesh_pkt(input int dst);
    for (int k = 0; k < PKT_FLITS; k++) begin
      @(negedge clk);
      m_in_valid[0] = 1;
      m_in_flit[0].ftype = (k == 0) ? FT_HEAD : (k == PKT_FLITS - 1) ? FT_TAIL : FT_BODY;
      m_in_flit[0].data  = (k == 0) ? 64'(hdr_ref(0, dst, 0, 0, 0)) : 64'(k);
      m_in_flit[0].chk   = '0;
      @(posedge clk);
      while (!m_in_ready[0]) @(posedge clk);
    end
    @(negedge clk);
    m_in_valid[0] = 0;
    repeat (4) @(posedge clk);
  endtask

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s @%0t", what, $time);
    end
  endtask

  // ------------------------------------------------------------ sinks
  bit   stall = 1;
  int   delivered = 0;
  int   prio_events = 0;
  int   next_id [P][2];          // per source, per vc: expected next packet id
  int   order3 [$];              // sources of the packets delivered at port 3
  bit   in_pkt [P];
  int   cur_src [P], cur_id [P], cur_idx [P];
  logic cur_vc [P];

  always @(negedge clk) for (int o = 0; o < P; o++) out_ready[o] <= stall ? ($urandom % 4 != 0) : 1'b1;

  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < P; o++) begin
      if (prio_event[o]) prio_events++;
      if (out_valid[o] && out_ready[o]) begin
        flit_t f;
        f = out_flit[o];
        if (is_head(f.ftype)) begin
          chk(!in_pkt[o], "head inside a packet");
          chk(int'(f.data[16:11]) % P == o, "routed to the right port");
          in_pkt[o]  = 1;
          cur_src[o] = f.data[63:56];
          cur_id[o]  = f.data[55:48];
          cur_idx[o] = 0;
          cur_vc[o]  = (f.data[10:9] != 2'd0);
          chk(cur_id[o] == next_id[cur_src[o]][cur_vc[o]], "in order per source and VC");
          next_id[cur_src[o]][cur_vc[o]] = cur_id[o] + 1;
          if (o == 3) order3.push_back(cur_src[o]);
        end else begin
          chk(in_pkt[o], "body without head");
          chk(f.data[63:56] == cur_src[o] && f.data[55:48] == cur_id[o], "no interleaving");
          chk(f.data[47:40] == cur_idx[o], "flit order");
        end
        cur_idx[o]++;
        if (is_tail(f.ftype)) begin
          chk(cur_idx[o] == PKT_FLITS, "packet length");
          in_pkt[o] = 0;
          delivered++;
        end
      end
    end
  end

  // ---------------------------------------------------------- sources
  int sent_id [P][2];

  task automatic send_pkt(input int s, input int dst, input bit secure);
    int id;
    id = sent_id[s][secure];
    sent_id[s][secure]++;
    for (int k = 0; k < PKT_FLITS; k++) begin
      flit_t f;
      f.ftype = (k == 0) ? FT_HEAD : (k == PKT_FLITS - 1) ? FT_TAIL : FT_BODY;
      f.data  = {$urandom, $urandom};
      f.data[63:40] = {8'(s), 8'(id), 8'(k)};
      if (k == 0) f.data[22:0] = hdr_ref(s, dst, secure ? 1 : 0, 0, id);
      f.chk = 16'($urandom);
      @(negedge clk);
      in_valid[s] = 1; in_flit[s] = f;
      @(posedge clk);
      while (!in_ready[s]) @(posedge clk);
    end
    @(negedge clk);
    in_valid[s] = 0;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total, n_sec;
    for (int i = 0; i < P; i++) begin
      in_valid[i] = 0; in_flit[i] = '0; in_pkt[i] = 0; out_ready[i] = 0;
      for (int v = 0; v < 2; v++) begin next_id[i][v] = 0; sent_id[i][v] = 0; end
    end
    for (int i = 0; i < MP; i++) begin
      m_in_valid[i] = 0; m_in_flit[i] = '0; m_out_ready[i] = 1;
    end
    m_ht_en = 0; m_ht_target = '0; m_ht_port = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // XY routing in the mesh router
    for (int d = 0; d < 64; d++) begin
      mesh_pkt(d);
      chk(m_seen_dst == d && m_seen_port == xy_port(d), $sformatf("XY route of core %0d: port %0d", d, m_seen_port));
    end
    // compromised router: packets for core 37 go out of port 2
    m_ht_en = 1; m_ht_target = 6'd37; m_ht_port = 4'd2;
    mesh_pkt(37);
    chk(m_seen_dst == 37 && m_seen_port == 2, "trojan redirects its target");
    mesh_pkt(38);
    chk(m_seen_dst == 38 && m_seen_port == xy_port(38), "trojan leaves other packets alone");
    m_ht_en = 0;

    // random traffic from all sources
    total = 0;
    fork
      for (int n = 0; n < 25; n++) send_pkt(0, $urandom % 64, $urandom % 2);
      for (int n = 0; n < 25; n++) send_pkt(1, $urandom % 64, $urandom % 2);
      for (int n = 0; n < 25; n++) send_pkt(2, $urandom % 64, $urandom % 2);
      for (int n = 0; n < 25; n++) send_pkt(3, $urandom % 64, $urandom % 2);
    join
    total = 100;
    repeat (200) @(posedge clk);
    chk(delivered == total, $sformatf("delivered %0d of %0d", delivered, total));

    // contention: inputs 0 (secure), 1 and 2 (normal) all send to port 3
    order3.delete();
    fork
      for (int n = 0; n < 10; n++) send_pkt(0, 3, 1);
      for (int n = 0; n < 10; n++) send_pkt(1, 3, 0);
      for (int n = 0; n < 10; n++) send_pkt(2, 3, 0);
    join
    repeat (200) @(posedge clk);
    chk(delivered == total + 30, "contention packets delivered");
    n_sec = 0;
    for (int i = 0; i < 15 && i < order3.size(); i++) if (order3[i] == 0) n_sec++;
    $display("INFO secure packets among the first 15 at port 3: %0d, priority events %0d", n_sec, prio_events);
    chk(n_sec >= 8, "secure VC favoured under contention");
    chk(prio_events > 0, "priority event seen");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
