// tb_psec_ni_rx: sends hand-built packets (encoded with the reference
// models) into the receiving half of the network interface of core 3 and
// checks its verdict for each: delivery of good CRC, packet-AMD and
// flit-AMD packets, and drops for a tampered header, an authentic header for
// another core, a corrupted flit, a corrupted payload and a duplicated or
// stale signature, with or without a nack to the source as specified.  It
// also shows the weakness of CRC against an attacker who knows the code: an
// error pattern that is itself a CRC codeword passes unnoticed, while the
// same kind of attack on an AMD packet is caught.
module tb_psec_ni_rx;
  import psec_pkg::*;
  import psec_ref_pkg::*;

  localparam int ME = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic                 in_valid, in_ready;
  flit_t                in_flit;
  logic                 rx_valid, rx_nack, rx_drop;
  logic [ID_W-1:0]      rx_src;
  enc_mode_e            rx_enc;
  logic [PAYLOAD_W-1:0] rx_payload;
  drop_e                rx_drop_reason;
  logic                 nack_valid, nack_ready, nack_lost;
  logic [ID_W-1:0]      nack_dst;

  psec_ni_rx dut (
    .clk(clk), .rst_n(rst_n), .node_id(ID_W'(ME)),
    .in_valid(in_valid), .in_flit(in_flit), .in_ready(in_ready),
    .rx_valid(rx_valid), .rx_src(rx_src), .rx_enc(rx_enc), .rx_payload(rx_payload),
    .rx_nack(rx_nack), .rx_drop(rx_drop), .rx_drop_reason(rx_drop_reason),
    .nack_valid(nack_valid), .nack_dst(nack_dst), .nack_ready(nack_ready),
    .nack_lost(nack_lost));

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s @%0t", what, $time);
    end
  endtask

  // verdict monitor
  int   cycle = 0, tail_cycle = 0, verdict_cycle = 0;
  int   n_valid = 0, n_nack = 0, n_drop = 0, n_nackreq = 0;
  drop_e last_reason;
  logic [PAYLOAD_W-1:0] last_payload;
  logic [ID_W-1:0] last_src, last_nack_dst;
  always @(posedge clk) begin
    cycle++;
    if (rst_n) begin
      chk(int'(rx_valid) + int'(rx_nack) + int'(rx_drop) <= 1, "one verdict at a time");
      if (rx_valid) begin n_valid++; last_payload = rx_payload; last_src = rx_src; verdict_cycle = cycle; end
      if (rx_nack)  begin n_nack++;  last_src = rx_src; verdict_cycle = cycle; end
      if (rx_drop)  begin n_drop++;  last_reason = rx_drop_reason; verdict_cycle = cycle; end
      if (nack_valid && nack_ready) begin n_nackreq++; last_nack_dst = nack_dst; end
      if (in_valid && in_ready && is_tail(in_flit.ftype)) tail_cycle = cycle;
    end
  end
  initial nack_ready = 1'b1;

  initial begin
    #300000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  flit_t pkt [PKT_FLITS];
  int    npkt;

  function automatic logic [PAYLOAD_W-1:0] rand_payload();
    logic [255:0] r;
    for (int i = 0; i < 8; i++) r[i*32 +: 32] = $urandom;
    return r[PAYLOAD_W-1:0];
  endfunction

  // build an encoded packet into pkt[]
  task automatic build(input int src, input int dst, input int enc, input int ptype,
                       input int sig, input logic [PAYLOAD_W-1:0] pl);
    logic [22:0]  h;
    logic [255:0] blk;
    int unsigned  x;
    h = hdr_ref(src, dst, enc, ptype, sig);
    x = $urandom % 128;
    pkt[0].ftype = (ptype == 1) ? FT_HEADTAIL : FT_HEAD;
    pkt[0].data  = {27'd0, 7'(amd_f_ref(256'(h), 7, 4, x, 'h83)), 7'(amd_pi_ref(256'(h), 7, 4, x)), h};
    blk = 256'(pl);
    if (enc == 0) blk[235:204] = crc_ref(256'(pl), 204);
    if (enc == 1) begin
      x = $urandom % (1 << 17);
      blk[220:204] = 17'(amd_pi_ref(256'(pl), 17, 12, x));
      blk[237:221] = 17'(amd_f_ref(256'(pl), 17, 12, x, 'h20009));
    end
    for (int k = 1; k < PKT_FLITS; k++) begin
      pkt[k].ftype = (k == PKT_FLITS - 1) ? FT_TAIL : FT_BODY;
      pkt[k].data  = blk[(k-1)*64 +: 64];
    end
    npkt = (ptype == 1) ? 1 : PKT_FLITS;
    for (int k = 0; k < PKT_FLITS; k++) begin
      pkt[k].chk = '0;
      if (enc == 2) begin
        x = $urandom % 256;
        pkt[k].chk = {8'(amd_pi_ref(256'(pkt[k].data), 8, 8, x)), 8'(amd_f_ref(256'(pkt[k].data), 8, 8, x, 'h11B))};
      end
    end
  endtask

  // drive pkt[], wait for the verdict; returns the verdict kind 0 valid 1 nack 2 drop
  task automatic drive(output int kind);
    int v0, n0, d0;
    v0 = n_valid; n0 = n_nack; d0 = n_drop;
    for (int k = 0; k < npkt; k++) begin
      @(negedge clk);
      in_valid = 1; in_flit = pkt[k];
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    @(negedge clk);
    in_valid = 0;
    for (int t = 0; t < 20 && n_valid == v0 && n_nack == n0 && n_drop == d0; t++) @(posedge clk);
    @(negedge clk);
    kind = (n_valid != v0) ? 0 : (n_nack != n0) ? 1 : (n_drop != d0) ? 2 : 3;
  endtask

  initial begin
    logic [PAYLOAD_W-1:0] pl, e;
    logic [255:0] ev;
    int kind, nreq, bitpos;
    in_valid = 0; in_flit = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1-3 good packets in the three modes
    for (int enc = 0; enc < 3; enc++) begin
      pl = rand_payload();
      build(7, ME, enc, 0, enc, pl); drive(kind);
      chk(kind == 0 && last_payload == pl && last_src == 7, $sformatf("good packet enc=%0d", enc));
      chk(verdict_cycle - tail_cycle == 4, $sformatf("verdict %0d cycles after tail", verdict_cycle - tail_cycle));
    end
    // 4 duplicate of the last packet
    nreq = n_nackreq;
    drive(kind);
    chk(kind == 2 && last_reason == DROP_DUP, "duplicate dropped");
    // 5 stale signature
    build(7, ME, 0, 0, 1, rand_payload()); drive(kind);
    chk(kind == 2 && last_reason == DROP_DUP, "stale signature dropped");
    chk(n_nackreq == nreq, "no nack for duplicates");
    // 6 tampered header: destination bit flipped on the wire
    build(7, ME, 0, 0, 3, rand_payload());
    pkt[0].data[12] ^= 1'b1;
    drive(kind);
    chk(kind == 2 && last_reason == DROP_HDR, "tampered header dropped");
    chk(n_nackreq == nreq, "no nack for an unauthentic header");
    // 7 authentic header for another core (duplicated / misrouted packet)
    build(12, 4, 1, 0, 0, rand_payload()); drive(kind);
    chk(kind == 2 && last_reason == DROP_DST, "foreign packet dropped");
    repeat (2) @(posedge clk);
    chk(n_nackreq == nreq + 1 && last_nack_dst == 12, "nack to the foreign packet's source");
    // 8 CRC packet with a random bit error
    build(7, ME, 0, 0, 3, rand_payload());
    bitpos = $urandom % 64;
    pkt[2].data[bitpos] ^= 1'b1;
    drive(kind);
    chk(kind == 2 && last_reason == DROP_DATA, "CRC error dropped");
    repeat (2) @(posedge clk);
    chk(n_nackreq == nreq + 2 && last_nack_dst == 7, "nack after CRC error");
    // 9 AMD packet with a burst error
    build(7, ME, 1, 0, 4, rand_payload());
    pkt[3].data[31:0] ^= $urandom | 1;
    drive(kind);
    chk(kind == 2 && last_reason == DROP_DATA, "AMD packet error dropped");
    // 10 flit-level AMD error
    build(7, ME, 2, 0, 5, rand_payload());
    pkt[4].data[5] ^= 1'b1;
    drive(kind);
    chk(kind == 2 && last_reason == DROP_FLIT, "flit AMD error dropped");
    // 11 nack packet
    build(9, ME, 0, 1, 0, '0); drive(kind);
    chk(kind == 1 && last_src == 9, "nack packet reported");
    // 12 attack on CRC: the error is a CRC codeword, so CRC misses it
    pl = rand_payload();
    build(7, ME, 0, 0, 6, pl);
    e  = rand_payload();
    ev = 256'(e);
    ev[235:204] = crc_ref(256'(e), 204) ^ crc_ref(256'(0), 204);   // linear part of the CRC
    for (int k = 1; k < PKT_FLITS; k++) pkt[k].data ^= ev[(k-1)*64 +: 64];
    drive(kind);
    chk(kind == 0 && last_payload == (pl ^ e), "CRC codeword error goes undetected");
    // 13 the same kind of attack on an AMD packet is detected
    pl = rand_payload();
    build(7, ME, 1, 0, 7, pl);
    for (int k = 1; k < PKT_FLITS; k++) pkt[k].data ^= {$urandom, $urandom};
    drive(kind);
    chk(kind == 2 && last_reason == DROP_DATA, "AMD catches the attack");
    // 14 after the drops a fresh packet is still accepted
    pl = rand_payload();
    build(7, ME, 0, 0, 8, pl); drive(kind);
    chk(kind == 0 && last_payload == pl, "fresh packet after drops");
    // 15 back-pressure on the nack port: second nack is lost
    nack_ready = 0;
    build(7, ME, 0, 0, 9, rand_payload()); pkt[1].data[0] ^= 1'b1; drive(kind);
    build(7, ME, 0, 0, 10, rand_payload()); pkt[1].data[0] ^= 1'b1; drive(kind);
    chk(nack_valid && nack_dst == 7, "nack waits");
    nack_ready = 1;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
