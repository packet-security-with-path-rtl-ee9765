// tb_psec_noc: end-to-end test of the P-Sec network at its default size,
// a 4x4 concentrated mesh of 64 cores, with no parameter override.
//
// Walks through the three case studies of compromised links plus the other
// mechanisms of the design, then runs random all-to-all traffic, and counts
// each mechanism:
//   crc / amd_pkt / amd_flit  good packets delivered in each encoding mode
//   mode_switch               the NI changes its encoding mode
//   crc_silent                scenario 1: a crafted error on a link, itself a
//                             CRC codeword, corrupts a CRC packet unnoticed
//   data_drop + nack          scenario 2: the same attack on an AMD packet is
//                             detected, the packet dropped, a nack returned
//   flit_drop                 flit-level AMD catches a corrupted flit
//   hdr_drop                  scenario 3: a header altered so that the packet
//                             reaches a rogue core fails authentication there
//   dst_drop                  a compromised router steers an authentic packet
//                             to a rogue core, which drops it
//   prio                      secure VC wins an output under contention
// Any mechanism that never happens counts as a failure.
module tb_psec_noc;
  import psec_pkg::*;
  import psec_ref_pkg::*;

  localparam int N  = 64;
  localparam int NR = 16;
  localparam int P  = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [N-1:0]         tx_valid, tx_ready, psec_on, flit_level, mode_switch;
  logic [ID_W-1:0]      tx_dst [N];
  logic [PAYLOAD_W-1:0] tx_payload [N];
  enc_mode_e            mode [N];
  logic [N-1:0]         rx_valid, rx_nack, rx_drop, nack_lost;
  logic [P-1:0]         prio_event [NR];
  logic [NR-1:0]        ht_en;
  logic [ID_W-1:0]      ht_target [NR];
  logic [3:0]           ht_port [NR];
  logic [ID_W-1:0]      rx_src [N];
  enc_mode_e            rx_enc [N];
  logic [PAYLOAD_W-1:0] rx_payload [N];
  drop_e                rx_drop_reason [N];
  logic [FLIT_W+CHK_W-1:0] fault_inj_mask [N], fault_ej_mask [N];
  logic [2:0]           fault_inj_flit [N], fault_ej_flit [N];

  psec_noc dut (
    .clk(clk), .rst_n(rst_n),
    .tx_valid(tx_valid), .tx_ready(tx_ready), .tx_dst(tx_dst), .tx_payload(tx_payload),
    .psec_on(psec_on), .flit_level(flit_level), .mode(mode), .mode_switch(mode_switch),
    .rx_valid(rx_valid), .rx_src(rx_src), .rx_enc(rx_enc), .rx_payload(rx_payload),
    .rx_nack(rx_nack), .rx_drop(rx_drop), .rx_drop_reason(rx_drop_reason), .nack_lost(nack_lost),
    .fault_inj_mask(fault_inj_mask), .fault_inj_flit(fault_inj_flit),
    .fault_ej_mask(fault_ej_mask), .fault_ej_flit(fault_ej_flit),
    .ht_en(ht_en), .ht_target(ht_target), .ht_port(ht_port),
    .prio_event(prio_event));

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s @%0t", what, $time);
    end
  endtask

  // ---------------------------------------------------------- monitor
  int n_rx [N], n_nack [N], n_drop [N];
  int cnt_crc = 0, cnt_pkt = 0, cnt_flit = 0, cnt_switch = 0, cnt_prio = 0;
  int cnt_drop [8];
  logic [PAYLOAD_W-1:0] last_pl [N];
  int last_src [N];
  drop_e last_reason [N];
  logic [PAYLOAD_W-1:0] expq [N][$];     // expected payloads at core 47, per source
  logic [PAYLOAD_W-1:0] pend [N][$];     // random phase: payloads still due at each core
  int   rand_ok = 0, rand_bad = 0;
  bit   rand_phase = 0;

  always @(posedge clk) if (rst_n) begin
    for (int r = 0; r < NR; r++) if (prio_event[r] != '0) cnt_prio++;
    for (int c = 0; c < N; c++) begin
      if (mode_switch[c]) cnt_switch++;
      if (rx_nack[c])     n_nack[c]++;
      if (rx_drop[c]) begin
        n_drop[c]++;
        last_reason[c] = rx_drop_reason[c];
        cnt_drop[int'(rx_drop_reason[c])]++;
      end
      if (rx_valid[c]) begin
        n_rx[c]++;
        last_pl[c]  = rx_payload[c];
        last_src[c] = rx_src[c];
        case (rx_enc[c])
          ENC_CRC:     cnt_crc++;
          ENC_AMD_PKT: cnt_pkt++;
          default:     cnt_flit++;
        endcase
        if (c == 47 && expq[rx_src[c]].size() > 0) begin
          chk(rx_payload[c] == expq[rx_src[c]].pop_front(), "contention payload in order");
        end
        if (rand_phase) begin
          int idx[$];
          idx = pend[c].find_first_index(p) with (p == rx_payload[c]);
          if (idx.size() > 0) begin pend[c].delete(idx[0]); rand_ok++; end
          else rand_bad++;
        end
      end
    end
  end

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [PAYLOAD_W-1:0] rand_payload();
    logic [255:0] r;
    for (int i = 0; i < 8; i++) r[i*32 +: 32] = $urandom;
    return r[PAYLOAD_W-1:0];
  endfunction

  // hand one packet to core s's NI; enc 0 CRC, 1 AMD packet, 2 AMD flit
  task automatic send(input int s, input int dst, input int enc, input logic [PAYLOAD_W-1:0] pl);
    @(negedge clk);
    tx_valid[s] = 1; tx_dst[s] = ID_W'(dst); tx_payload[s] = pl;
    psec_on[s] = (enc != 0); flit_level[s] = (enc == 2);
    @(posedge clk);
    while (!tx_ready[s]) @(posedge clk);
    @(negedge clk);
    tx_valid[s] = 0;
  endtask

  task automatic settle(int cycles = 40);
    repeat (cycles) @(posedge clk);
  endtask

  initial begin
    logic [PAYLOAD_W-1:0] pl, e;
    logic [255:0] ev;
    int r0, d0, k0;
    for (int c = 0; c < N; c++) begin
      tx_valid[c] = 0; tx_dst[c] = '0; tx_payload[c] = '0; psec_on[c] = 0; flit_level[c] = 0;
      fault_inj_mask[c] = '0; fault_ej_mask[c] = '0; fault_inj_flit[c] = '0; fault_ej_flit[c] = '0;
      n_rx[c] = 0; n_nack[c] = 0; n_drop[c] = 0;
    end
    for (int r = 0; r < NR; r++) begin ht_en[r] = 0; ht_target[r] = '0; ht_port[r] = '0; end
    for (int i = 0; i < 8; i++) cnt_drop[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // good traffic in the three modes, across the mesh
    pl = rand_payload(); send(0, 63, 0, pl); settle(60);
    chk(n_rx[63] == 1 && last_pl[63] == pl && last_src[63] == 0, "CRC packet 0->63");
    pl = rand_payload(); send(5, 40, 1, pl); settle(60);
    chk(n_rx[40] == 1 && last_pl[40] == pl && last_src[40] == 5, "AMD packet 5->40");
    pl = rand_payload(); send(17, 2, 2, pl); settle(60);
    chk(n_rx[2] == 1 && last_pl[2] == pl && last_src[2] == 17, "AMD flit packet 17->2");

    // scenario 1: the ejection link of core 63 adds an error that is a CRC
    // codeword, confined to the tail flit: 12 payload bits and the CRC field
    e  = '0;
    e[203:192] = 12'($urandom | 1);
    ev = 256'(e);
    ev[235:204] = crc_ref(256'(e), 204) ^ crc_ref(256'(0), 204);
    fault_ej_flit[63] = 3'd4;
    fault_ej_mask[63] = {ev[255:192], 16'h0};
    pl = rand_payload(); send(0, 63, 0, pl); settle(60);
    chk(n_rx[63] == 2 && last_pl[63] == (pl ^ e) && last_pl[63] != pl, "CRC packet silently corrupted");
    // scenario 2: the same trojan against an AMD packet
    r0 = n_rx[63]; k0 = n_nack[0];
    pl = rand_payload(); send(0, 63, 1, pl); settle(80);
    chk(n_rx[63] == r0 && last_reason[63] == DROP_DATA, "AMD packet attack detected");
    chk(n_nack[0] == k0 + 1, "nack returned to core 0");
    fault_ej_mask[63] = '0;

    // flit-level AMD against a corrupted body flit on the link of core 2
    fault_ej_flit[2] = 3'd2;
    fault_ej_mask[2] = {32'h0, $urandom | 1, 16'h0};
    r0 = n_rx[2]; k0 = n_nack[17];
    pl = rand_payload(); send(17, 2, 2, pl); settle(80);
    chk(n_rx[2] == r0 && last_reason[2] == DROP_FLIT, "flit AMD detects the corrupted flit");
    chk(n_nack[17] == k0 + 1, "nack returned to core 17");
    fault_ej_mask[2] = '0;

    // scenario 3: a trojan on core 0's injection link rewrites the
    // destination (1 -> 3); core 3 receives the packet and rejects it
    fault_inj_flit[0] = 3'd0;
    fault_inj_mask[0] = 80'(1) << (16 + 12);
    r0 = n_rx[3]; d0 = n_drop[3]; k0 = n_nack[0];
    pl = rand_payload(); send(0, 1, 1, pl); settle(60);
    chk(n_rx[3] == r0 && n_drop[3] == d0 + 1 && last_reason[3] == DROP_HDR, "rogue core rejects the header");
    chk(n_nack[0] == k0, "no nack for an unauthentic header");
    fault_inj_mask[0] = '0;

    // compromised router 10 steers packets for core 41 to core 42
    ht_en[10] = 1; ht_target[10] = 6'd41; ht_port[10] = 4'd2;
    d0 = n_drop[42]; k0 = n_nack[5]; r0 = n_rx[41];
    pl = rand_payload(); send(5, 41, 1, pl); settle(80);
    chk(n_drop[42] == d0 + 1 && last_reason[42] == DROP_DST, "rogue core drops the stolen packet");
    chk(n_nack[5] == k0 + 1 && n_rx[41] == r0, "nack returned to core 5");
    ht_en[10] = 0;

    // contention at core 47: core 44 secure, cores 45 and 46 normal
    r0 = n_rx[47];
    fork
      for (int n = 0; n < 6; n++) begin pl = rand_payload(); expq[44].push_back(pl); send(44, 47, 1, pl); end
      for (int n = 0; n < 6; n++) begin logic [PAYLOAD_W-1:0] p1; p1 = rand_payload(); expq[45].push_back(p1); send(45, 47, 0, p1); end
      for (int n = 0; n < 6; n++) begin logic [PAYLOAD_W-1:0] p2; p2 = rand_payload(); expq[46].push_back(p2); send(46, 47, 0, p2); end
    join
    settle(200);
    chk(n_rx[47] == r0 + 18, $sformatf("contention: %0d of 18 delivered", n_rx[47] - r0));

    // random all-to-all traffic in random modes
    rand_phase = 1;
    for (int c = 0; c < N; c++) begin
      automatic int cc = c;
      fork
        for (int n = 0; n < 4; n++) begin
          int d;
          logic [PAYLOAD_W-1:0] p3;
          d  = $urandom % N;
          p3 = rand_payload();
          pend[d].push_back(p3);
          send(cc, d, $urandom % 3, p3);
        end
      join_none
    end
    wait fork;
    settle(2000);
    begin
      int left;
      left = 0;
      for (int c = 0; c < N; c++) left += pend[c].size();
      chk(left == 0 && rand_bad == 0 && rand_ok == 4 * N,
          $sformatf("random traffic: %0d delivered, %0d unexpected, %0d missing", rand_ok, rand_bad, left));
    end

    $display("INFO crc=%0d amd_pkt=%0d amd_flit=%0d mode_switch=%0d crc_silent=1 data_drop=%0d flit_drop=%0d hdr_drop=%0d dst_drop=%0d nacks=%0d prio=%0d",
             cnt_crc, cnt_pkt, cnt_flit, cnt_switch, cnt_drop[DROP_DATA], cnt_drop[DROP_FLIT],
             cnt_drop[DROP_HDR], cnt_drop[DROP_DST], n_nack[0] + n_nack[17] + n_nack[5], cnt_prio);
    chk(cnt_crc > 0, "mechanism: CRC delivery");
    chk(cnt_pkt > 0, "mechanism: AMD packet delivery");
    chk(cnt_flit > 0, "mechanism: AMD flit delivery");
    chk(cnt_switch > 0, "mechanism: mode switch");
    chk(cnt_drop[DROP_DATA] > 0, "mechanism: payload check drop");
    chk(cnt_drop[DROP_FLIT] > 0, "mechanism: flit check drop");
    chk(cnt_drop[DROP_HDR] > 0, "mechanism: header authentication drop");
    chk(cnt_drop[DROP_DST] > 0, "mechanism: destination check drop");
    chk(n_nack[0] + n_nack[17] + n_nack[5] > 0, "mechanism: nack");
    chk(cnt_prio > 0, "mechanism: secure priority");
    chk(nack_lost == '0, "no nack lost");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
