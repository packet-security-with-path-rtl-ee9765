// tb_psec_ni_tx: drives the sending half of the network interface in all
// three encoding modes and decodes every flit it emits with the reference
// models: header fields and header AMD code, CRC-32, packet AMD code,
// per-flit AMD codes, flit types and signatures.  Also checks the encoding
// mode state machine (mode value and mode_switch pulses), the priority of
// nack requests and that packet-level AMD adds exactly two cycles before the
// first flit compared with CRC.  The link sink applies random back-pressure.
module tb_psec_ni_tx;
  import psec_pkg::*;
  import psec_ref_pkg::*;

  localparam int ME = 5;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic                 tx_valid, tx_ready, psec_on, flit_level;
  logic [ID_W-1:0]      tx_dst;
  logic [PAYLOAD_W-1:0] tx_payload;
  logic                 nack_valid, nack_ready;
  logic [ID_W-1:0]      nack_dst;
  logic [31:0]          rnd;
  logic                 out_valid, out_ready;
  flit_t                out_flit;
  enc_mode_e            mode;
  logic                 mode_switch;

  psec_ni_tx dut (
    .clk(clk), .rst_n(rst_n), .node_id(ID_W'(ME)),
    .tx_valid(tx_valid), .tx_ready(tx_ready), .tx_dst(tx_dst), .tx_payload(tx_payload),
    .psec_on(psec_on), .flit_level(flit_level),
    .nack_valid(nack_valid), .nack_dst(nack_dst), .nack_ready(nack_ready),
    .rnd(rnd), .out_valid(out_valid), .out_flit(out_flit), .out_ready(out_ready),
    .mode(mode), .mode_switch(mode_switch));

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s @%0t", what, $time);
    end
  endtask

  // link sink with random back-pressure
  flit_t   got [$];
  int      cycle = 0;
  int      first_flit_cycle = -1;
  bit      stall_en = 1;
  int      switches = 0;
  flit_t   held;
  bit      was_stalled = 0;
  always @(posedge clk) begin
    cycle++;
    rnd <= $urandom;
    if (mode_switch && rst_n) switches++;
    if (rst_n && out_valid && was_stalled) chk(out_flit == held, "flit stable while stalled");
    was_stalled = out_valid && !out_ready;
    held = out_flit;
    if (out_valid && out_ready) begin
      got.push_back(out_flit);
      if (first_flit_cycle < 0) first_flit_cycle = cycle;
    end
  end
  always @(negedge clk) out_ready <= stall_en ? ($urandom % 3 != 0) : 1'b1;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [PAYLOAD_W-1:0] rand_payload();
    logic [255:0] r;
    for (int i = 0; i < 8; i++) r[i*32 +: 32] = $urandom;
    return r[PAYLOAD_W-1:0];
  endfunction

  int sig_exp [64];

  // send one packet, return the cycles from acceptance to the first flit
  task automatic send(input int dst, input bit on, input bit fl, input logic [PAYLOAD_W-1:0] pl,
                      output int lat);
    int acc_cycle;
    got.delete();
    first_flit_cycle = -1;
    @(negedge clk);
    tx_valid = 1; tx_dst = ID_W'(dst); tx_payload = pl; psec_on = on; flit_level = fl;
    @(posedge clk);
    while (!tx_ready) @(posedge clk);
    acc_cycle = cycle;
    @(negedge clk);
    tx_valid = 0;
    while (got.size() < PKT_FLITS) @(posedge clk);
    lat = first_flit_cycle - acc_cycle;
  endtask

  task automatic check_packet(input int dst, input int enc, input logic [PAYLOAD_W-1:0] pl);
    logic [255:0] blk, hd;
    logic [22:0]  hdr;
    chk(got.size() == PKT_FLITS, "flit count");
    if (got.size() != PKT_FLITS) return;
    chk(got[0].ftype == FT_HEAD && got[1].ftype == FT_BODY && got[3].ftype == FT_BODY &&
        got[4].ftype == FT_TAIL, "flit types");
    hd  = 256'(got[0].data);
    hdr = hd[22:0];
    chk(hdr == hdr_ref(ME, dst, enc, 0, sig_exp[dst]), $sformatf("header %h", hdr));
    chk(amd_valid_ref(256'(hdr), hd[29:23], hd[36:30], 7, 4, 'h83), "header AMD");
    sig_exp[dst] = (sig_exp[dst] + 1) % 128;
    for (int k = 0; k < 4; k++) blk[k*64 +: 64] = got[k+1].data;
    chk(blk[203:0] == pl, "payload");
    case (enc)
      0: chk(blk[235:204] == crc_ref(256'(pl), 204) && blk[255:236] == 0, "CRC-32");
      1: chk(amd_valid_ref(256'(pl), blk[220:204], blk[237:221], 17, 12, 'h20009) &&
             blk[255:238] == 0, "packet AMD");
      default: chk(blk[255:204] == 0, "flit mode block");
    endcase
    for (int k = 0; k < PKT_FLITS; k++) begin
      if (enc == 2) chk(amd_valid_ref(256'(got[k].data), got[k].chk[15:8], got[k].chk[7:0], 8, 8, 'h11B),
                        "flit AMD");
      else          chk(got[k].chk == 0, "no flit check bits");
    end
  endtask

  initial begin
    logic [PAYLOAD_W-1:0] pl;
    int lat_crc, lat_amd, lat_flit;
    tx_valid = 0; tx_dst = '0; tx_payload = '0; psec_on = 0; flit_level = 0;
    nack_valid = 0; nack_dst = '0; out_ready = 0; rnd = 32'h1234_5678;
    for (int i = 0; i < 64; i++) sig_exp[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(mode == ENC_CRC, "default mode is CRC");

    stall_en = 0;
    pl = rand_payload(); send(9, 0, 0, pl, lat_crc);  check_packet(9, 0, pl);
    pl = rand_payload(); send(9, 1, 0, pl, lat_amd);  check_packet(9, 1, pl);
    chk(mode == ENC_AMD_PKT, "mode AMD packet");
    pl = rand_payload(); send(9, 1, 1, pl, lat_flit); check_packet(9, 2, pl);
    chk(mode == ENC_AMD_FLIT, "mode AMD flit");
    chk(lat_amd == lat_crc + 2, $sformatf("AMD packet penalty %0d vs CRC %0d", lat_amd, lat_crc));
    chk(lat_flit == lat_crc, "flit mode adds no latency");

    stall_en = 1;
    for (int n = 0; n < 24; n++) begin
      int d, e;
      d = $urandom % 64; e = n % 3;
      pl = rand_payload();
      send(d, e != 0, e == 2, pl, lat_crc);
      check_packet(d, e, pl);
    end
    chk(mode == ENC_AMD_FLIT, "last mode");
    chk(switches == 2 + 24, $sformatf("mode switches %0d", switches));

    // nack request competes with a core packet: the nack goes first
    got.delete();
    @(negedge clk);
    nack_valid = 1; nack_dst = 6'd33;
    tx_valid = 1; tx_dst = 6'd2; tx_payload = rand_payload(); psec_on = 0; flit_level = 0;
    @(posedge clk);
    chk(nack_ready && !tx_ready, "nack has priority");
    @(negedge clk);
    nack_valid = 0;
    while (got.size() < 1) @(posedge clk);
    chk(got[0].ftype == FT_HEADTAIL, "nack is a single flit");
    chk(got[0].data[22:0] == hdr_ref(ME, 33, 0, 1, sig_exp[33]), "nack header");
    chk(amd_valid_ref(256'(got[0].data[22:0]), got[0].data[29:23], got[0].data[36:30], 7, 4, 'h83),
        "nack header AMD");
    sig_exp[33]++;
    while (!tx_ready) @(posedge clk);
    @(negedge clk);
    tx_valid = 0;
    repeat (30) @(posedge clk);
    chk(got.size() == 1 + PKT_FLITS, "data packet follows the nack");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
