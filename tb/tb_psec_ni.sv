// tb_psec_ni: the network interface of core 2 with its injection link
// looped back to its ejection link through a fault-injecting wire.  Packets
// to itself in each mode must come back intact; a corrupted body flit must
// be dropped, and the resulting nack must travel the loop and be reported.
module tb_psec_ni;
  import psec_pkg::*;

  localparam int ME = 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic tx_valid, tx_ready, psec_on, flit_level, mode_switch;
  logic [ID_W-1:0] tx_dst, rx_src;
  logic [PAYLOAD_W-1:0] tx_payload, rx_payload;
  enc_mode_e mode, rx_enc;
  logic rx_valid, rx_nack, rx_drop, nack_lost;
  drop_e rx_drop_reason;
  logic inj_valid, inj_ready, ej_valid, ej_ready;
  flit_t inj_flit, ej_flit;
  logic [63:0] body_mask;

  psec_ni dut (
    .clk(clk), .rst_n(rst_n), .node_id(ID_W'(ME)),
    .tx_valid(tx_valid), .tx_ready(tx_ready), .tx_dst(tx_dst), .tx_payload(tx_payload),
    .psec_on(psec_on), .flit_level(flit_level), .mode(mode), .mode_switch(mode_switch),
    .rx_valid(rx_valid), .rx_src(rx_src), .rx_enc(rx_enc), .rx_payload(rx_payload),
    .rx_nack(rx_nack), .rx_drop(rx_drop), .rx_drop_reason(rx_drop_reason), .nack_lost(nack_lost),
    .inj_valid(inj_valid), .inj_flit(inj_flit), .inj_ready(inj_ready),
    .ej_valid(ej_valid), .ej_flit(ej_flit), .ej_ready(ej_ready));

  // loopback wire with a fault on body flits
  always_comb begin
    ej_valid  = inj_valid;
    inj_ready = ej_ready;
    ej_flit   = inj_flit;
    if (!is_head(inj_flit.ftype)) ej_flit.data = inj_flit.data ^ body_mask;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s @%0t", what, $time);
    end
  endtask

  int n_valid = 0, n_nack = 0, n_drop = 0;
  logic [PAYLOAD_W-1:0] last_pl;
  enc_mode_e last_enc;
  drop_e last_reason;
  always @(posedge clk) if (rst_n) begin
    if (rx_valid) begin n_valid++; last_pl = rx_payload; last_enc = rx_enc; end
    if (rx_nack)  n_nack++;
    if (rx_drop)  begin n_drop++; last_reason = rx_drop_reason; end
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input bit on, input bit fl, input logic [PAYLOAD_W-1:0] pl);
    @(negedge clk);
    tx_valid = 1; tx_dst = ID_W'(ME); tx_payload = pl; psec_on = on; flit_level = fl;
    @(posedge clk);
    while (!tx_ready) @(posedge clk);
    @(negedge clk);
    tx_valid = 0;
    repeat (20) @(posedge clk);
  endtask

  initial begin
    logic [PAYLOAD_W-1:0] pl;
    tx_valid = 0; tx_dst = '0; tx_payload = '0; psec_on = 0; flit_level = 0; body_mask = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int e = 0; e < 3; e++) begin
      pl = PAYLOAD_W'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      send(e != 0, e == 2, pl);
      chk(n_valid == e + 1 && last_pl == pl && int'(last_enc) == e, $sformatf("loopback mode %0d", e));
    end
    // corrupted packet: dropped, then the nack to ourselves arrives
    body_mask = 64'h0000_0100_0000_0000;
    send(1, 0, '1);
    body_mask = '0;
    repeat (20) @(posedge clk);
    chk(n_drop == 1 && last_reason == DROP_DATA, "corrupted packet dropped");
    chk(n_nack == 1, "nack looped back");
    chk(n_valid == 3, "nothing corrupt delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
