// tb_amd_encoder: checks the three AMD encoder configurations of P-Sec
// (packet (204,17,17) with a 2-cycle pipeline, flit (64,8,8) and header
// (23,7,7) combinational) against a term-by-term reference model, and the
// packet encoder's latency of exactly two cycles.
module tb_amd_encoder;
  import psec_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // packet encoder
  logic         p_iv, p_ov;
  logic [203:0] p_y;
  logic [16:0]  p_x, p_pi, p_f;
  amd_encoder #(.M(17), .B(12), .K(204), .LATENCY(2), .POLY(18'h20009)) u_pkt (
    .clk(clk), .rst_n(rst_n), .in_valid(p_iv), .y(p_y), .x(p_x),
    .out_valid(p_ov), .pi(p_pi), .f(p_f));

  // flit encoder
  logic [63:0] f_y;
  logic [7:0]  f_x, f_pi, f_f;
  logic        f_ov;
  amd_encoder #(.M(8), .B(8), .K(64), .LATENCY(0), .POLY(9'h11B)) u_flit (
    .clk(clk), .rst_n(rst_n), .in_valid(1'b1), .y(f_y), .x(f_x),
    .out_valid(f_ov), .pi(f_pi), .f(f_f));

  // header encoder
  logic [22:0] h_y;
  logic [6:0]  h_x, h_pi, h_f;
  logic        h_ov;
  amd_encoder #(.M(7), .B(4), .K(23), .LATENCY(0), .POLY(8'h83)) u_hdr (
    .clk(clk), .rst_n(rst_n), .in_valid(1'b1), .y(h_y), .x(h_x),
    .out_valid(h_ov), .pi(h_pi), .f(h_f));

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic logic [203:0] rand204();
    logic [255:0] r;
    for (int i = 0; i < 8; i++) r[i*32 +: 32] = $urandom;
    return r[203:0];
  endfunction

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [203:0] y_hist [3];
    logic [16:0]  x_hist [3];
    int unsigned  lat;
    p_iv = 0; p_y = '0; p_x = '0; f_y = '0; f_x = '0; h_y = '0; h_x = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    // combinational encoders: random and corner cases
    for (int n = 0; n < 300; n++) begin
      f_y = {$urandom, $urandom};
      f_x = (n == 0) ? 8'd0 : (n == 1) ? 8'hFF : 8'($urandom);
      h_y = 23'($urandom);
      h_x = (n == 0) ? 7'd0 : 7'($urandom);
      #1;
      chk(f_pi == 8'(amd_pi_ref(256'(f_y), 8, 8, f_x)), "flit pi");
      chk(f_f  == 8'(amd_f_ref(256'(f_y), 8, 8, f_x, 'h11B)), "flit f");
      chk(h_pi == 7'(amd_pi_ref(256'(h_y), 7, 4, h_x)), "hdr pi");
      chk(h_f  == 7'(amd_f_ref(256'(h_y), 7, 4, h_x, 'h83)), "hdr f");
    end
    // x = 1 in the flit code: f = xor of all symbols xor 1
    f_y = 64'h0102_0408_1020_4080; f_x = 8'd1; #1;
    chk(f_f == (8'h01 ^ 8'h02 ^ 8'h04 ^ 8'h08 ^ 8'h10 ^ 8'h20 ^ 8'h40 ^ 8'h80 ^ 8'h01), "flit f, x=1");

    // packet encoder: single issue, measure latency
    @(negedge clk);
    p_y = rand204(); p_x = 17'($urandom); p_iv = 1;
    y_hist[0] = p_y; x_hist[0] = p_x;
    @(negedge clk);
    p_iv = 0; p_y = '0; p_x = '0;
    lat = 1;
    while (!p_ov && lat < 10) begin
      @(negedge clk);
      lat++;
    end
    chk(lat == 2, $sformatf("packet encoder latency %0d", lat));
    chk(p_pi == 17'(amd_pi_ref(256'(y_hist[0]), 17, 12, x_hist[0])), "pkt pi single");
    chk(p_f  == 17'(amd_f_ref(256'(y_hist[0]), 17, 12, x_hist[0], 'h20009)), "pkt f single");

    // back-to-back stream: one codeword per cycle
    for (int n = 0; n < 60; n++) begin
      @(negedge clk);
      if (p_ov) begin
        chk(p_pi == 17'(amd_pi_ref(256'(y_hist[(n+1)%3]), 17, 12, x_hist[(n+1)%3])), "pkt pi stream");
        chk(p_f  == 17'(amd_f_ref(256'(y_hist[(n+1)%3]), 17, 12, x_hist[(n+1)%3], 'h20009)), "pkt f stream");
      end
      p_iv = 1; p_y = rand204(); p_x = 17'($urandom);
      y_hist[n%3] = p_y; x_hist[n%3] = p_x;
    end
    @(negedge clk);
    p_iv = 0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
