// tb_amd_decoder: feeds valid and corrupted AMD codewords to the packet
// (204,17,17, 2-cycle) and header (23,7,7, combinational) decoders.  The
// expected verdict of every word is computed with the reference model, so
// that the rare errors an AMD code cannot see are predicted too.  Also checks
// the 2-cycle decoding latency.
module tb_amd_decoder;
  import psec_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int detected = 0;

  logic         p_iv, p_ov, p_err;
  logic [203:0] p_y;
  logic [16:0]  p_pi, p_f;
  amd_decoder #(.M(17), .B(12), .K(204), .LATENCY(2), .POLY(18'h20009)) u_pkt (
    .clk(clk), .rst_n(rst_n), .in_valid(p_iv), .y(p_y), .pi_in(p_pi), .f_in(p_f),
    .out_valid(p_ov), .err(p_err));

  logic [22:0] h_y;
  logic [6:0]  h_pi, h_f;
  logic        h_ov, h_err;
  amd_decoder #(.M(7), .B(4), .K(23), .LATENCY(0), .POLY(8'h83)) u_hdr (
    .clk(clk), .rst_n(rst_n), .in_valid(1'b1), .y(h_y), .pi_in(h_pi), .f_in(h_f),
    .out_valid(h_ov), .err(h_err));

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [255:0] r;
    int unsigned  x, pi, f, lat, bp;
    bit           exp_err;
    p_iv = 0; p_y = '0; p_pi = '0; p_f = '0; h_y = '0; h_pi = '0; h_f = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // header decoder
    for (int n = 0; n < 400; n++) begin
      h_y = 23'($urandom); x = $urandom % 128;
      pi  = amd_pi_ref(256'(h_y), 7, 4, x);
      f   = amd_f_ref(256'(h_y), 7, 4, x, 'h83);
      h_pi = 7'(pi); h_f = 7'(f);
      if (n % 2 == 1) begin   // corrupt one to three fields
        h_y  = h_y ^ 23'($urandom);
        if (n % 4 == 1) h_pi = h_pi ^ 7'($urandom);
        if (n % 8 == 1) h_f  = h_f ^ 7'($urandom);
      end
      #1;
      exp_err = !amd_valid_ref(256'(h_y), h_pi, h_f, 7, 4, 'h83);
      chk(h_err == exp_err, "header verdict");
      if (n % 2 == 0) chk(!h_err, "valid header accepted");
      if (h_err) detected++;
    end

    // packet decoder, one word at a time, latency 2
    for (int n = 0; n < 100; n++) begin
      @(negedge clk);
      for (int i = 0; i < 8; i++) r[i*32 +: 32] = $urandom;
      r[255:204] = '0;
      x  = $urandom % (1 << 17);
      pi = amd_pi_ref(r, 17, 12, x);
      f  = amd_f_ref(r, 17, 12, x, 'h20009);
      p_y = r[203:0]; p_pi = 17'(pi); p_f = 17'(f);
      case (n % 4)
        1: begin bp = $urandom % 204; p_y[bp] ^= 1'b1; end  // single bit flip
        2: begin p_y = p_y ^ {7{$urandom}}; p_f ^= 17'h1; end // burst
        3: p_pi = p_pi ^ 17'($urandom | 1);                  // attack on pi
        default: ;
      endcase
      exp_err = !amd_valid_ref(256'(p_y), p_pi, p_f, 17, 12, 'h20009);
      p_iv = 1;
      @(negedge clk);
      p_iv = 0; p_y = '0; p_pi = '0; p_f = '0;
      lat = 1;
      while (!p_ov && lat < 8) begin
        @(negedge clk);
        lat++;
      end
      chk(lat == 2, "packet decoder latency");
      chk(p_err == exp_err, $sformatf("packet verdict n=%0d", n));
      if (n % 4 == 0) chk(!p_err, "valid packet accepted");
      if (n % 4 != 0) chk(p_err, "packet error detected");
    end

    $display("header: %0d corrupted words detected", detected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
