// tb_crc32_gen: checks the parallel CRC-32 against the long-division
// reference on random 204-bit payloads, and against the published check
// value 0x0376E6E7 of this CRC variant (no reflection, preset all ones, no
// final inversion) for the ASCII string "123456789".
module tb_crc32_gen;
  import psec_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [203:0] d;
  logic [31:0]  c;
  crc32_gen #(.DW(204)) u_crc (.data(d), .crc(c));

  logic [71:0] s;
  logic [31:0] cs;
  crc32_gen #(.DW(72)) u_crc72 (.data(s), .crc(cs));

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [255:0] r;
    s = "123456789";
    d = '0;
    #1;
    chk(cs == 32'h0376_E6E7, $sformatf("check value %08h", cs));
    for (int n = 0; n < 300; n++) begin
      for (int i = 0; i < 8; i++) r[i*32 +: 32] = $urandom;
      d = (n == 0) ? '0 : (n == 1) ? '1 : r[203:0];
      #1;
      chk(c == crc_ref(256'(d), 204), "random payload");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
