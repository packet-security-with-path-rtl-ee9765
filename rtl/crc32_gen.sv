// crc32_gen: parallel CRC-32 over a DW-bit word, one word per cycle.
//
// Non-critical packets carry CRC-32 over their 204-bit payload, the
// (236,204,32) code of the P-Sec proposal.  The bit-serial division (MSB of data
// first, shift register preset to INIT, no reflection, no final inversion)
// is unrolled into one combinational xor network.  The generator polynomial
// 0x04C11DB7 and the preset are this design's choice: the P-Sec proposal only names
// the code CRC-32.  The same block computes the check at the sender and
// recomputes it at the receiver.
//
// Ports: data in, crc out, purely combinational.
module crc32_gen #(
  parameter int unsigned DW   = 204,
  parameter logic [31:0] POLY = 32'h04C1_1DB7,
  parameter logic [31:0] INIT = 32'hFFFF_FFFF
) (
  input  logic [DW-1:0] data,
  output logic [31:0]   crc
);

  always_comb begin
    logic [31:0] c;
    logic        fb;
    c = INIT;
    for (int i = DW - 1; i >= 0; i--) begin
      fb = c[31] ^ data[i];
      c  = {c[30:0], 1'b0};
      if (fb) c = c ^ POLY;
    end
    crc = c;
  end

endmodule
