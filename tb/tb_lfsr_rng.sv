// tb_lfsr_rng: checks the random source's reset value, each step against a
// Fibonacci-form model of the same polynomial (the next output bit of a
// Galois LFSR equals the bit shifted out), hold while en is low, that the
// state never becomes zero and that it does not repeat within 20000 steps.
module tb_lfsr_rng;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en;
  logic [31:0] rnd;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  lfsr_rng dut (.clk(clk), .rst_n(rst_n), .seed(32'h0000_ACE1), .en(en), .rnd(rnd));

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] first, prev, model;
    bit          repeated;
    en = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(rnd == 32'h0000_ACE1, "reset seed");
    repeat (3) @(negedge clk);
    chk(rnd == 32'h0000_ACE1, "holds while en=0");
    en = 1;
    first = rnd;
    repeated = 0;
    for (int n = 0; n < 20000; n++) begin
      prev = rnd;
      @(negedge clk);
      // model: shift right, the feedback bit prev[0] enters at bit 31 and
      // toggles the tap positions 21, 1 and 0
      model = {prev[0], prev[31:1]};
      if (prev[0]) begin
        model[21] = ~model[21];
        model[1]  = ~model[1];
        model[0]  = ~model[0];
      end
      if (n < 2000) chk(rnd == model, "step");
      if (rnd == first) repeated = 1;
      if (rnd == 0) repeated = 1;
    end
    chk(!repeated, "no zero state and no short period");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
