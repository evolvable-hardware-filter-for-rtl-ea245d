// tb_prng: compares 20000 outputs of the generator with an independent
// xorshift32 model from the same seed, checks the reset value and that the
// value never repeats within the run (no short cycle, never zero).
module tb_prng;
  logic clk = 0, rst_n = 0;
  logic [31:0] rnd;
  int checks = 0, failures = 0;
  logic [31:0] m;
  logic [31:0] first;

  always #5 clk = ~clk;

  prng #(.SEED(32'h1234_5678)) dut (.clk(clk), .rst_n(rst_n), .rnd(rnd));

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (rnd != 32'h1234_5678) failures++;
    m = 32'h1234_5678;
    first = rnd;
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      @(posedge clk); #1;
      m = m ^ (m << 13); m = m ^ (m >> 17); m = m ^ (m << 5);
      checks++;
      if (rnd != m || rnd == 0 || rnd == first) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d rnd=%h exp=%h", i, rnd, m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
