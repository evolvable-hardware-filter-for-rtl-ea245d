// prng: pseudo random number generator of the genetic algorithm.
//
// A 32-bit xorshift generator (shifts 13, 17, 5) that produces a new value on
// every clock; consumers sample rnd whenever they need randomness. Its period
// is 2^32 - 1 and it never reaches zero, so the seed must be non-zero. The
// published design names a pseudo random number generator without describing
// it; the xorshift recurrence and the seed are this design's choice.
module prng #(
  parameter logic [31:0] SEED = 32'h2545_F491
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic [31:0] rnd
);
  logic [31:0] s1, s2, s3;

  always_comb begin
    s1 = rnd ^ (rnd << 13);
    s2 = s1 ^ (s1 >> 17);
    s3 = s2 ^ (s2 << 5);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) rnd <= SEED;
    else        rnd <= s3;
  end

  a_nonzero: assert property (@(posedge clk) disable iff (!rst_n) rnd != '0);
endmodule
