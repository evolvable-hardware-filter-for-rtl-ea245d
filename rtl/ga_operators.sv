// ga_operators: crossover and mutation of two parent chromosomes.
//
// A start pulse latches parent_a and parent_b. In the next clock the 32-bit
// random input decides crossover: if rnd[15:0] < XOVER_THR (0.9 of 2^16) the
// parents are cut at point p = 1 + ((rnd[31:16] * (CW-1)) >> 16), 1 <= p < CW;
// child_a takes bits below p from parent_a and the rest from parent_b, child_b
// the opposite. Otherwise the children are copies of the parents. Mutation
// follows bit-serially, one chromosome bit per clock, bit 0 first: bit i of
// child_a flips if rnd[15:0] < MUT_THR and bit i of child_b if
// rnd[31:16] < MUT_THR (0.01 of 2^16), using a fresh random word each clock.
// done pulses CW + 2 clocks after start. The probabilities 0.9 and 0.01 follow
// the published settings; single-point crossover, the threshold encoding and
// the serial mutation are this design's choices.
module ga_operators
  import ehw_pkg::*;
#(
  parameter int unsigned CW        = CHROM_W,
  parameter logic [15:0] XOVER_THR = 16'd58982,  // 0.9  * 65536
  parameter logic [15:0] MUT_THR   = 16'd655     // 0.01 * 65536
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [31:0]   rnd,
  input  logic [CW-1:0] parent_a,
  input  logic [CW-1:0] parent_b,
  output logic          busy,
  output logic          done,
  output logic [CW-1:0] child_a,
  output logic [CW-1:0] child_b,
  output logic          did_xover,
  output logic [$clog2(2*CW+1)-1:0] n_mut
);
  typedef enum logic [1:0] {S_IDLE, S_XOVER, S_MUT} state_e;
  state_e state;
  logic [$clog2(CW)-1:0] bit_i;
  logic [CW-1:0] mask;
  logic [$clog2(CW)-1:0] point;
  logic [15+$clog2(CW):0] pprod;

  assign pprod = rnd[31:16] * ($clog2(CW))'(CW - 1);
  assign point = ($clog2(CW))'(pprod >> 16) + 1'b1;
  assign mask  = (CW'(1) << point) - 1'b1;
  assign busy  = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      done      <= 1'b0;
      bit_i     <= '0;
      did_xover <= 1'b0;
      n_mut     <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          child_a <= parent_a;
          child_b <= parent_b;
          n_mut   <= '0;
          state   <= S_XOVER;
        end
        S_XOVER: begin
          did_xover <= rnd[15:0] < XOVER_THR;
          if (rnd[15:0] < XOVER_THR) begin
            child_a <= (child_a & mask) | (child_b & ~mask);
            child_b <= (child_b & mask) | (child_a & ~mask);
          end
          bit_i <= '0;
          state <= S_MUT;
        end
        S_MUT: begin
          if (rnd[15:0] < MUT_THR)  child_a[bit_i] <= ~child_a[bit_i];
          if (rnd[31:16] < MUT_THR) child_b[bit_i] <= ~child_b[bit_i];
          n_mut <= n_mut + (rnd[15:0] < MUT_THR) + (rnd[31:16] < MUT_THR);
          if (bit_i == ($clog2(CW))'(CW - 1)) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            bit_i <= bit_i + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
