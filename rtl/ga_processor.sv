// ga_processor: genetic-algorithm unit that evolves the VRC configuration.
//
// Holds the population in the chromosome memory, draws randomness from the
// PRNG, scores individuals through an external evaluator (the image pass
// through the VRC and the fitness unit), and breeds with the selection unit
// and the crossover/mutation unit. After start:
//   1. POP random chromosomes are written into bank 0 (8 random words each).
//   2. Each individual is read, loaded into the VRC (cfg_we, cfg) and scored
//      with one image pass (eval_start pulse, wait for eval_done, read
//      eval_fitness). The best chromosome seen so far is kept.
//   3. Unless this was the last generation, the next generation is written
//      into the other bank: slot 0 gets the best chromosome (elitism), and
//      the remaining slots are filled in pairs by two roulette-wheel spins,
//      crossover and mutation. The banks then swap and step 2 repeats.
//   4. After GENERATIONS evaluated generations the best chromosome is loaded
//      into the VRC and one last pass runs with apply high, which the top
//      uses to fill the output buffer; then done rises until the next start.
// Population 16, crossover 0.9, mutation 0.01, roulette wheel, retaining the
// fittest and N generations follow the published algorithm; GENERATIONS has
// no published value, and elitism by slot 0, the bank swap and the FSM are this
// design's choices. generation counts generations evaluated.
module ga_processor
  import ehw_pkg::*;
#(
  parameter int unsigned POP         = 16,
  parameter int unsigned GENERATIONS = 64,
  parameter logic [31:0] SEED        = 32'h2545_F491,
  localparam int unsigned IW = $clog2(POP)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  output logic        cfg_we,
  output chrom_t      cfg,
  output logic        eval_start,
  input  logic        eval_done,
  input  fit_t        eval_fitness,
  output logic        apply,
  output logic        busy,
  output logic        done,
  output fit_t        best_fitness,
  output chrom_t      best_chrom,
  output logic [15:0] generation
);
  localparam int unsigned N_WORDS = (CHROM_W + 31) / 32;

  typedef enum logic [4:0] {
    S_IDLE, S_INIT, S_INIT_WR, S_EV_RD, S_EV_CFG, S_EV_GO, S_EV_WAIT,
    S_GEN_END, S_ELITE, S_SELA, S_SELA_W, S_SELA_L, S_SELB, S_SELB_W, S_SELB_L,
    S_OP, S_OP_W, S_WR_B, S_AP_CFG, S_AP_GO, S_AP_WAIT, S_DONE
  } state_e;
  state_e state;

  logic [31:0]   rnd;
  logic          bank;
  logic [IW:0]   idx;        // individual being initialised / scored / bred
  logic [$clog2(N_WORDS)-1:0] word;
  logic [32*N_WORDS-1:0] init_sr;
  chrom_t        cur_chrom, parent_a, parent_b;
  logic          best_valid;

  // Chromosome memory ports
  logic          mem_we;
  logic [IW:0]   mem_waddr, mem_raddr;
  chrom_t        mem_wdata, mem_rdata;

  // Selection unit
  logic          sel_clear, sel_start, sel_busy, sel_done;
  logic [IW-1:0] sel_idx, gen_best_idx;
  fit_t          gen_best_val;
  logic [FIT_W+IW-1:0] sel_total;

  // Crossover / mutation
  logic          op_start, op_busy, op_done, op_xover;
  chrom_t        child_a, child_b;
  logic [$clog2(2*CHROM_W+1)-1:0] op_nmut;

  prng #(.SEED(SEED)) u_prng (.clk(clk), .rst_n(rst_n), .rnd(rnd));

  chromosome_memory #(.POP(POP)) u_mem (
    .clk(clk), .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata),
    .raddr(mem_raddr), .rdata(mem_rdata));

  selection_unit #(.POP(POP)) u_sel (
    .clk(clk), .rst_n(rst_n), .clear(sel_clear),
    .fit_we(state == S_EV_WAIT && eval_done), .fit_idx(idx[IW-1:0]), .fit_val(eval_fitness),
    .sel_start(sel_start), .rnd(rnd[15:0]), .sel_busy(sel_busy), .sel_done(sel_done),
    .sel_idx(sel_idx), .total(sel_total), .best_idx(gen_best_idx), .best_val(gen_best_val));

  ga_operators u_ops (
    .clk(clk), .rst_n(rst_n), .start(op_start), .rnd(rnd),
    .parent_a(parent_a), .parent_b(parent_b), .busy(op_busy), .done(op_done),
    .child_a(child_a), .child_b(child_b), .did_xover(op_xover), .n_mut(op_nmut));

  // Control outputs decoded from the state
  always_comb begin
    mem_we     = 1'b0;
    mem_waddr  = '0;
    mem_wdata  = child_a;
    mem_raddr  = {bank, idx[IW-1:0]};
    cfg_we     = 1'b0;
    cfg        = mem_rdata;
    eval_start = 1'b0;
    sel_start  = 1'b0;
    op_start   = 1'b0;
    unique case (state)
      S_INIT_WR: begin
        mem_we    = 1'b1;
        mem_waddr = {bank, idx[IW-1:0]};
        mem_wdata = init_sr[CHROM_W-1:0];
      end
      S_EV_CFG:  cfg_we = 1'b1;
      S_EV_GO, S_AP_GO: eval_start = 1'b1;
      S_ELITE: begin
        mem_we    = 1'b1;
        mem_waddr = {~bank, IW'(0)};
        mem_wdata = best_chrom;
      end
      S_SELA, S_SELB: sel_start = 1'b1;
      S_SELA_W, S_SELB_W: mem_raddr = {bank, sel_idx};
      S_OP: op_start = 1'b1;
      S_OP_W: begin
        mem_we    = op_done;
        mem_waddr = {~bank, idx[IW-1:0]};
        mem_wdata = child_a;
      end
      S_WR_B: begin
        mem_we    = (idx < (IW+1)'(POP));
        mem_waddr = {~bank, idx[IW-1:0]};
        mem_wdata = child_b;
      end
      S_AP_CFG: begin
        cfg_we = 1'b1;
        cfg    = best_chrom;
      end
      default: ;
    endcase
  end

  assign sel_clear = (state == S_GEN_END);
  assign apply     = (state == S_AP_GO) || (state == S_AP_WAIT);
  assign busy      = (state != S_IDLE) && (state != S_DONE);
  assign done      = (state == S_DONE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      bank         <= 1'b0;
      idx          <= '0;
      word         <= '0;
      generation   <= '0;
      best_valid   <= 1'b0;
      best_fitness <= '0;
      best_chrom   <= '0;
    end else begin
      unique case (state)
        S_IDLE, S_DONE: if (start) begin
          bank       <= 1'b0;
          idx        <= '0;
          word       <= '0;
          generation <= '0;
          best_valid <= 1'b0;
          best_fitness <= '0;
          state      <= S_INIT;
        end
        S_INIT: begin
          init_sr <= {init_sr[32*N_WORDS-33:0], rnd};
          word    <= word + 1'b1;
          if (word == ($clog2(N_WORDS))'(N_WORDS - 1)) state <= S_INIT_WR;
        end
        S_INIT_WR: begin
          word <= '0;
          if (idx == (IW+1)'(POP - 1)) begin
            idx   <= '0;
            state <= S_EV_RD;
          end else begin
            idx   <= idx + 1'b1;
            state <= S_INIT;
          end
        end
        S_EV_RD:  state <= S_EV_CFG;
        S_EV_CFG: begin
          cur_chrom <= mem_rdata;
          state     <= S_EV_GO;
        end
        S_EV_GO:  state <= S_EV_WAIT;
        S_EV_WAIT: if (eval_done) begin
          if (!best_valid || eval_fitness > best_fitness) begin
            best_valid   <= 1'b1;
            best_fitness <= eval_fitness;
            best_chrom   <= cur_chrom;
          end
          if (idx == (IW+1)'(POP - 1)) begin
            state <= S_GEN_END;
          end else begin
            idx   <= idx + 1'b1;
            state <= S_EV_RD;
          end
        end
        S_GEN_END: begin
          generation <= generation + 1'b1;
          if (generation == 16'(GENERATIONS - 1)) state <= S_AP_CFG;
          else                                     state <= S_ELITE;
        end
        S_ELITE: begin
          idx   <= (IW+1)'(1);
          state <= S_SELA;
        end
        S_SELA:   state <= S_SELA_W;
        S_SELA_W: if (sel_done) state <= S_SELA_L;
        S_SELA_L: begin
          parent_a <= mem_rdata;
          state    <= S_SELB;
        end
        S_SELB:   state <= S_SELB_W;
        S_SELB_W: if (sel_done) state <= S_SELB_L;
        S_SELB_L: begin
          parent_b <= mem_rdata;
          state    <= S_OP;
        end
        S_OP:   state <= S_OP_W;
        S_OP_W: if (op_done) begin
          idx   <= idx + 1'b1;
          state <= S_WR_B;
        end
        S_WR_B: begin
          if (idx + 1'b1 >= (IW+1)'(POP)) begin
            bank  <= ~bank;
            idx   <= '0;
            state <= S_EV_RD;
          end else begin
            idx   <= idx + 1'b1;
            state <= S_SELA;
          end
        end
        S_AP_CFG:  state <= S_AP_GO;
        S_AP_GO:   state <= S_AP_WAIT;
        S_AP_WAIT: if (eval_done) state <= S_DONE;
        default:   state <= S_IDLE;
      endcase
    end
  end

  a_elite_is_best: assert property (@(posedge clk) disable iff (!rst_n)
    state == S_ELITE |-> best_fitness >= gen_best_val);
endmodule
