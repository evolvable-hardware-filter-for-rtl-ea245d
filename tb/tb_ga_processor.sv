// tb_ga_processor: runs the genetic algorithm against a stand-in evaluator
// whose fitness is 1000 * (number of chromosome bits equal to a fixed target
// pattern), returned a random 5..40 clocks after each eval_start (done then
// stays high until the next start, as the fitness unit behaves). Checks:
//   - POP evaluations per generation, GENERATIONS generations, then exactly
//     one final pass with apply high, done afterwards;
//   - each evaluation scores the configuration that was loaded just before;
//   - best_fitness is the maximum seen and best_chrom scores it;
//   - elitism: the first individual of every later generation is the best
//     so far, so the best never drops;
//   - the final pass uses best_chrom;
//   - evolution works: the final best beats the best of generation 0.
module tb_ga_processor;
  import ehw_pkg::*;
  localparam int POP = 16, GENS = 24;
  logic clk = 0, rst_n = 0, start = 0;
  logic cfg_we, eval_start, apply, busy, done;
  chrom_t cfg, best_chrom, loaded;
  logic eval_done = 0;
  fit_t eval_fitness, best_fitness;
  logic [15:0] generation;
  chrom_t target;
  int checks = 0, failures = 0;
  int n_eval = 0, n_apply = 0;
  longint best_seen = -1, best_gen0 = -1;

  always #5 clk = ~clk;

  ga_processor #(.POP(POP), .GENERATIONS(GENS), .SEED(32'hC0FF_EE11)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .cfg_we(cfg_we), .cfg(cfg),
    .eval_start(eval_start), .eval_done(eval_done), .eval_fitness(eval_fitness),
    .apply(apply), .busy(busy), .done(done), .best_fitness(best_fitness),
    .best_chrom(best_chrom), .generation(generation));

  function automatic int score(input chrom_t c);
    return 1000 * (CHROM_W - $countones(c ^ target));
  endfunction

  always @(posedge clk) if (cfg_we) loaded <= cfg;

  // Stand-in evaluator
  initial begin
    forever begin
      @(posedge clk);
      if (eval_start) begin
        int f, d;
        eval_done <= 0;
        @(negedge clk);
        f = score(loaded);
        d = $urandom_range(5, 40);
        repeat (d) @(negedge clk);
        eval_fitness = fit_t'(f);
        eval_done = 1;
        if (apply) begin
          n_apply++;
          checks++;
          if (loaded !== best_chrom) begin failures++; $display("FAIL final pass not with best"); end
        end else begin
          checks++;
          // elitism: individual 0 of every generation after the first
          if (n_eval % POP == 0 && n_eval > 0 && longint'(f) != best_seen) begin
            failures++; $display("FAIL elite %0d vs best %0d", f, best_seen);
          end
          if (longint'(f) > best_seen) best_seen = f;
          if (n_eval < POP && longint'(f) > best_gen0) best_gen0 = f;
          n_eval++;
        end
      end
    end
  end

  initial begin
    for (int i = 0; i < CHROM_W; i++) target[i] = $urandom_range(0, 1);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    wait (done);
    @(negedge clk);
    checks += 7;
    if (n_eval != POP * GENS) begin failures++; $display("FAIL evals %0d", n_eval); end
    if (n_apply != 1) begin failures++; $display("FAIL apply passes %0d", n_apply); end
    if (int'(generation) != GENS) begin failures++; $display("FAIL generation %0d", generation); end
    if (longint'(best_fitness) != best_seen) begin failures++; $display("FAIL best %0d seen %0d", best_fitness, best_seen); end
    if (score(best_chrom) != int'(best_fitness)) begin failures++; $display("FAIL best_chrom score"); end
    if (!(best_seen > best_gen0)) begin failures++; $display("FAIL no progress"); end
    if (busy) failures++;
    $display("gen0 best %0d, final best %0d (max %0d)", best_gen0, best_seen, 1000*CHROM_W);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
