// tb_ehw_full: end-to-end run of the EHW filter chip with every parameter at
// its default (64 x 64 image, population 16, 64 generations).
//
// A striped reference image (a stand-in for the regular marks of a machined
// surface) is corrupted with salt-and-pepper noise; both are loaded, the chip
// evolves a filter for GENS generations and writes the filtered image. The
// testbench then checks:
//   - every output pixel equals the VRC network model applied to the noisy
//     window with the reported best chromosome;
//   - best_fitness equals 255*N minus the sum of |output - reference|, i.e.
//     the fitness unit scored that chromosome correctly;
//   - the number of clocks from start to done matches the schedule
//     (POP evaluations of W*H + 13 clocks per generation, breeding, final pass);
//   - the evolved filter lowers the mean difference per pixel below that of
//     the noisy image;
//   - each mechanism happened at least once: random initial population, window
//     stream, fitness evaluation, roulette spin, crossover, crossover skipped
//     (copy), mutation, elitist copy, population swap, a new best, final pass.
module tb_ehw_full;
  import ehw_pkg::*;
  import ehw_tb_pkg::*;
  localparam int W = 64, H = 64, POP = 16, GENS = 64;  // the top's defaults
  localparam int AW = $clog2(W*H), OAW = $clog2((W-2)*(H-2)), NO = (W-2)*(H-2);
  localparam longint MAX_CYC = 8_000_000;

  logic clk = 0, rst_n = 0;
  logic img_we = 0, img_sel = 0, start = 0;
  logic [AW-1:0] img_addr;
  pix_t img_data, out_data;
  logic busy, done;
  logic [OAW-1:0] out_addr = '0;
  fit_t best_fitness;
  chrom_t best_chrom;
  logic [15:0] generation;
  int checks = 0, failures = 0;
  int noisy [H][W], refi [H][W];
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  ehw_top dut (
    .clk(clk), .rst_n(rst_n), .img_we(img_we), .img_sel(img_sel), .img_addr(img_addr),
    .img_data(img_data), .start(start), .busy(busy), .done(done), .out_addr(out_addr),
    .out_data(out_data), .best_fitness(best_fitness), .best_chrom(best_chrom),
    .generation(generation));

  // Mechanism counters
  int n_init = 0, n_win = 0, n_eval = 0, n_spin = 0, n_xover = 0, n_copy = 0;
  int n_mut = 0, n_elite = 0, n_swap = 0, n_newbest = 0, n_apply = 0;
  logic bank_q = 0, apply_q = 0;
  fit_t best_q = '0;
  always @(negedge clk) if (rst_n) begin
    if (dut.u_ga.mem_we && dut.generation == 0 && !dut.u_ga.op_done) n_init++;
    if (dut.win_valid) n_win++;
    if (dut.u_ga.u_sel.sel_done) n_spin++;
    if (dut.u_ga.u_ops.done &&  dut.u_ga.u_ops.did_xover) n_xover++;
    if (dut.u_ga.u_ops.done && !dut.u_ga.u_ops.did_xover) n_copy++;
    if (dut.u_ga.u_ops.done) n_mut += int'(dut.u_ga.u_ops.n_mut);
    if (dut.u_ga.mem_we && dut.u_ga.mem_waddr[$clog2(POP)-1:0] == 0 && dut.generation != 0) n_elite++;
    if (dut.u_ga.bank != bank_q) n_swap++;
    if (dut.eval_start && !dut.apply) n_eval++;
    if (best_fitness != best_q) n_newbest++;
    if (dut.apply && !apply_q) n_apply++;
    bank_q = dut.u_ga.bank; apply_q = dut.apply; best_q = best_fitness;
  end

  task automatic make_images();
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        refi[y][x] = 90 + 60 * ((x / 2) % 2) + (40 * y) / H;
        case ($urandom_range(0, 9))
          0: noisy[y][x] = 255;
          1: noisy[y][x] = 0;
          default: noisy[y][x] = refi[y][x];
        endcase
      end
  endtask

  initial begin
    longint t0, t_done, sad, raw_sad, exp_cyc;
    int w [9], e;
    make_images();
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 2; s++)
      for (int a = 0; a < W*H; a++) begin
        @(negedge clk);
        img_we = 1; img_sel = s[0]; img_addr = AW'(a);
        img_data = pix_t'((s == 0) ? noisy[a/W][a%W] : refi[a/W][a%W]);
      end
    @(negedge clk); img_we = 0;
    start = 1; t0 = cyc;
    @(negedge clk); start = 0;
    while (!done && cyc < MAX_CYC) @(negedge clk);
    t_done = cyc;
    // Read the filtered image and compare with the model.
    sad = 0;
    for (int y = 1; y < H - 1; y++)
      for (int x = 1; x < W - 1; x++) begin
        out_addr = OAW'((y - 1) * (W - 2) + (x - 1));
        @(negedge clk);
        for (int k = 0; k < 9; k++) w[k] = noisy[y - 1 + k/3][x - 1 + k%3];
        e = vrc_model(best_chrom, w);
        checks++;
        if (int'(out_data) != e) begin
          failures++;
          if (failures < 10) $display("FAIL pixel (%0d,%0d) %0d exp %0d", x, y, out_data, e);
        end
        sad += (int'(out_data) > refi[y][x]) ? int'(out_data) - refi[y][x] : refi[y][x] - int'(out_data);
      end
    // Schedule: POP*9 clocks of initialisation, POP passes of W*H + 13 clocks
    // per generation and one final pass are the lower bound; breeding adds at
    // most (POP/2) * (CHROM_W + 40) clocks per generation.
    exp_cyc = longint'(POP) * 9 + longint'(GENS) * POP * (W*H + 13) + W*H + 13;
    checks += 4;
    if (!done) begin failures++; $display("FAIL no done"); end
    if (longint'(best_fitness) != 255 * NO - sad) begin
      failures++; $display("FAIL best_fitness %0d, recomputed %0d", best_fitness, 255*NO - sad);
    end
    if (int'(generation) != GENS) begin failures++; $display("FAIL generation %0d", generation); end
    if (t_done - t0 < exp_cyc || t_done - t0 > exp_cyc + longint'(GENS) * (POP / 2) * (CHROM_W + 40)) begin
      failures++; $display("FAIL run time %0d clocks, evaluations need %0d", t_done - t0, exp_cyc);
    end
    $display("run %0d clocks; MDPP of best filter %0d/%0d; evals %0d spins %0d xover %0d copy %0d mut %0d elite %0d swap %0d newbest %0d apply %0d init %0d windows %0d",
             t_done - t0, sad, NO, n_eval, n_spin, n_xover, n_copy, n_mut, n_elite, n_swap, n_newbest, n_apply, n_init, n_win);
    // The evolved filter must bring the image closer to the reference than
    // the noisy input is.
    raw_sad = 0;
    for (int y = 1; y < H - 1; y++)
      for (int x = 1; x < W - 1; x++)
        raw_sad += (noisy[y][x] > refi[y][x]) ? noisy[y][x] - refi[y][x] : refi[y][x] - noisy[y][x];
    $display("noisy image MDPP %0d/%0d, filtered MDPP %0d/%0d", raw_sad, NO, sad, NO);
    checks++;
    if (!(sad < raw_sad)) begin failures++; $display("FAIL filter does not improve the image"); end
    checks += 12;
    if (n_init != POP) failures++;
    if (n_win != (GENS * POP + 1) * NO) begin failures++; $display("FAIL windows %0d", n_win); end
    if (n_eval != GENS * POP) failures++;
    if (n_spin == 0) failures++;
    if (n_xover == 0) failures++;
    if (n_copy == 0) failures++;
    if (n_mut == 0) failures++;
    if (n_elite != GENS - 1) failures++;
    if (n_swap != GENS - 1) failures++;
    if (n_newbest == 0) failures++;
    if (n_apply != 1) failures++;
    if (n_spin != 2 * (GENS - 1) * (POP / 2)) begin failures++; $display("FAIL spins %0d", n_spin); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (MAX_CYC + 100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
