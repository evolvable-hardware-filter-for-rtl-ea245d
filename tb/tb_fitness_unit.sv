// tb_fitness_unit: drives reference pixels at window time and filtered pixels
// LAT clocks later, with random gaps, for several passes; checks the sum of
// absolute differences, the fitness 255*N - sum, and that done rises exactly
// one clock after the N-th filtered pixel and stays high until clear.
module tb_fitness_unit;
  import ehw_pkg::*;
  localparam int N = 50, LAT = 7, T = 3*N + LAT + 4;
  logic clk = 0, rst_n = 0, clear = 0;
  logic ref_valid = 0, pix_valid = 0;
  pix_t ref_pix, pix;
  logic done;
  fit_t sad, fitness;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fitness_unit #(.N_PIX(N), .LAT(LAT)) dut (
    .clk(clk), .rst_n(rst_n), .clear(clear), .ref_valid(ref_valid), .ref_pix(ref_pix),
    .pix_valid(pix_valid), .pix(pix), .done(done), .sad(sad), .fitness(fitness));

  initial begin
    logic rv [T];
    int rr [T], pp [T];
    int exp_sad, n, t_last;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 6; pass++) begin
      n = 0; exp_sad = 0; t_last = 0;
      for (int t = 0; t < T; t++) begin
        rv[t] = (n < N) && ($urandom_range(0, 2) != 0);
        rr[t] = $urandom_range(0, 255);
        pp[t] = (pass == 5) ? rr[t] : $urandom_range(0, 255);
        if (rv[t]) begin
          n++;
          exp_sad += (pp[t] > rr[t]) ? pp[t] - rr[t] : rr[t] - pp[t];
          t_last = t;
        end
      end
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0;
      for (int t = 0; t < T + LAT; t++) begin
        ref_valid = (t < T) ? rv[t] : 1'b0;
        ref_pix   = (t < T) ? pix_t'(rr[t]) : '0;
        pix_valid = (t >= LAT) ? rv[t-LAT] : 1'b0;
        pix       = (t >= LAT) ? pix_t'(pp[t-LAT]) : '0;
        @(negedge clk);
        checks++;
        if (done != (t >= t_last + LAT)) begin
          failures++;
          if (failures < 10) $display("FAIL done=%0d at t=%0d last=%0d", done, t, t_last);
        end
      end
      checks += 2;
      if (int'(sad) != exp_sad) begin failures++; $display("FAIL sad %0d exp %0d", sad, exp_sad); end
      if (int'(fitness) != 255*N - exp_sad) begin failures++; $display("FAIL fitness"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
