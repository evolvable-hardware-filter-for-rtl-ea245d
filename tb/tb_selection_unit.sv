// tb_selection_unit: fills the fitness table of 16 individuals (random, with
// zeros, and one all-zero generation), checks the total and the best
// individual, then spins the wheel with random numbers and compares each
// pick with the roulette model t = (rnd*total) >> 16, first index whose
// running sum exceeds t. Also checks the spin time, index + 2 clocks.
module tb_selection_unit;
  import ehw_pkg::*;
  localparam int POP = 16, IW = 4, TW = FIT_W + IW;
  logic clk = 0, rst_n = 0, clear = 0, fit_we = 0, sel_start = 0;
  logic [IW-1:0] fit_idx, sel_idx, best_idx;
  fit_t fit_val, best_val;
  logic [15:0] rnd;
  logic sel_busy, sel_done;
  logic [TW-1:0] total;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  selection_unit #(.POP(POP)) dut (
    .clk(clk), .rst_n(rst_n), .clear(clear), .fit_we(fit_we), .fit_idx(fit_idx),
    .fit_val(fit_val), .sel_start(sel_start), .rnd(rnd), .sel_busy(sel_busy),
    .sel_done(sel_done), .sel_idx(sel_idx), .total(total), .best_idx(best_idx),
    .best_val(best_val));

  initial begin
    longint f [POP];
    longint tot, tgt, cum;
    int bi, exp_i, lat;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int g = 0; g < 8; g++) begin
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0;
      tot = 0; bi = 0;
      for (int i = 0; i < POP; i++) begin
        f[i] = (g == 7) ? 0 : (($urandom_range(0, 3) == 0) ? 0 : longint'($urandom_range(0, 1_000_000)));
        if (g == 6 && i == 9) f[i] = 64'hFFFF_FF00;  // large value
        tot += f[i];
        if (f[i] > f[bi]) bi = i;
        fit_we = 1; fit_idx = IW'(i); fit_val = fit_t'(f[i]);
        @(negedge clk);
      end
      fit_we = 0;
      @(negedge clk);
      checks += 3;
      if (longint'(total) != tot) begin failures++; $display("FAIL total"); end
      if (int'(best_idx) != bi) begin failures++; $display("FAIL best idx %0d exp %0d", best_idx, bi); end
      if (longint'(best_val) != f[bi]) begin failures++; $display("FAIL best val"); end
      for (int s = 0; s < 100; s++) begin
        rnd = (s == 0) ? 16'hFFFF : (s == 1) ? 16'h0000 : 16'($urandom);
        tgt = (tot * longint'(rnd)) >> 16;
        cum = 0; exp_i = POP - 1;
        for (int i = 0; i < POP; i++) begin
          cum += f[i];
          if (cum > tgt) begin exp_i = i; break; end
        end
        sel_start = 1;
        @(negedge clk); sel_start = 0; rnd = 16'($urandom);
        lat = 1;
        while (!sel_done) begin @(negedge clk); lat++; end
        checks += 2;
        if (int'(sel_idx) != exp_i) begin
          failures++;
          if (failures < 10) $display("FAIL spin g=%0d idx %0d exp %0d", g, sel_idx, exp_i);
        end
        if (lat != exp_i + 2) begin failures++; if (failures < 10) $display("FAIL spin time %0d", lat); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
