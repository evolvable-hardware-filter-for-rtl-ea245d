// tb_ga_operators: feeds its own random words to the crossover/mutation unit
// and rebuilds the expected children from the same words: the word one clock
// after start decides crossover and its cut point, the next CW words flip
// bits 0..CW-1. Runs 60 pairs, with some words forced below the mutation
// threshold, and checks both children, did_xover, the mutation count and the
// CW + 2 clock duration. Requires both outcomes of the crossover decision.
module tb_ga_operators;
  localparam int CW = 250;
  logic clk = 0, rst_n = 0, start = 0;
  logic [31:0] rnd;
  logic [CW-1:0] pa, pb, ca, cb;
  logic busy, done, did_xover;
  logic [$clog2(2*CW+1)-1:0] n_mut;
  int checks = 0, failures = 0;
  int n_x = 0, n_nox = 0;

  always #5 clk = ~clk;

  ga_operators #(.CW(CW)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .rnd(rnd), .parent_a(pa), .parent_b(pb),
    .busy(busy), .done(done), .child_a(ca), .child_b(cb), .did_xover(did_xover), .n_mut(n_mut));

  function automatic logic [CW-1:0] rc();
    logic [255:0] v;
    for (int i = 0; i < 8; i++) v[32*i +: 32] = $urandom;
    return v[CW-1:0];
  endfunction

  initial begin
    logic [CW-1:0] ea, eb, ta;
    logic [31:0] w;
    int p, nm, lat;
    logic xo;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 60; run++) begin
      @(negedge clk);
      pa = rc(); pb = rc(); ea = pa; eb = pb;
      start = 1; rnd = $urandom;
      @(negedge clk); start = 0;
      // crossover word
      w = $urandom;
      if (run % 7 == 0) w[15:0] = 16'hFFF0;     // force "no crossover"
      rnd = w;
      xo = (w[15:0] < 16'd58982);
      p = 1 + int'((longint'(w[31:16]) * (CW - 1)) >> 16);
      if (xo) begin
        ta = ea;
        for (int b = 0; b < CW; b++) begin
          ea[b] = (b < p) ? ta[b] : eb[b];
          eb[b] = (b < p) ? eb[b] : ta[b];
        end
      end
      nm = 0; lat = 1;
      for (int b = 0; b < CW; b++) begin
        @(negedge clk); lat++;
        w = $urandom;
        if ($urandom_range(0, 49) == 0) w[15:0]  = 16'($urandom_range(0, 654));
        if ($urandom_range(0, 49) == 0) w[31:16] = 16'($urandom_range(0, 654));
        rnd = w;
        if (w[15:0]  < 16'd655) begin ea[b] = ~ea[b]; nm++; end
        if (w[31:16] < 16'd655) begin eb[b] = ~eb[b]; nm++; end
      end
      @(negedge clk); lat++;
      checks += 5;
      if (!done) begin failures++; $display("FAIL done not at CW+2 (run %0d)", run); end
      if (ca !== ea || cb !== eb) begin failures++; if (failures < 10) $display("FAIL children run %0d xo=%0d p=%0d", run, xo, p); end
      if (did_xover != xo) failures++;
      if (int'(n_mut) != nm) begin failures++; $display("FAIL n_mut %0d exp %0d", n_mut, nm); end
      if (lat != CW + 2) failures++;
      if (xo) n_x++; else n_nox++;
    end
    checks++;
    if (n_x == 0 || n_nox == 0) failures++;
    $display("crossovers %0d, copies %0d", n_x, n_nox);
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
