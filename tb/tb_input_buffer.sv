// tb_input_buffer: loads random noisy and reference images of 9 x 7 pixels,
// runs two passes and checks, for every interior pixel in raster order, the
// nine window pixels and the reference pixel against the images held in the
// testbench. Also checks the window count, the clocks from start to the first
// window (2*W + 4) and the pass length (busy for W*H + 3 clocks).
module tb_input_buffer;
  import ehw_pkg::*;
  localparam int W = 9, H = 7;
  localparam int AW = $clog2(W*H);
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, wr_sel = 0, start = 0;
  logic [AW-1:0] wr_addr;
  pix_t wr_data;
  logic busy, win_valid;
  pix_t win [N_WIN];
  pix_t ref_pix;
  int checks = 0, failures = 0;
  int img [H][W], rimg [H][W];
  int cx, cy, cyc, t_start, t_first, nwin, busy_cycles;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  input_buffer #(.IMG_W(W), .IMG_H(H)) dut (
    .clk(clk), .rst_n(rst_n), .wr_en(wr_en), .wr_sel(wr_sel), .wr_addr(wr_addr),
    .wr_data(wr_data), .start(start), .busy(busy), .win_valid(win_valid),
    .win(win), .ref_pix(ref_pix));

  always @(negedge clk) if (rst_n && busy) busy_cycles++;

  always @(negedge clk) if (rst_n && win_valid) begin
    if (nwin == 0) t_first = cyc;
    for (int k = 0; k < 9; k++) begin
      checks++;
      if (int'(win[k]) != img[cy - 1 + k/3][cx - 1 + k%3]) begin
        failures++;
        if (failures < 10) $display("FAIL (%0d,%0d) I%0d=%0d exp %0d", cx, cy, k, win[k], img[cy-1+k/3][cx-1+k%3]);
      end
    end
    checks++;
    if (int'(ref_pix) != rimg[cy][cx]) failures++;
    nwin++;
    if (cx == W - 2) begin cx = 1; cy++; end else cx++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 2; s++)
      for (int a = 0; a < W*H; a++) begin
        @(negedge clk);
        wr_en = 1; wr_sel = s[0]; wr_addr = AW'(a);
        wr_data = pix_t'($urandom);
        if (s == 0) img[a/W][a%W] = int'(wr_data); else rimg[a/W][a%W] = int'(wr_data);
      end
    @(negedge clk); wr_en = 0;
    for (int pass = 0; pass < 2; pass++) begin
      cx = 1; cy = 1; nwin = 0; busy_cycles = 0;
      @(negedge clk); start = 1; t_start = cyc + 1;
      @(negedge clk); start = 0;
      wait (!busy);
      @(negedge clk);
      checks += 3;
      if (nwin != (W-2)*(H-2)) begin failures++; $display("FAIL windows %0d", nwin); end
      if (t_first - t_start != 2*W + 4) begin failures++; $display("FAIL first window after %0d", t_first - t_start); end
      if (busy_cycles != W*H + 3) begin failures++; $display("FAIL busy %0d", busy_cycles); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
