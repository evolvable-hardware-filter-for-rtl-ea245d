// input_buffer: image store and 3x3 sliding-window generator.
//
// The host writes two IMG_W x IMG_H gray-scale images through the write port:
// the noisy image (wr_sel = 0) and the reference image (wr_sel = 1) against
// which filters are scored. A one-clock start pulse begins a pass: the noisy
// image is read in raster order, one pixel per clock, through two line
// buffers and a 3x3 register window. Each interior pixel (x, y), 1 <= x <=
// IMG_W-2 and 1 <= y <= IMG_H-2, yields one window I0..I8 (row-major, I4 the
// centre) on win with win_valid high, together with the reference pixel at the
// same position on ref_pix. Consecutive windows overlap by two columns, as in
// the published Stage I / Stage II example. Border pixels produce no window.
// The first window appears 2*IMG_W + 4 clocks after start; a pass lasts
// IMG_W*IMG_H + 3 clocks with busy high. The host must not write while busy.
// Image sizes are this design's choice; the published text leaves them open.
module input_buffer
  import ehw_pkg::*;
#(
  parameter int unsigned IMG_W = 64,
  parameter int unsigned IMG_H = 64,
  localparam int unsigned NPIX = IMG_W * IMG_H,
  localparam int unsigned AW   = $clog2(NPIX),
  localparam int unsigned XW   = $clog2(IMG_W),
  localparam int unsigned YW   = $clog2(IMG_H)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic          wr_sel,
  input  logic [AW-1:0] wr_addr,
  input  pix_t          wr_data,
  input  logic          start,
  output logic          busy,
  output logic          win_valid,
  output pix_t          win [N_WIN],
  output pix_t          ref_pix
);
  pix_t noisy_mem [NPIX];
  pix_t ref_mem   [NPIX];
  pix_t lb0 [IMG_W];   // row y-2
  pix_t lb1 [IMG_W];   // row y-1
  pix_t w [3][3];

  // Stage 0: address generation
  logic          rd_v;
  logic [AW-1:0] rd_a;
  logic [XW-1:0] rd_x;
  logic [YW-1:0] rd_y;
  // Stage 1: memory data
  logic          s1_v;
  logic [XW-1:0] s1_x;
  logic [YW-1:0] s1_y;
  pix_t          s1_pix, s1_ref;
  logic [1:0]    tail;

  always_ff @(posedge clk) begin
    if (wr_en && !wr_sel) noisy_mem[wr_addr] <= wr_data;
    if (wr_en &&  wr_sel) ref_mem[wr_addr]   <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_v <= 1'b0;
      rd_a <= '0;
      rd_x <= '0;
      rd_y <= '0;
    end else if (start && !busy) begin
      rd_v <= 1'b1;
      rd_a <= '0;
      rd_x <= '0;
      rd_y <= '0;
    end else if (rd_v) begin
      if (rd_a == AW'(NPIX - 1)) rd_v <= 1'b0;
      rd_a <= rd_a + 1'b1;
      if (rd_x == XW'(IMG_W - 1)) begin
        rd_x <= '0;
        rd_y <= rd_y + 1'b1;
      end else begin
        rd_x <= rd_x + 1'b1;
      end
    end
  end

  // Synchronous reads: the noisy pixel at (x, y) and the reference pixel at
  // the centre of the window that (x, y) completes, (x-1, y-1).
  always_ff @(posedge clk) begin
    s1_pix <= noisy_mem[rd_a];
    s1_ref <= ref_mem[(rd_a >= AW'(IMG_W + 1)) ? rd_a - AW'(IMG_W + 1) : '0];
    s1_x   <= rd_x;
    s1_y   <= rd_y;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) s1_v <= 1'b0;
    else        s1_v <= rd_v;
  end

  // Stage 2: line buffers and window registers
  always_ff @(posedge clk) begin
    if (s1_v) begin
      lb0[s1_x] <= lb1[s1_x];
      lb1[s1_x] <= s1_pix;
      for (int r = 0; r < 3; r++) begin
        w[r][0] <= w[r][1];
        w[r][1] <= w[r][2];
      end
      w[0][2] <= lb0[s1_x];
      w[1][2] <= lb1[s1_x];
      w[2][2] <= s1_pix;
      ref_pix <= s1_ref;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) win_valid <= 1'b0;
    else        win_valid <= s1_v && (s1_x >= XW'(2)) && (s1_y >= YW'(2));
  end

  always_ff @(posedge clk) begin
    if (!rst_n)                 tail <= '0;
    else                        tail <= {tail[0], s1_v};
  end

  assign busy = rd_v || s1_v || (|tail);

  always_comb
    for (int k = 0; k < N_WIN; k++) win[k] = w[k/3][k%3];

  a_no_write_in_pass: assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> !busy);
endmodule
