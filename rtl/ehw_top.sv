// ehw_top: evolvable-hardware 3x3 image filter chip.
//
// The host loads a noisy image and a reference image (img_we, img_sel,
// img_addr, img_data) and pulses start. The GA processor then evolves the
// 250-bit configuration of the virtual reconfigurable circuit (VRC): every
// candidate configuration is loaded into the VRC, the input buffer streams all
// overlapping 3x3 windows of the noisy image through it, and the fitness unit
// scores the filtered pixels against the reference image (mean difference per
// pixel). After GENERATIONS generations the best configuration filters the
// image once more and the result is written to the output buffer, which the
// host reads through out_addr / out_data (one clock latency) once done is
// high. The filtered image holds the (IMG_W-2) x (IMG_H-2) interior pixels in
// raster order. best_fitness = 255*(IMG_W-2)*(IMG_H-2) - sum|filtered - ref|.
//
// One evaluation takes IMG_W*IMG_H + VRC latency + a few clocks, so a
// generation takes about POP*(IMG_W*IMG_H + 13) + 8*(CHROM_W + 12) clocks. The
// block structure (input buffer, VRC, fitness calculation, selection,
// chromosome memory, PRNG, output buffer) follows the published EHW chip; image
// size and generation count are this design's defaults.
module ehw_top
  import ehw_pkg::*;
#(
  parameter int unsigned IMG_W       = 64,
  parameter int unsigned IMG_H       = 64,
  parameter int unsigned POP         = 16,
  parameter int unsigned GENERATIONS = 64,
  parameter logic [31:0] SEED        = 32'h2545_F491,
  localparam int unsigned AW  = $clog2(IMG_W * IMG_H),
  localparam int unsigned OAW = $clog2((IMG_W - 2) * (IMG_H - 2))
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           img_we,
  input  logic           img_sel,
  input  logic [AW-1:0]  img_addr,
  input  pix_t           img_data,
  input  logic           start,
  output logic           busy,
  output logic           done,
  input  logic [OAW-1:0] out_addr,
  output pix_t           out_data,
  output fit_t           best_fitness,
  output chrom_t         best_chrom,
  output logic [15:0]    generation
);
  logic   cfg_we, eval_start, eval_done, apply, ib_busy;
  chrom_t cfg;
  fit_t   fitness, sad;
  logic   win_valid, vrc_valid;
  pix_t   win [N_WIN];
  pix_t   ref_pix, vrc_pix;
  logic [OAW:0] out_count;

  input_buffer #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_in (
    .clk(clk), .rst_n(rst_n),
    .wr_en(img_we), .wr_sel(img_sel), .wr_addr(img_addr), .wr_data(img_data),
    .start(eval_start), .busy(ib_busy),
    .win_valid(win_valid), .win(win), .ref_pix(ref_pix));

  vrc u_vrc (
    .clk(clk), .rst_n(rst_n), .cfg_we(cfg_we), .cfg_in(cfg),
    .in_valid(win_valid), .win(win), .out_valid(vrc_valid), .out_pix(vrc_pix));

  fitness_unit #(.N_PIX((IMG_W - 2) * (IMG_H - 2))) u_fit (
    .clk(clk), .rst_n(rst_n), .clear(eval_start),
    .ref_valid(win_valid), .ref_pix(ref_pix),
    .pix_valid(vrc_valid), .pix(vrc_pix),
    .done(eval_done), .sad(sad), .fitness(fitness));

  output_buffer #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_out (
    .clk(clk), .rst_n(rst_n), .clear(eval_start && apply),
    .we(apply && vrc_valid), .wdata(vrc_pix),
    .rd_addr(out_addr), .rd_data(out_data), .count(out_count));

  ga_processor #(.POP(POP), .GENERATIONS(GENERATIONS), .SEED(SEED)) u_ga (
    .clk(clk), .rst_n(rst_n), .start(start),
    .cfg_we(cfg_we), .cfg(cfg), .eval_start(eval_start),
    .eval_done(eval_done), .eval_fitness(fitness), .apply(apply),
    .busy(busy), .done(done), .best_fitness(best_fitness),
    .best_chrom(best_chrom), .generation(generation));

  a_out_full: assert property (@(posedge clk) disable iff (!rst_n)
    done |-> out_count == (OAW+1)'((IMG_W - 2) * (IMG_H - 2)));
endmodule
