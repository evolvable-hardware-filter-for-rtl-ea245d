// fitness_unit: fitness calculation by mean difference per pixel (MDPP).
//
// During one pass the reference pixel of every window arrives with the window
// (ref_valid); it is delayed LAT clocks to meet the VRC output for the same
// window (pix_valid). The unit sums |pix - ref| over the N_PIX filtered
// pixels. That sum is MDPP * N_PIX, so it orders filters exactly as MDPP does
// without a divider. Because the genetic algorithm keeps the fittest and
// selects in proportion to fitness, the unit reports fitness = 255*N_PIX - sad,
// which grows as MDPP falls. done rises (and stays high until clear) one clock
// after the N_PIX-th filtered pixel. MDPP as the score follows the published
// algorithm; the delay line, the sum form and the fitness mapping are this
// design's choices.
module fitness_unit
  import ehw_pkg::*;
#(
  parameter int unsigned N_PIX = 62 * 62,
  parameter int unsigned LAT   = VRC_LAT
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic ref_valid,
  input  pix_t ref_pix,
  input  logic pix_valid,
  input  pix_t pix,
  output logic done,
  output fit_t sad,
  output fit_t fitness
);
  localparam fit_t MAX_SAD = fit_t'(255) * fit_t'(N_PIX);

  pix_t ref_d [LAT];
  logic [$clog2(N_PIX+1)-1:0] cnt;
  pix_t diff;
  pix_t ref_now;

  always_ff @(posedge clk) begin
    ref_d[0] <= ref_pix;
    for (int i = 1; i < LAT; i++) ref_d[i] <= ref_d[i-1];
  end
  assign ref_now = ref_d[LAT-1];
  assign diff    = (pix > ref_now) ? pix - ref_now : ref_now - pix;

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      sad  <= '0;
      cnt  <= '0;
      done <= 1'b0;
    end else if (pix_valid && !done) begin
      sad <= sad + fit_t'(diff);
      cnt <= cnt + 1'b1;
      if (cnt == $bits(cnt)'(N_PIX - 1)) done <= 1'b1;
    end
  end

  assign fitness = MAX_SAD - sad;

  // ref_valid is only a timing reference: the VRC must deliver exactly LAT
  // clocks later.
  logic [LAT-1:0] rv_d;
  always_ff @(posedge clk) begin
    if (!rst_n) rv_d <= '0;
    else        rv_d <= {rv_d[LAT-2:0], ref_valid};
  end
  a_aligned: assert property (@(posedge clk) disable iff (!rst_n) pix_valid == rv_d[LAT-1]);
endmodule
