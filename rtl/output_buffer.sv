// output_buffer: frame store for the filtered image.
//
// During the final pass with the best chromosome the VRC delivers filtered
// interior pixels in raster order; each we pulse stores wdata at the next
// address, starting from 0 after clear, so the buffer holds the
// (IMG_W-2) x (IMG_H-2) filtered image row by row. count tells how many pixels
// have been stored. The host reads with rd_addr; rd_data follows one clock
// later. The published design only names an output buffer; the sequential
// write addressing and the interior-only image size are this design's choices.
module output_buffer
  import ehw_pkg::*;
#(
  parameter int unsigned IMG_W = 64,
  parameter int unsigned IMG_H = 64,
  localparam int unsigned NOUT = (IMG_W - 2) * (IMG_H - 2),
  localparam int unsigned AW   = $clog2(NOUT)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          we,
  input  pix_t          wdata,
  input  logic [AW-1:0] rd_addr,
  output pix_t          rd_data,
  output logic [AW:0]   count
);
  pix_t mem [NOUT];

  always_ff @(posedge clk) begin
    if (!rst_n || clear) count <= '0;
    else if (we)         count <= count + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (we) mem[count[AW-1:0]] <= wdata;
    rd_data <= mem[rd_addr];
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) we |-> count < (AW+1)'(NOUT));
endmodule
