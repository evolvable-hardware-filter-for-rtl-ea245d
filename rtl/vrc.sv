// vrc: virtual reconfigurable circuit, the evolvable 3x3 image filter.
//
// Nine window pixels I0..I8 enter; one 8-bit pixel leaves, which replaces the
// window centre I4. Inside are 24 processing elements (PEs) in six columns of
// four and a 25th output PE. Every PE output is registered, so each column is
// one pipeline stage and the result appears VRC_LAT = 7 clocks after the
// window, one result per clock. What each PE does and where its operands come
// from is set by the configuration memory, a 250-bit register (10 bits per PE)
// loaded from the genetic algorithm with cfg_we.
//
// Candidate operands of each PE (8 per multiplexer, level-back 2):
//   column 1      X from I0..I7, Y from I1..I8 (so all nine pixels are reachable
//                 through 8-input multiplexers)
//   column 2      the 4 outputs of column 1, then I1, I3, I5, I7
//   column c >= 3 the 4 outputs of column c-1, then the 4 outputs of column c-2
//   output PE     the 4 outputs of column 6, then the 4 outputs of column 5
// Signals taken from two columns back pass through one extra register, so all
// operands of a PE belong to the same window and the filter is a pure function
// of one window. The 6x4+1 layout, level-back 2, 8-input multiplexers,
// registered PE outputs and 10 bits per PE follow the published architecture;
// the candidate lists above and the alignment registers are this design's own.
// The configuration must not change while windows are in flight.
module vrc
  import ehw_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   cfg_we,
  input  chrom_t cfg_in,
  input  logic   in_valid,
  input  pix_t   win [N_WIN],
  output logic   out_valid,
  output pix_t   out_pix
);
  chrom_t cfg_q;                       // configuration memory
  pix_t   col_q [NCOL][NROW];          // registered PE outputs
  pix_t   col_d [NCOL][NROW];          // the same, one clock later
  pix_t   in_d  [NROW];                // I1, I3, I5, I7 one clock later
  logic [VRC_LAT-1:0] vld;

  always_ff @(posedge clk) begin
    if (!rst_n) cfg_q <= '0;
    else if (cfg_we) cfg_q <= cfg_in;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[VRC_LAT-2:0], in_valid};
  end

  always_ff @(posedge clk) begin
    col_d <= col_q;
    for (int r = 0; r < NROW; r++) in_d[r] <= win[2*r+1];
  end

  for (genvar c = 0; c < NCOL; c++) begin : g_col
    for (genvar r = 0; r < NROW; r++) begin : g_row
      pix_t cx [N_CAND];
      pix_t cy [N_CAND];
      always_comb begin
        for (int k = 0; k < N_CAND; k++) begin
          if (c == 0) begin
            cx[k] = win[k];
            cy[k] = win[k+1];
          end else if (k < NROW) begin
            cx[k] = col_q[c-1][k];
            cy[k] = col_q[c-1][k];
          end else if (c == 1) begin
            cx[k] = in_d[k-NROW];
            cy[k] = in_d[k-NROW];
          end else begin
            cx[k] = col_d[(c >= 2) ? c-2 : 0][k-NROW];
            cy[k] = col_d[(c >= 2) ? c-2 : 0][k-NROW];
          end
        end
      end
      pe u_pe (.clk(clk), .cfg(gene(cfg_q, c*NROW + r)),
               .cand_x(cx), .cand_y(cy), .q(col_q[c][r]));
    end
  end

  // Output PE (PE 25)
  pix_t co [N_CAND];
  always_comb begin
    for (int k = 0; k < NROW; k++) begin
      co[k]      = col_q[NCOL-1][k];
      co[k+NROW] = col_d[NCOL-2][k];
    end
  end
  pe u_pe_out (.clk(clk), .cfg(gene(cfg_q, N_PE-1)), .cand_x(co), .cand_y(co), .q(out_pix));

  assign out_valid = vld[VRC_LAT-1];

  // The configuration memory may only be rewritten when the pipeline is empty.
  a_cfg_idle: assert property (@(posedge clk) disable iff (!rst_n) cfg_we |-> (vld == '0 && !in_valid));
endmodule
