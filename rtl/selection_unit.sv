// selection_unit: fitness table and roulette-wheel parent selection.
//
// While a generation is evaluated, fit_we stores the fitness of individual
// fit_idx; the unit keeps the running total and the best individual of the
// generation (lowest index on ties). A sel_start pulse spins the roulette
// wheel with the 16-bit random number rnd: the target is
// t = (rnd * total) >> 16, which lies in [0, total), and the table is scanned
// one entry per clock, accumulating fitness, until the running sum exceeds t.
// That entry is returned on sel_idx with a one-clock sel_done pulse, so each
// individual is picked with probability close to its share of the total. A
// spin takes at most POP + 1 clocks. If every fitness is zero the last entry
// is returned. clear empties the table for a new generation. Roulette-wheel
// selection and keeping the best follow the published algorithm; the
// fixed-point target and the serial scan are this design's choices.
module selection_unit
  import ehw_pkg::*;
#(
  parameter int unsigned POP = 16,
  localparam int unsigned IW = $clog2(POP),
  localparam int unsigned TW = FIT_W + IW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          fit_we,
  input  logic [IW-1:0] fit_idx,
  input  fit_t          fit_val,
  input  logic          sel_start,
  input  logic [15:0]   rnd,
  output logic          sel_busy,
  output logic          sel_done,
  output logic [IW-1:0] sel_idx,
  output logic [TW-1:0] total,
  output logic [IW-1:0] best_idx,
  output fit_t          best_val
);
  fit_t fit [POP];
  logic [TW-1:0] target, cum, cum_next;
  logic [IW-1:0] scan;
  logic [TW+15:0] prod;

  assign prod     = total * rnd;
  assign cum_next = cum + TW'(fit[scan]);

  always_ff @(posedge clk) begin
    if (fit_we) fit[fit_idx] <= fit_val;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      total    <= '0;
      best_idx <= '0;
      best_val <= '0;
    end else if (fit_we) begin
      total <= total + TW'(fit_val);
      if (fit_val > best_val || fit_idx == '0) begin
        best_idx <= fit_idx;
        best_val <= fit_val;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sel_busy <= 1'b0;
      sel_done <= 1'b0;
      sel_idx  <= '0;
      scan     <= '0;
      cum      <= '0;
      target   <= '0;
    end else begin
      sel_done <= 1'b0;
      if (sel_start && !sel_busy) begin
        sel_busy <= 1'b1;
        target   <= prod[TW+15:16];
        scan     <= '0;
        cum      <= '0;
      end else if (sel_busy) begin
        cum <= cum_next;
        if (cum_next > target || scan == IW'(POP - 1)) begin
          sel_busy <= 1'b0;
          sel_done <= 1'b1;
          sel_idx  <= scan;
        end else begin
          scan <= scan + 1'b1;
        end
      end
    end
  end

  a_no_write_during_spin: assert property (@(posedge clk) disable iff (!rst_n) sel_busy |-> !fit_we);
endmodule
