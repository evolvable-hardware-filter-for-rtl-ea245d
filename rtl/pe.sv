// pe: processing element of the virtual reconfigurable circuit.
//
// Two 8-to-1 multiplexers pick operand X (slice 1, sel_x) and operand Y
// (slice 2, sel_y) from the PE's candidate inputs; the function unit applies
// the operator named by slice 3; the result is registered, so each PE column
// is one pipeline stage (latency one clock). The enclosing VRC decides which
// signals are the candidates. Structure (two 8:1 muxes, FU F0-F15, registered
// output, 10 configuration bits) follows the published PE; the output register
// has no reset because the valid flag that travels beside it is reset instead.
module pe
  import ehw_pkg::*;
#(
  parameter int unsigned N_IN = N_CAND
) (
  input  logic    clk,
  input  pe_cfg_t cfg,
  input  pix_t    cand_x [N_IN],
  input  pix_t    cand_y [N_IN],
  output pix_t    q
);
  pix_t x, y, z;

  assign x = cand_x[cfg.sel_x];
  assign y = cand_y[cfg.sel_y];

  fu u_fu (.x(x), .y(y), .op(cfg.func), .z(z));

  always_ff @(posedge clk) q <= z;
endmodule
