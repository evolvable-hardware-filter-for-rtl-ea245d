// ehw_pkg: types and constants shared by the evolvable-hardware image filter.
//
// The filter is a virtual reconfigurable circuit (VRC) of 25 processing
// elements (PEs): six pipelined columns of four PEs and one output PE. Each PE
// is configured by a 10-bit gene: a 3-bit selector for operand X (slice 1), a
// 3-bit selector for operand Y (slice 2) and a 4-bit function code (slice 3).
// The chromosome is the 25 genes concatenated, PE 1 in the least significant
// bits. Pixel width, PE count, column/row layout, level-back 2, the ten
// configuration bits per PE and the sixteen operators follow the published
// architecture; the bit order of the genes inside the chromosome is this
// design's own choice.
package ehw_pkg;

  localparam int unsigned PIX_W     = 8;    // gray-scale pixel
  localparam int unsigned N_WIN     = 9;    // 3x3 window inputs I0..I8
  localparam int unsigned NCOL      = 6;    // PE columns before the output PE
  localparam int unsigned NROW      = 4;    // PEs per column (one pipeline stage)
  localparam int unsigned N_PE      = NCOL * NROW + 1;  // 25
  localparam int unsigned LEVEL_BACK = 2;   // inputs may come from the previous 2 columns
  localparam int unsigned N_CAND    = LEVEL_BACK * NROW; // 8 candidates per mux
  localparam int unsigned SEL_W     = 3;    // slice 1 and slice 2 width
  localparam int unsigned OP_W      = 4;    // slice 3 width (16 functions)
  localparam int unsigned GENE_W    = 2 * SEL_W + OP_W; // 10 bits per PE
  localparam int unsigned CHROM_W   = N_PE * GENE_W;    // 250
  localparam int unsigned VRC_LAT   = NCOL + 1;         // registered PE columns
  localparam int unsigned FIT_W     = 32;

  typedef logic [PIX_W-1:0] pix_t;

  // Function codes of the sixteen image operators.
  typedef enum logic [OP_W-1:0] {
    OP_SHR1    = 4'h0,  // X >> 1
    OP_X       = 4'h1,  // X
    OP_NOTX    = 4'h2,  // ~X
    OP_AND     = 4'h3,  // X & Y
    OP_OR      = 4'h4,  // X | Y
    OP_XOR     = 4'h5,  // X ^ Y
    OP_ADD_SH2 = 4'h6,  // (X + Y) >> 2
    OP_AVG     = 4'h7,  // (X + Y) >> 1
    OP_AND_0F  = 4'h8,  // X & 0x0F
    OP_AND_F0  = 4'h9,  // X & 0xF0
    OP_OR_0F   = 4'hA,  // X | 0x0F
    OP_OR_F0   = 4'hB,  // X | 0xF0
    OP_MIN     = 4'hC,  // min(X, Y)
    OP_MAX     = 4'hD,  // max(X, Y)
    OP_SHLY    = 4'hE,  // Y << 1
    OP_ADD     = 4'hF   // X + Y (modulo 256)
  } fu_op_e;

  // One PE's gene; sel_x is slice 1, sel_y slice 2, func slice 3.
  typedef struct packed {
    logic [SEL_W-1:0] sel_x;
    logic [SEL_W-1:0] sel_y;
    fu_op_e           func;
  } pe_cfg_t;

  typedef logic [CHROM_W-1:0] chrom_t;
  typedef logic [FIT_W-1:0]   fit_t;

  // Gene of PE number k (0-based: PE 1 is k = 0, the output PE is k = 24).
  function automatic pe_cfg_t gene(input chrom_t c, input int unsigned k);
    return pe_cfg_t'(c[k*GENE_W +: GENE_W]);
  endfunction

endpackage
