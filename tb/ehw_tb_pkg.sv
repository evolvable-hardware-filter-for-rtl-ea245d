// ehw_tb_pkg: reference models shared by the testbenches of the EHW filter.
//
// fu_model computes the sixteen image operators with plain integer
// arithmetic; vrc_model evaluates a whole 250-bit configuration on one 3x3
// window by walking the 25 PEs column by column with the candidate lists of
// the VRC (column 1: X from I0..I7, Y from I1..I8; column 2: column 1, then
// I1, I3, I5, I7; later columns and the output PE: previous column, then the
// column before it). Both are written independently of the RTL.
package ehw_tb_pkg;

  function automatic int fu_model(input int op, input int x, input int y);
    case (op)
      0:  return x / 2;
      1:  return x;
      2:  return 255 - x;
      3:  return x & y;
      4:  return x | y;
      5:  return x ^ y;
      6:  return (x + y) / 4;
      7:  return (x + y) / 2;
      8:  return x % 16;
      9:  return x - (x % 16);
      10: return x | 15;
      11: return x | 240;
      12: return (x < y) ? x : y;
      13: return (x > y) ? x : y;
      14: return (2 * y) % 256;
      default: return (x + y) % 256;
    endcase
  endfunction

  // gene k of a chromosome: {sel_x[2:0], sel_y[2:0], func[3:0]} at bits 10k+9..10k
  function automatic int gene_field(input logic [249:0] c, input int k, input int f);
    int g;
    g = 0;
    for (int b = 0; b < 10; b++) g |= int'(c[10*k + b]) << b;
    case (f)
      0: return (g >> 7) & 7;   // sel_x
      1: return (g >> 4) & 7;   // sel_y
      default: return g & 15;   // func
    endcase
  endfunction

  function automatic int vrc_model(input logic [249:0] c, input int w [9]);
    int col [7][4];
    int cx [8], cy [8];
    int k;
    for (int cc = 0; cc <= 6; cc++) begin
      for (int r = 0; r < 4; r++) begin
        if (cc == 6 && r > 0) break;
        for (int j = 0; j < 8; j++) begin
          if (cc == 0) begin
            cx[j] = w[j]; cy[j] = w[j+1];
          end else if (j < 4) begin
            cx[j] = col[cc-1][j]; cy[j] = cx[j];
          end else if (cc == 1) begin
            cx[j] = w[2*(j-4)+1]; cy[j] = cx[j];
          end else begin
            cx[j] = col[cc-2][j-4]; cy[j] = cx[j];
          end
        end
        k = (cc == 6) ? 24 : cc*4 + r;
        col[cc][r] = fu_model(gene_field(c, k, 2), cx[gene_field(c, k, 0)], cy[gene_field(c, k, 1)]);
      end
    end
    return col[6][0];
  endfunction

  function automatic logic [249:0] rand_chrom();
    logic [255:0] v;
    for (int i = 0; i < 8; i++) v[32*i +: 32] = $urandom;
    return v[249:0];
  endfunction

endpackage
