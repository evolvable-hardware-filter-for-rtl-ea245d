// fu: function unit of one processing element.
//
// Applies one of sixteen 8-bit image operators to the operands X and Y,
// chosen by the 4-bit function code (slice 3 of the PE gene). Purely
// combinational. The operator set and its codes follow the published operator
// table. Sums are formed 9 bits wide before the shifts of codes 6 and 7, so
// (X+Y)>>1 is the exact mean; X+Y (code 15) and Y<<1 (code 14) wrap modulo 256
// because the table gives plain addition and shift on 8-bit data.
module fu
  import ehw_pkg::*;
(
  input  pix_t   x,
  input  pix_t   y,
  input  fu_op_e op,
  output pix_t   z
);
  logic [PIX_W:0] sum;

  always_comb begin
    sum = {1'b0, x} + {1'b0, y};
    unique case (op)
      OP_SHR1:    z = x >> 1;
      OP_X:       z = x;
      OP_NOTX:    z = ~x;
      OP_AND:     z = x & y;
      OP_OR:      z = x | y;
      OP_XOR:     z = x ^ y;
      OP_ADD_SH2: z = pix_t'(sum >> 2);
      OP_AVG:     z = pix_t'(sum >> 1);
      OP_AND_0F:  z = x & 8'h0F;
      OP_AND_F0:  z = x & 8'hF0;
      OP_OR_0F:   z = x | 8'h0F;
      OP_OR_F0:   z = x | 8'hF0;
      OP_MIN:     z = (x < y) ? x : y;
      OP_MAX:     z = (x > y) ? x : y;
      OP_SHLY:    z = y << 1;
      OP_ADD:     z = pix_t'(sum);
      default:    z = x;
    endcase
  end
endmodule
