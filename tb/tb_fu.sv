// tb_fu: exhaustive check of the function unit over all 16 operators and a
// dense sample of operand pairs, against the integer model in ehw_tb_pkg.
module tb_fu;
  import ehw_pkg::*;
  import ehw_tb_pkg::*;
  pix_t x, y, z;
  fu_op_e op;
  int checks = 0, failures = 0;

  fu dut (.x(x), .y(y), .op(op), .z(z));

  initial begin
    for (int o = 0; o < 16; o++)
      for (int a = 0; a < 256; a += 3)
        for (int b = 0; b < 256; b += 5) begin
          op = fu_op_e'(o); x = pix_t'(a); y = pix_t'(b);
          #1;
          checks++;
          if (int'(z) != fu_model(o, a, b)) begin
            failures++;
            if (failures < 10) $display("FAIL op=%0d x=%0d y=%0d z=%0d exp=%0d", o, a, b, z, fu_model(o, a, b));
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
