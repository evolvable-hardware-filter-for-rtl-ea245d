// tb_pe: random check of one processing element. Each clock new candidates
// and a new gene are applied; one clock later the registered output must equal
// the model applied to the selected operands (checks the 8:1 multiplexers, the
// function unit and the one-clock latency).
module tb_pe;
  import ehw_pkg::*;
  import ehw_tb_pkg::*;
  logic clk = 0;
  pe_cfg_t cfg;
  pix_t cx [8], cy [8];
  pix_t q;
  int checks = 0, failures = 0;
  int exp_q;

  always #5 clk = ~clk;

  pe dut (.clk(clk), .cfg(cfg), .cand_x(cx), .cand_y(cy), .q(q));

  initial begin
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      cfg = pe_cfg_t'($urandom);
      for (int j = 0; j < 8; j++) begin cx[j] = pix_t'($urandom); cy[j] = pix_t'($urandom); end
      exp_q = fu_model(int'(cfg.func), int'(cx[cfg.sel_x]), int'(cy[cfg.sel_y]));
      @(posedge clk); #1;
      checks++;
      if (int'(q) != exp_q) begin
        failures++;
        if (failures < 10) $display("FAIL cfg=%h q=%0d exp=%0d", cfg, q, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
