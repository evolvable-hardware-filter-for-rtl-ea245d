// tb_vrc: streams random windows through the VRC under several random
// configurations and compares every output with the network model. Also
// checks the seven-clock latency from window to filtered pixel and that each
// window produces exactly one output, including back-to-back windows.
module tb_vrc;
  import ehw_pkg::*;
  import ehw_tb_pkg::*;
  localparam int NW = 3000;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0, in_valid = 0;
  chrom_t cfg_in;
  pix_t win [N_WIN];
  logic out_valid;
  pix_t out_pix;
  int checks = 0, failures = 0;
  int exp_q [$];
  int t_in [$];
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  vrc dut (.clk(clk), .rst_n(rst_n), .cfg_we(cfg_we), .cfg_in(cfg_in),
           .in_valid(in_valid), .win(win), .out_valid(out_valid), .out_pix(out_pix));

  always @(posedge clk) if (rst_n && out_valid) begin
    checks += 2;
    if (exp_q.size() == 0) begin
      failures++;
      $display("FAIL unexpected output");
    end else begin
      int e, t;
      e = exp_q.pop_front();
      t = t_in.pop_front();
      if (int'(out_pix) != e) begin
        failures++;
        if (failures < 10) $display("FAIL out=%0d exp=%0d", out_pix, e);
      end
      if (cyc - t != VRC_LAT) begin
        failures++;
        if (failures < 10) $display("FAIL latency %0d", cyc - t);
      end
    end
  end

  initial begin
    int w [9];
    logic [249:0] c;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 12; k++) begin
      @(negedge clk);
      c = rand_chrom();
      if (k == 0) begin
        // identity chain: column 1 PE 1 passes I0 ... output PE passes its X.
        c = '0;
        for (int p = 0; p < 25; p++) c[10*p +: 10] = 10'b000_000_0001;
      end
      cfg_in = c; cfg_we = 1;
      @(negedge clk); cfg_we = 0;
      for (int n = 0; n < NW / 12; n++) begin
        for (int j = 0; j < 9; j++) begin w[j] = $urandom_range(0, 255); win[j] = pix_t'(w[j]); end
        in_valid = ($urandom_range(0, 3) != 0);
        if (in_valid) begin
          exp_q.push_back(vrc_model(c, w));
          t_in.push_back(cyc + 1);
        end
        @(negedge clk);
      end
      in_valid = 0;
      repeat (10) @(negedge clk);
    end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
