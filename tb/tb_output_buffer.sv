// tb_output_buffer: writes a full filtered frame with random gaps, checks the
// pixel count, reads every address back (one clock read latency), then clears
// and writes a second frame to check that addressing restarts at zero.
module tb_output_buffer;
  import ehw_pkg::*;
  localparam int W = 10, H = 6, NO = (W-2)*(H-2);
  localparam int AW = $clog2(NO);
  logic clk = 0, rst_n = 0, clear = 0, we = 0;
  pix_t wdata, rd_data;
  logic [AW-1:0] rd_addr = '0;
  logic [AW:0] count;
  int checks = 0, failures = 0;
  int ref_img [NO];

  always #5 clk = ~clk;

  output_buffer #(.IMG_W(W), .IMG_H(H)) dut (
    .clk(clk), .rst_n(rst_n), .clear(clear), .we(we), .wdata(wdata),
    .rd_addr(rd_addr), .rd_data(rd_data), .count(count));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0;
      for (int i = 0; i < NO; ) begin
        we = ($urandom_range(0, 3) != 0);
        wdata = pix_t'($urandom);
        if (we) begin ref_img[i] = int'(wdata); i++; end
        @(negedge clk);
      end
      we = 0;
      checks++;
      if (int'(count) != NO) begin failures++; $display("FAIL count %0d", count); end
      for (int a = 0; a < NO; a++) begin
        rd_addr = AW'(a);
        @(negedge clk);
        checks++;
        if (int'(rd_data) != ref_img[a]) begin
          failures++;
          if (failures < 10) $display("FAIL addr %0d got %0d exp %0d", a, rd_data, ref_img[a]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
