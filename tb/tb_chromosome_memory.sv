// tb_chromosome_memory: fills both banks with random chromosomes, reads them
// all back with one clock latency, then mixes random writes and reads and
// checks every read against a model array (read-before-write on a clash).
module tb_chromosome_memory;
  localparam int POP = 16, CW = 250, AW = $clog2(POP) + 1;
  logic clk = 0, we = 0;
  logic [AW-1:0] waddr, raddr = '0;
  logic [CW-1:0] wdata, rdata;
  logic [CW-1:0] model [2*POP];
  logic [CW-1:0] exp_d;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  chromosome_memory #(.POP(POP), .CW(CW)) dut (
    .clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata));

  function automatic logic [CW-1:0] rc();
    logic [255:0] v;
    for (int i = 0; i < 8; i++) v[32*i +: 32] = $urandom;
    return v[CW-1:0];
  endfunction

  initial begin
    for (int a = 0; a < 2*POP; a++) begin
      @(negedge clk); we = 1; waddr = AW'(a); wdata = rc(); model[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < 2*POP; a++) begin
      raddr = AW'(a);
      @(negedge clk);
      checks++;
      if (rdata !== model[a]) begin failures++; $display("FAIL read %0d", a); end
    end
    for (int n = 0; n < 500; n++) begin
      we = $urandom_range(0, 1); waddr = AW'($urandom); wdata = rc();
      raddr = AW'($urandom);
      exp_d = model[raddr];
      if (we) model[waddr] = wdata;
      @(negedge clk);
      checks++;
      if (rdata !== exp_d) begin failures++; if (failures < 10) $display("FAIL mixed %0d", n); end
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
