// tb_cfg_memory: fills the 40-bit configuration memory and reads it back
// with random addresses, checking the one-cycle read latency.
module tb_cfg_memory;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we, re;
  logic [11:0] waddr, raddr;
  logic [39:0] wdata, rdata;
  logic [39:0] m [4096];
  int checks = 0, failures = 0;

  cfg_memory dut (.*);

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int i = 0; i < 4096; i++) begin
      @(negedge clk);
      we = 1; waddr = 12'(i); wdata = {8'($urandom), 32'($urandom)};
      m[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      re = 1; raddr = 12'($urandom);
      @(posedge clk); #1;
      checks++;
      if (rdata !== m[raddr]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
