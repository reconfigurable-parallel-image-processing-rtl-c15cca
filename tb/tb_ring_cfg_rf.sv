// tb_ring_cfg_rf: write all 32 contexts of 80 bits in two 40-bit beats in a
// random order, then read every entry back at the context pointer; also
// checks that reset leaves all-zero contexts and that a beat only touches
// its half.
module tb_ring_cfg_rf;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic we, wbeat;
  logic [4:0] waddr, raddr;
  logic [39:0] wdata;
  logic [79:0] rdata;
  logic [79:0] m [32];
  int checks = 0, failures = 0;

  ring_cfg_rf dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wbeat = 0; waddr = 0; raddr = 0; wdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 32; i++) begin
      m[i] = '0;
      raddr = 5'(i); #1;
      checks++; if (rdata !== '0) failures++;
    end
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      we = 1; waddr = 5'($urandom); wbeat = 1'($urandom); wdata = {8'($urandom), 32'($urandom)};
      @(posedge clk);
      if (wbeat) m[waddr][79:40] = wdata; else m[waddr][39:0] = wdata;
      @(negedge clk);
      we = 0;
      raddr = 5'($urandom); #1;
      checks++;
      if (rdata !== m[raddr]) begin
        failures++;
        if (failures < 10) $display("FAIL entry %0d: %h expected %h", raddr, rdata, m[raddr]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
