// tb_cfg_index: reset clears the index; random writes then reads back.
module tb_cfg_index;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic we, re;
  logic [7:0] waddr, raddr;
  logic [11:0] wdata, rdata;
  logic [11:0] m [256];
  int checks = 0, failures = 0;

  cfg_index dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 256; i++) m[i] = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 8'($urandom); wdata = 12'($urandom);
      re = 1; raddr = 8'($urandom);
      // a read in the same cycle as a write to the same entry sees the old value
      begin
        logic [11:0] e;
        e = m[raddr];
        @(posedge clk);
        if (we) m[waddr] = wdata;
        #1;
        checks++;
        if (rdata !== e) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
