// tb_image_mem: random traffic on both ports of the dual-port image memory,
// checked against a model, including same-address writes (port B wins) and
// the one-cycle read latency.
module tb_image_mem;
  logic clk = 0;
  always #5 clk = ~clk;
  logic a_en, a_we, b_en, b_we;
  logic [11:0] a_addr, b_addr;
  logic [15:0] a_wdata, a_rdata, b_wdata, b_rdata;
  logic [15:0] m [4096];
  int checks = 0, failures = 0;

  image_mem dut (.*);

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] ea, eb;
    logic ra, rb;
    a_en = 0; b_en = 0; a_we = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    // initialise the whole array through port A
    for (int i = 0; i < 4096; i++) begin
      @(negedge clk);
      a_en = 1; a_we = 1; a_addr = 12'(i); a_wdata = 16'(i * 7);
      m[i] = 16'(i * 7);
    end
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      a_en = 1'($urandom); a_we = 1'($urandom); a_addr = 12'($urandom_range(0, 15)); a_wdata = 16'($urandom);
      b_en = 1'($urandom); b_we = 1'($urandom); b_addr = 12'($urandom_range(0, 15)); b_wdata = 16'($urandom);
      ra = a_en; rb = b_en;
      ea = m[a_addr]; eb = m[b_addr];
      @(posedge clk);
      if (a_en && a_we && !(b_en && b_we && a_addr == b_addr)) m[a_addr] = a_wdata;
      if (b_en && b_we) m[b_addr] = b_wdata;
      #1;
      if (ra) begin checks++; if (a_rdata !== ea) failures++; end
      if (rb) begin checks++; if (b_rdata !== eb) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
