// tb_ctx_fifo: random push/pop (never overflowing or underflowing) against
// a queue model; checks head, empty, full and count.
module tb_ctx_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push, pop, empty, full;
  logic [10:0] din, dout;
  logic [3:0] count;
  logic [10:0] q[$];
  int checks = 0, failures = 0, n_full = 0;

  ctx_fifo dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; din = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      checks += 3;
      if (empty !== (q.size() == 0)) failures++;
      if (full !== (q.size() == 8)) failures++;
      if (count !== 4'(q.size())) failures++;
      if (q.size() > 0) begin checks++; if (dout !== q[0]) failures++; end
      if (full) n_full++;
      push = (q.size() < 8) && ($urandom_range(0, 99) < ((n / 500) % 2 ? 70 : 35));
      pop  = (q.size() > 0) && ($urandom_range(0, 99) < 50);
      din  = 11'($urandom);
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(din);
    end
    checks++; if (n_full == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
