// tb_exec_control: drives the FIFO and branch-control sides with a small
// behavioural model and checks that each queued set is started once with its
// start address, only while the branch control is idle, and popped and
// released with its context count exactly when the set finishes.
module tb_exec_control;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic fifo_empty, fifo_pop, br_busy, br_done, br_start, rel_valid, running;
  logic [4:0] head_start, br_offset;
  logic [6:0] head_nctx, rel_nctx;
  int checks = 0, failures = 0;

  exec_control dut (.*);

  typedef struct { int start; int n; } ent_t;
  ent_t q[$];
  int started[$], released[$];
  int busy_left;
  bit fifo_pop_q, start_q;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  assign fifo_empty = (q.size() == 0);
  assign head_start = q.size() ? 5'(q[0].start) : 5'd0;
  assign head_nctx  = q.size() ? 7'(q[0].n) : 7'd0;

  initial begin
    br_busy = 0; br_done = 0; busy_left = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      if (cyc < 3000 && $urandom_range(0, 99) < 3) q.push_back('{$urandom_range(0, 31), $urandom_range(1, 32)});
      #1;
      if (br_start) begin
        checks += 2;
        if (br_busy) failures++;
        if (br_offset !== 5'(q[0].start)) failures++;
        started.push_back(q[0].start);
      end
      if (fifo_pop) begin
        checks += 3;
        if (!br_done) failures++;
        if (!rel_valid) failures++;
        if (rel_nctx !== 7'(q[0].n)) failures++;
        released.push_back(q[0].n);
      end
      fifo_pop_q = fifo_pop;
      start_q = br_start;
      @(posedge clk); #1;
      if (fifo_pop_q) void'(q.pop_front());
      // branch control model: runs a random number of cycles, then done
      br_done = 0;
      if (start_q) begin br_busy = 1; busy_left = $urandom_range(1, 20); end
      else if (br_busy) begin
        busy_left--;
        if (busy_left == 0) begin br_busy = 0; br_done = 1; end
      end
    end
    checks += 2;
    if (started.size() != released.size()) failures++;
    if (started.size() < 50) failures++;
    $display("sets run: %0d", started.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
