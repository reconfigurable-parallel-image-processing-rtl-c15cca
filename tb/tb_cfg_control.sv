// tb_cfg_control: configuration control against testbench models of the
// index, the configuration memory (one-cycle read latency), the executable
// FIFO (full at two entries) and execution control (releases each set a
// random time after it was queued). Two custom instructions invoke five
// context sets (broadcast and per-PE, 6 to 22 contexts). Checks every
// configuration bus beat (target, broadcast, PE, ring address, beat, data),
// every FIFO push (start address in the ring, context count), that ring
// space is never over-committed, and that stalls for a full ring and a full
// FIFO both occurred.
module tb_cfg_control;
  import rp_pkg::*;
  import tb_kern_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic ci_valid, ci_ready, idx_re, cm_re, fifo_push, fifo_full, rel_valid, busy, stall_full;
  logic [15:0] ci_data;
  logic [7:0] idx_raddr;
  logic [11:0] idx_rdata, cm_raddr;
  logic [39:0] cm_rdata;
  cfg_bus_t cfg;
  logic [4:0] fifo_start;
  logic [6:0] fifo_nctx, rel_nctx;
  int checks = 0, failures = 0;

  cfg_control dut (.*);

  logic [39:0] words[$];
  int hdr [4];
  cfg_bus_t exp_bus[$];
  int exp_push_start[$], exp_push_n[$];
  int pend_n[$];
  int pend_t[$];
  int used = 0, n_sfull = 0, n_ffull = 0, cyc = 0;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // memory models
  always @(posedge clk) begin
    if (idx_re) idx_rdata <= 12'(hdr[idx_raddr]);
    if (cm_re)  cm_rdata  <= (cm_raddr < words.size()) ? words[cm_raddr] : '0;
  end

  task automatic expect_set(int s, ref int wp);
    cs_header_t h;
    int k, n, bc;
    h = cs_header_t'(words[hdr[s]]);
    n = h.nctx; bc = h.bcast;
    k = hdr[s] + 1;
    for (int c = 0; c < n; c++) begin
      int slots;
      slots = bc ? 6 : 12;
      for (int sl = 0; sl < slots; sl++) begin
        cfg_bus_t e;
        e = '0;
        e.we = 1; e.addr = 6'((wp + c) % 32); e.beat = 1'(sl % 2); e.data = words[k++];
        if (sl < 2) e.tgt = TGT_BRANCH;
        else if (sl >= slots - 2) e.tgt = TGT_NET;
        else begin e.tgt = TGT_PE; e.bcast = 1'(bc); e.pe = bc ? 4'd0 : 4'((sl - 2) / 2); end
        exp_bus.push_back(e);
      end
    end
    exp_push_start.push_back(wp);
    exp_push_n.push_back(n);
    wp = (wp + n) % 32;
  endtask

  // bus, FIFO and release models
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (stall_full) n_sfull++;
    if (dut.st == 3'd4 && fifo_full) n_ffull++;
    if (cfg.we) begin
      checks++;
      if (exp_bus.size() == 0) failures++;
      else begin
        if (cfg !== exp_bus[0]) begin
          failures++;
          if (failures < 10) $display("FAIL bus %p expected %p", cfg, exp_bus[0]);
        end
        void'(exp_bus.pop_front());
      end
    end
    if (fifo_push) begin
      checks += 3;
      if (exp_push_start.size() == 0) failures++;
      else begin
        if (fifo_start !== 5'(exp_push_start[0])) failures++;
        if (fifo_nctx !== 7'(exp_push_n[0])) failures++;
        void'(exp_push_start.pop_front());
        void'(exp_push_n.pop_front());
      end
      pend_n.push_back(fifo_nctx);
      pend_t.push_back(cyc + $urandom_range(100, 400));
    end
    if (rel_valid) begin
      void'(pend_n.pop_front());
      void'(pend_t.pop_front());
    end
  end

  assign fifo_full = (pend_n.size() >= 2);
  always_comb begin
    rel_valid = (pend_n.size() > 0) && (cyc >= pend_t[0]);
    rel_nctx  = (pend_n.size() > 0) ? 7'(pend_n[0]) : 7'd0;
  end

  // ring occupancy: reserved minus released may never exceed 32
  always @(posedge clk) if (rst_n) begin
    checks++;
    if (dut.used > 7'd32) failures++;
  end

  initial begin
    cs_builder b;
    int wp;
    ci_valid = 0; ci_data = 0;
    b = thr_set(9);     hdr[0] = words.size(); b.emit(words);
    b = nbsum_set();    hdr[1] = words.size(); b.emit(words);
    b = line_set(22);   hdr[2] = words.size(); b.emit(words);
    b = line_set(30);   hdr[3] = words.size(); b.emit(words);
    wp = 0;
    expect_set(0, wp); expect_set(1, wp); expect_set(2, wp);
    expect_set(1, wp); expect_set(2, wp); expect_set(3, wp);
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    ci_valid = 1; ci_data = {8'd0, 8'd3};
    @(negedge clk);
    checks++; if (ci_ready) failures++;
    ci_valid = 0;
    while (!ci_ready) @(negedge clk);
    ci_valid = 1; ci_data = {8'd1, 8'd3};
    @(negedge clk);
    ci_valid = 0;
    while (busy || pend_n.size() > 0) @(negedge clk);
    checks += 4;
    if (exp_bus.size() != 0) failures++;
    if (exp_push_start.size() != 0) failures++;
    if (n_sfull == 0) failures++;
    if (n_ffull == 0) failures++;
    $display("ring-full stall cycles=%0d fifo-full stall cycles=%0d", n_sfull, n_ffull);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
