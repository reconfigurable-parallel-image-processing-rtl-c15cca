// tb_optflow: block-matching optical flow on the default 2x2 array.
//
// Frame 1 is random; frame 2 is frame 1 moved by a different displacement in
// each 32x32 block (pixels that enter from outside the block are random).
// Both frames are written through the sensor ports (frame 1 at 0, frame 2 at
// 1024 of every block memory). One custom instruction walks 51 index entries
// (init, then match + next for each of the 25 templates); the same two
// context sets are loaded again for every template. The match set uses all
// 32 ring entries, so every set waits on the full ring and no configuration
// can overlap execution: the switching cost that grows when a kernel needs
// as many contexts as the ring holds.
// Per template: 5x5 pixels, 12x12 candidate displacements (-6..5 in x and y),
// sum of absolute differences, first minimum in scan order kept. Checks every
// best index and SAD against a model, that the found motion equals the true
// one in every block, and the execution time of the first match set against
// the context count of the kernel (per candidate: 3 + 5*14 + 10 contexts, +2
// at the end of a row of candidates; +2 results, +1 end, +1 done). The best
// match is kept without branches, since every PE follows the same contexts.
module tb_optflow;
  import rp_pkg::*;
  import tb_kern_pkg::*;

  localparam int DXS [4] = '{2, -4, 0, 5};
  localparam int DYS [4] = '{-3, 1, 0, 5};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                 ci_valid, ci_ready;
  logic [CI_W-1:0]      ci_data;
  logic                 cm_we, idx_we;
  logic [11:0]          cm_waddr, idx_wdata;
  logic [39:0]          cm_wdata;
  logic [7:0]           idx_waddr;
  logic                 sen_en [4], sen_we [4];
  logic [11:0]          sen_addr [4];
  logic [15:0]          sen_wdata [4], sen_rdata [4];
  logic                 busy, exec_en, cfg_stall, jump_taken, set_done;
  logic [4:0]           ctx_ptr;

  rip_core dut (.*);

  int checks = 0, failures = 0;
  logic [15:0] f1 [4][32][32];   // [block][y][x]
  logic [15:0] f2 [4][32][32];
  logic [39:0] words[$];
  int hdr [3];
  int n_stall = 0, n_done = 0, n_overlap = 0, cyc = 0, t_start = 0, t_done = 0, t_all = 0;

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (cfg_stall) n_stall++;
    if (dut.cfg.we && exec_en) n_overlap++;
    if (dut.br_start && n_done == 1) t_start = cyc;
    if (set_done) begin
      n_done++;
      if (n_done == 2) t_done = cyc;
    end
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #8000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cs_builder b;
    int t0_cycles;
    ci_valid = 0; ci_data = '0; cm_we = 0; idx_we = 0; cm_waddr = '0; cm_wdata = '0;
    idx_waddr = '0; idx_wdata = '0;
    for (int p = 0; p < 4; p++) begin
      sen_en[p] = 0; sen_we[p] = 0; sen_addr[p] = '0; sen_wdata[p] = '0;
      for (int y = 0; y < 32; y++)
        for (int x = 0; x < 32; x++) f1[p][y][x] = 16'($urandom_range(0, 255));
      for (int y = 0; y < 32; y++)
        for (int x = 0; x < 32; x++) begin
          int sx, sy;
          sx = x - DXS[p]; sy = y - DYS[p];
          f2[p][y][x] = (sx >= 0 && sx < 32 && sy >= 0 && sy < 32) ? f1[p][sy][sx]
                                                                   : 16'($urandom_range(0, 255));
        end
    end

    b = of_init_set();  hdr[0] = words.size(); b.emit(words);
    b = of_match_set(); hdr[1] = words.size(); b.emit(words);
    b = of_next_set();  hdr[2] = words.size(); b.emit(words);

    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    foreach (words[i]) begin
      cm_we <= 1; cm_waddr <= 12'(i); cm_wdata <= words[i];
      @(posedge clk);
    end
    cm_we <= 0;
    for (int e = 0; e < 51; e++) begin
      idx_we <= 1; idx_waddr <= 8'(e); idx_wdata <= 12'(hdr[(e == 0) ? 0 : (e % 2 == 1) ? 1 : 2]);
      @(posedge clk);
    end
    idx_we <= 0;
    for (int i = 0; i < 1024; i++) begin
      for (int p = 0; p < 4; p++) begin
        sen_en[p] <= 1; sen_we[p] <= 1; sen_addr[p] <= 12'(i); sen_wdata[p] <= f1[p][i / 32][i % 32];
      end
      @(posedge clk);
      for (int p = 0; p < 4; p++) begin
        sen_addr[p] <= 12'(OF_F2 + i); sen_wdata[p] <= f2[p][i / 32][i % 32];
      end
      @(posedge clk);
    end
    for (int p = 0; p < 4; p++) begin sen_en[p] <= 0; sen_we[p] <= 0; end

    t_all = cyc;
    ci_valid <= 1; ci_data <= {8'd0, 8'd51};
    @(posedge clk); #1;
    ci_valid <= 0;
    while (busy) begin @(posedge clk); #1; end
    t_all = cyc - t_all;

    check("sets finished", n_done, 51);
    check("ring-full stall happened", n_stall > 0, 1);
    check("no overlap possible with a full-ring set", n_overlap, 0);

    for (int p = 0; p < 4; p++) begin
      sen_en[p] <= 1; sen_we[p] <= 0;
      for (int t = 0; t < 25; t++) begin
        int tx, ty, best, bidx, cyc_exp;
        tx = 6 + 4 * (t % 5); ty = 6 + 4 * (t / 5);
        best = 32'hFFFF; bidx = 0; cyc_exp = 0;
        for (int c = 0; c < 144; c++) begin
          int dx, dy, sad;
          dx = c % 12 - 6; dy = c / 12 - 6;
          sad = 0;
          for (int v = 0; v < 5; v++)
            for (int u = 0; u < 5; u++) begin
              int a, d;
              a = int'(f1[p][ty + v][tx + u]);
              d = int'(f2[p][ty + dy + v][tx + dx + u]);
              sad += (a > d) ? a - d : d - a;
            end
          cyc_exp += 3 + 5 * 14 + 10 + ((c % 12 == 11) ? 2 : 0);
          if (sad < best) begin best = sad; bidx = c; end
        end
        if (p == 0 && t == 0) t0_cycles = cyc_exp + 2 + 1 + 1;
        sen_addr[p] <= 12'(OF_IDX + t);
        @(posedge clk); #1;
        check($sformatf("best index p%0d t%0d", p, t), sen_rdata[p], bidx);
        check($sformatf("true motion p%0d t%0d", p, t), sen_rdata[p],
              12 * (DYS[p] + 6) + (DXS[p] + 6));
        sen_addr[p] <= 12'(OF_SAD + t);
        @(posedge clk); #1;
        check($sformatf("best SAD p%0d t%0d", p, t), sen_rdata[p], best);
      end
      sen_en[p] <= 0;
    end
    check("first match set cycles", t_done - t_start, t0_cycles);
    $display("first match set: %0d cycles; whole flow: %0d cycles; stall=%0d overlap=%0d",
             t_done - t_start, t_all, n_stall, n_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
