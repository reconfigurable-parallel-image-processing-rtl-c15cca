// tb_rip_core: end-to-end test of the reconfigurable image processor alone.
//
// Loads three context sets into configuration memory (thresholding,
// broadcast; neighbour sum, per-PE; a 22-context straight-line set), points
// index entries 0..2 at their headers, writes a random 64x64 image into the
// four block memories through the sensor ports and issues one custom
// instruction {index 0, 3 sets}. The three sets together need 35 ring
// entries, more than the 32 available, so configuration of the third set
// must wait for the first to finish. Checks every result word against a
// model, the execution time of the thresholding set (3 cycles per pixel plus
// 3), and that ring-full stalls, jumps, broadcast and per-PE transfers, and
// configuration overlapping execution all happened.
module tb_rip_core;
  import rp_pkg::*;
  import tb_kern_pkg::*;

  localparam int T = 100;
  localparam int LINE_N = 22;

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
  logic [15:0] img [4][1024];
  logic [39:0] words[$];
  int hdr_addr [3];
  int n_stall = 0, n_jump = 0, n_done = 0, n_bc = 0, n_pe = 0, n_overlap = 0;
  int done_cycle [3];
  int start_cycle [3];
  int cyc = 0;

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (cfg_stall) n_stall++;
    if (jump_taken) n_jump++;
    if (dut.cfg.we && dut.cfg.tgt == TGT_PE && dut.cfg.bcast) n_bc++;
    if (dut.cfg.we && dut.cfg.tgt == TGT_PE && !dut.cfg.bcast) n_pe++;
    if (dut.cfg.we && exec_en) n_overlap++;
    if (dut.br_start && n_done < 3) start_cycle[n_done] = cyc;
    if (set_done) begin
      if (n_done < 3) done_cycle[n_done] = cyc;
      n_done++;
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
    #4000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cs_builder b;
    ci_valid = 0; ci_data = '0; cm_we = 0; idx_we = 0; cm_waddr = '0; cm_wdata = '0;
    idx_waddr = '0; idx_wdata = '0;
    for (int p = 0; p < 4; p++) begin
      sen_en[p] = 0; sen_we[p] = 0; sen_addr[p] = '0; sen_wdata[p] = '0;
      for (int i = 0; i < 1024; i++) img[p][i] = 16'($urandom_range(0, 255));
    end
    b = thr_set(T);        hdr_addr[0] = words.size(); b.emit(words);
    b = nbsum_set();       hdr_addr[1] = words.size(); b.emit(words);
    b = line_set(LINE_N);  hdr_addr[2] = words.size(); b.emit(words);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // configuration memory and index
    foreach (words[i]) begin
      cm_we <= 1; cm_waddr <= 12'(i); cm_wdata <= words[i];
      @(posedge clk);
    end
    cm_we <= 0;
    for (int s = 0; s < 3; s++) begin
      idx_we <= 1; idx_waddr <= 8'(s); idx_wdata <= 12'(hdr_addr[s]);
      @(posedge clk);
    end
    idx_we <= 0;
    // image blocks
    for (int i = 0; i < 1024; i++) begin
      for (int p = 0; p < 4; p++) begin
        sen_en[p] <= 1; sen_we[p] <= 1; sen_addr[p] <= 12'(i); sen_wdata[p] <= img[p][i];
      end
      @(posedge clk);
    end
    for (int p = 0; p < 4; p++) begin sen_en[p] <= 0; sen_we[p] <= 0; end
    // one custom instruction: index 0, three context sets
    ci_valid <= 1; ci_data <= {8'd0, 8'd3};
    @(posedge clk); #1;
    ci_valid <= 0;
    check("instruction accepted", ci_ready, 0);
    check("busy after issue", busy, 1);
    while (busy) begin @(posedge clk); #1; end
    check("sets finished", n_done, 3);
    // thresholding set: 2 init contexts, 3 per pixel, end context
    check("threshold execution cycles", done_cycle[0] - start_cycle[0], 2 + 3 * 1024 + 2);
    check("ring-full stall happened", n_stall > 0, 1);
    check("jumps taken", n_jump, 2 * 1023);
    check("broadcast PE beats", n_bc > 0, 1);
    check("per-PE beats", n_pe, 7 * 4 * 2);
    check("configuration overlapped execution", n_overlap > 0, 1);
    // read back
    for (int p = 0; p < 4; p++) begin
      int east;
      east = (p == 0) ? 1 : (p == 2) ? 3 : -1;
      for (int i = 0; i < 1024; i++) begin
        sen_en[p] <= 1; sen_we[p] <= 0; sen_addr[p] <= 12'(1024 + i);
        @(posedge clk); #1;
        check($sformatf("thr p%0d i%0d", p, i), sen_rdata[p], (img[p][i] > T) ? 1 : 0);
        sen_addr[p] <= 12'(2048 + i);
        @(posedge clk); #1;
        check($sformatf("nbsum p%0d i%0d", p, i), sen_rdata[p],
              16'(img[p][i] + ((east >= 0) ? img[east][i] : 0) + p));
      end
      sen_addr[p] <= 12'd3500;
      @(posedge clk); #1;
      check($sformatf("line p%0d", p), sen_rdata[p], line_sum(LINE_N));
      sen_en[p] <= 0;
    end
    $display("stall=%0d jumps=%0d bcast=%0d perpe=%0d overlap=%0d thr_cycles=%0d",
             n_stall, n_jump, n_bc, n_pe, n_overlap, done_cycle[0] - start_cycle[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
