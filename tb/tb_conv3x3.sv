// tb_conv3x3: 3x3 convolution of a 64x64 frame on the default 2x2 array.
//
// Each 32x32 block is written through the sensor ports with a one-pixel
// border (34x34 words, pixel (x,y) at 35 + 34*y + x); the border words are
// first filled with noise. One custom instruction {index 0, 6 sets} then runs
//   four halo_edge_set passes (W, E, N, S): copy the neighbouring block's
//     edge column/row into this block's border over the network,
//   halo_corner_set: the four diagonal corners,
//   conv_set: signed 3x3 multiply-accumulate per pixel with the MAC.
// Blocks on the frame edge get zeros from the network, so the result is the
// convolution of the zero-padded frame. Every output word is compared with a
// model computed on the whole frame, the borders filled over the network are
// checked, and the execution time of the convolution set is checked against
// its context count: 13 set-up contexts, 12 per pixel, 2 per row, 1 end.
// The six sets need 66 ring entries, so configuration stalls on a full ring
// and overlaps execution.
module tb_conv3x3;
  import rp_pkg::*;
  import tb_kern_pkg::*;

  localparam int SHIFT = 2;
  localparam int WT [9] = '{-1, 2, -1, 3, 5, 3, -1, 2, -1};

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
  logic [15:0] frame [64][64];   // [Y][X]
  logic [39:0] words[$];
  int hdr_addr [6];
  int n_stall = 0, n_done = 0, n_overlap = 0, cyc = 0, t_start = 0, t_done = 0;

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (cfg_stall) n_stall++;
    if (dut.cfg.we && exec_en) n_overlap++;
    if (dut.br_start && n_done == 5) t_start = cyc;
    if (set_done) begin
      n_done++;
      if (n_done == 6) t_done = cyc;
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

  function automatic int pix(int x, int y);
    if (x < 0 || y < 0 || x > 63 || y > 63) return 0;
    return int'(frame[y][x]);
  endfunction

  initial begin
    cs_builder b;
    int ws [9];
    foreach (WT[k]) ws[k] = WT[k];
    ci_valid = 0; ci_data = '0; cm_we = 0; idx_we = 0; cm_waddr = '0; cm_wdata = '0;
    idx_waddr = '0; idx_wdata = '0;
    for (int p = 0; p < 4; p++) begin sen_en[p] = 0; sen_we[p] = 0; sen_addr[p] = '0; sen_wdata[p] = '0; end
    for (int y = 0; y < 64; y++)
      for (int x = 0; x < 64; x++) frame[y][x] = 16'($urandom_range(0, 255));

    b = halo_edge_set(PW, PW + 32, PW, 7);            hdr_addr[0] = words.size(); b.emit(words); // W
    b = halo_edge_set(PW, PW + 1, PW + 33, 3);        hdr_addr[1] = words.size(); b.emit(words); // E
    b = halo_edge_set(1, 32 * PW + 1, 1, 1);          hdr_addr[2] = words.size(); b.emit(words); // N
    b = halo_edge_set(1, PW + 1, 33 * PW + 1, 5);     hdr_addr[3] = words.size(); b.emit(words); // S
    b = halo_corner_set();                            hdr_addr[4] = words.size(); b.emit(words);
    b = conv_set(ws, SHIFT);                          hdr_addr[5] = words.size(); b.emit(words);

    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    foreach (words[i]) begin
      cm_we <= 1; cm_waddr <= 12'(i); cm_wdata <= words[i];
      @(posedge clk);
    end
    cm_we <= 0;
    for (int s = 0; s < 6; s++) begin
      idx_we <= 1; idx_waddr <= 8'(s); idx_wdata <= 12'(hdr_addr[s]);
      @(posedge clk);
    end
    idx_we <= 0;
    // bordered blocks: noise everywhere, then the pixels
    for (int i = 0; i < PW * PW; i++) begin
      for (int p = 0; p < 4; p++) begin
        sen_en[p] <= 1; sen_we[p] <= 1; sen_addr[p] <= 12'(i); sen_wdata[p] <= 16'($urandom);
      end
      @(posedge clk);
    end
    for (int y = 0; y < 32; y++)
      for (int x = 0; x < 32; x++) begin
        for (int p = 0; p < 4; p++) begin
          sen_addr[p]  <= 12'(PW + 1 + PW * y + x);
          sen_wdata[p] <= frame[32 * (p / 2) + y][32 * (p % 2) + x];
        end
        @(posedge clk);
      end
    for (int p = 0; p < 4; p++) begin sen_en[p] <= 0; sen_we[p] <= 0; end

    ci_valid <= 1; ci_data <= {8'd0, 8'd6};
    @(posedge clk); #1;
    ci_valid <= 0;
    while (busy) begin @(posedge clk); #1; end

    check("sets finished", n_done, 6);
    check("convolution set cycles", t_done - t_start, 13 + 32 * (32 * 12 + 2) + 2);
    check("ring-full stall happened", n_stall > 0, 1);
    check("configuration overlapped execution", n_overlap > 0, 1);

    for (int p = 0; p < 4; p++) begin
      int bx, by;
      bx = 32 * (p % 2); by = 32 * (p / 2);
      sen_en[p] <= 1; sen_we[p] <= 0;
      // bordered block including the halo filled over the network
      for (int y = -1; y <= 32; y++)
        for (int x = -1; x <= 32; x++) begin
          sen_addr[p] <= 12'(PW + 1 + PW * y + x);
          @(posedge clk); #1;
          check($sformatf("halo p%0d (%0d,%0d)", p, x, y), sen_rdata[p], pix(bx + x, by + y));
        end
      for (int y = 0; y < 32; y++)
        for (int x = 0; x < 32; x++) begin
          longint acc;
          logic [15:0] e;
          acc = 0;
          for (int k = 0; k < 9; k++)
            acc += longint'(WT[k]) * pix(bx + x + k % 3 - 1, by + y + k / 3 - 1);
          acc = acc >>> SHIFT;
          e = 16'(acc);
          sen_addr[p] <= 12'(CONV_OUT + 32 * y + x);
          @(posedge clk); #1;
          check($sformatf("conv p%0d (%0d,%0d)", p, x, y), sen_rdata[p], e);
        end
      sen_en[p] <= 0;
    end
    $display("convolution set: %0d cycles; all six sets: stall=%0d overlap=%0d",
             t_done - t_start, n_stall, n_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
