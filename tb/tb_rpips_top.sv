// tb_rpips_top: whole-system test at the default configuration.
//
// The control RISC runs a program, generated here, that
//   1. writes three context sets into configuration memory (thresholding
//      broadcast, per-PE neighbour sum, a 22-context straight-line set),
//      their header addresses into the index and two entries into the
//      function table, using configuration instructions,
//   2. issues custom instruction 0 (index 0, three sets) without waiting and
//      meanwhile computes 10+9+...+1 in a branch loop and outputs it,
//   3. issues custom instruction 1 (index 1, one set) with the wait flag,
//      which first stalls on the busy configuration control and then on the
//      running PE array, reads io_in, outputs it, executes SYNC and halts.
// The 64x64 image is written through the sensor ports beforehand and the
// results are read back through them afterwards and compared with a model.
// Counts and requires each mechanism at least once: broadcast and per-PE
// configuration, ring-full configuration stall, configuration overlapping
// execution, jumps, custom-instruction handshake stall, dependency stall,
// RISC work in parallel with the PE array.
module tb_rpips_top;
  import rp_pkg::*;
  import risc_pkg::*;
  import tb_kern_pkg::*;

  localparam int T = 77;
  localparam int LINE_N = 22;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        run, halted, imem_we, io_out_valid;
  logic [11:0] imem_waddr;
  logic [31:0] imem_wdata, io_in, io_out;
  logic        sen_en [4], sen_we [4];
  logic [11:0] sen_addr [4];
  logic [15:0] sen_wdata [4], sen_rdata [4];
  logic        pe_busy, exec_en, cfg_stall, jump_taken, set_done, dep_stall;
  logic [4:0]  ctx_ptr;

  rpips_top dut (.*);

  int checks = 0, failures = 0;
  logic [15:0] img [4][1024];
  logic [39:0] words[$];
  logic [31:0] prog[$];
  logic [31:0] outs[$];
  int hdr_addr [3];
  int n_stall = 0, n_jump = 0, n_done = 0, n_bc = 0, n_pe = 0, n_overlap = 0;
  int n_hs = 0, n_dep = 0, n_par = 0;

  always @(posedge clk) if (rst_n) begin
    if (cfg_stall) n_stall++;
    if (jump_taken) n_jump++;
    if (set_done) n_done++;
    if (dep_stall) n_dep++;
    if (dut.u_core.cfg.we && dut.u_core.cfg.tgt == TGT_PE &&  dut.u_core.cfg.bcast) n_bc++;
    if (dut.u_core.cfg.we && dut.u_core.cfg.tgt == TGT_PE && !dut.u_core.cfg.bcast) n_pe++;
    if (dut.u_core.cfg.we && exec_en) n_overlap++;
    if (dut.ci_valid && !dut.ci_ready) n_hs++;
    if (io_out_valid) begin
      outs.push_back(io_out);
      if (pe_busy) n_par++;
    end
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic check_count(input string what, input int n);
    checks++;
    $display("%-36s %0d", what, n);
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
  endtask

  function automatic void li(int r, logic [31:0] v);
    if (v[31:16] != 0) begin
      prog.push_back(enc_i(OP_LUI, 4'(r), 4'd0, v[31:16]));
      prog.push_back(enc_i(OP_ORI, 4'(r), 4'(r), v[15:0]));
    end else begin
      prog.push_back(enc_i(OP_ORI, 4'(r), 4'd0, v[15:0]));
    end
  endfunction

  function automatic void build_program();
    logic [7:0] hi = 8'd0;
    int loop_pc, br_pc;
    prog.push_back(enc_i(OP_ORI, 4'd1, 4'd0, 16'd0));          // r1 = 0 : address
    prog.push_back(enc_r(OP_CFGHI, 4'd0, 4'd0, 4'd0));         // staged high byte = 0
    foreach (words[i]) begin
      if (words[i][39:32] != hi) begin
        hi = words[i][39:32];
        li(3, {24'd0, hi});
        prog.push_back(enc_r(OP_CFGHI, 4'd0, 4'd3, 4'd0));
      end
      li(2, words[i][31:0]);
      prog.push_back(enc_r(OP_CFGW, 4'd0, 4'd1, 4'd2));
      prog.push_back(enc_i(OP_ADDI, 4'd1, 4'd1, 16'd1));
    end
    for (int s = 0; s < 3; s++) begin
      li(4, s);
      li(5, hdr_addr[s]);
      prog.push_back(enc_r(OP_IDXW, 4'd0, 4'd4, 4'd5));
    end
    li(6, 32'h0003); prog.push_back(enc_i(OP_FTW, 4'd0, 4'd6, 16'd0));  // ft[0] = idx 0, 3 sets
    li(6, 32'h0101); prog.push_back(enc_i(OP_FTW, 4'd0, 4'd6, 16'd1));  // ft[1] = idx 1, 1 set
    prog.push_back(enc_i(OP_CUST, 4'd0, 4'd0, 16'h0000));     // no wait
    li(8, 10);
    li(7, 0);
    loop_pc = prog.size();
    prog.push_back(enc_r(OP_ADD, 4'd7, 4'd7, 4'd8));
    prog.push_back(enc_i(OP_ADDI, 4'd8, 4'd8, 16'hFFFF));
    br_pc = prog.size();
    prog.push_back(enc_i(OP_BNE, 4'd8, 4'd0, 16'(loop_pc - br_pc)));
    prog.push_back(enc_i(OP_OUT, 4'd0, 4'd7, 16'd0));          // 55, while the array runs
    prog.push_back(enc_i(OP_CUST, 4'd0, 4'd0, 16'h0101));     // wait for completion
    prog.push_back(enc_i(OP_IN, 4'd9, 4'd0, 16'd0));
    prog.push_back(enc_i(OP_OUT, 4'd0, 4'd9, 16'd0));
    prog.push_back(enc_r(OP_SYNC, 4'd0, 4'd0, 4'd0));
    prog.push_back(enc_r(OP_SUB, 4'd10, 4'd9, 4'd7));
    prog.push_back(enc_i(OP_OUT, 4'd0, 4'd10, 16'd0));
    prog.push_back(enc_r(OP_HALT, 4'd0, 4'd0, 4'd0));
    prog.push_back(enc_i(OP_OUT, 4'd0, 4'd7, 16'd0));          // must not execute
  endfunction

  initial begin
    #20000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cs_builder b;
    run = 0; imem_we = 0; imem_waddr = '0; imem_wdata = '0; io_in = 32'hCAFE_F00D;
    for (int p = 0; p < 4; p++) begin
      sen_en[p] = 0; sen_we[p] = 0; sen_addr[p] = '0; sen_wdata[p] = '0;
      for (int i = 0; i < 1024; i++) img[p][i] = 16'($urandom_range(0, 255));
    end
    b = thr_set(T);        hdr_addr[0] = words.size(); b.emit(words);
    b = nbsum_set();       hdr_addr[1] = words.size(); b.emit(words);
    b = line_set(LINE_N);  hdr_addr[2] = words.size(); b.emit(words);
    build_program();
    $display("program: %0d instructions, %0d configuration words", prog.size(), words.size());
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    foreach (prog[i]) begin
      imem_we <= 1; imem_waddr <= 12'(i); imem_wdata <= prog[i];
      @(posedge clk);
    end
    imem_we <= 0;
    for (int i = 0; i < 1024; i++) begin
      for (int p = 0; p < 4; p++) begin
        sen_en[p] <= 1; sen_we[p] <= 1; sen_addr[p] <= 12'(i); sen_wdata[p] <= img[p][i];
      end
      @(posedge clk);
    end
    for (int p = 0; p < 4; p++) begin sen_en[p] <= 0; sen_we[p] <= 0; end
    run <= 1;
    @(posedge clk); #1;
    while (!halted) begin @(posedge clk); #1; end
    check("array idle at halt", pe_busy, 0);
    check("context sets completed", n_done, 4);
    check("outputs", outs.size(), 3);
    if (outs.size() == 3) begin
      check("loop result", outs[0], 55);
      check("io_in echo", outs[1], 32'hCAFE_F00D);
      check("subtract", outs[2], 32'hCAFE_F00D - 55);
    end
    check("jumps", n_jump, 3 * 1023);
    check("per-PE beats", n_pe, 2 * 7 * 4 * 2);
    check_count("broadcast PE beats", n_bc);
    check_count("ring-full configuration stall cycles", n_stall);
    check_count("configuration during execution", n_overlap);
    check_count("custom instruction handshake stalls", n_hs);
    check_count("dependency stall cycles", n_dep);
    check_count("RISC outputs while array busy", n_par);
    check_count("jumps taken", n_jump);
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
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
