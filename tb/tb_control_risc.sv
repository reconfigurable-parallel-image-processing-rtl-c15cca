// tb_control_risc: runs a directed program through the control RISC:
// immediate loads with forwarding between back-to-back instructions, every
// arithmetic/logic operation, a counted branch loop, taken BEQ and JMP that
// must discard the instructions behind them, configuration memory, index and
// function table writes, two custom instructions (one without and one with
// the wait flag) against a PE-array model with random ready and a busy time,
// IN/OUT, SYNC, then 400 random arithmetic instructions (each result often
// output by the very next instruction, so forwarding is exercised) and HALT.
// Checks the output stream, every configuration write,
// the custom instruction words, and that the waiting instructions were held
// until the array was idle.
module tb_control_risc;
  import rp_pkg::*;
  import risc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic run, halted, imem_we, io_out_valid, cm_we, idx_we, ci_valid, ci_ready, pe_busy, dep_stall;
  logic [11:0] imem_waddr, cm_waddr, idx_wdata;
  logic [31:0] imem_wdata, io_in, io_out;
  logic [39:0] cm_wdata;
  logic [7:0] idx_waddr;
  logic [15:0] ci_data;
  int checks = 0, failures = 0;

  control_risc dut (.*);

  logic [31:0] prog[$];
  logic [31:0] outs[$];
  logic [31:0] exp_outs[$];
  logic [31:0] rnd_outs[$];
  logic [15:0] cis[$];
  int busy_left = 0, n_dep = 0, n_out_busy = 0, n_cm = 0, n_idx = 0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // PE array model
  always @(posedge clk) if (rst_n) begin
    if (ci_valid && ci_ready) begin
      cis.push_back(ci_data);
      busy_left <= 25;
    end else if (busy_left > 0) busy_left <= busy_left - 1;
    ci_ready <= ($urandom_range(0, 3) == 0);
    if (dep_stall) n_dep++;
    if (io_out_valid) begin
      outs.push_back(io_out);
      if (pe_busy) n_out_busy++;
    end
    if (cm_we) begin
      n_cm++;
      check("cm_waddr", cm_waddr, 100);
      check("cm_wdata", cm_wdata, 40'h77_ABCD_5678);
    end
    if (idx_we) begin
      n_idx++;
      check("idx_waddr", idx_waddr, 4);
      check("idx_wdata", idx_wdata, 100);
    end
  end
  assign pe_busy = (busy_left > 0);

  initial begin
    logic [31:0] r1, r2, r3, r4, r7, r8, r9;
    run = 0; imem_we = 0; imem_waddr = 0; imem_wdata = 0; io_in = 32'h5EED_0001; ci_ready = 0;
    prog = '{
      enc_i(OP_ORI, 1, 0, 16'h1234),          // 0
      enc_i(OP_LUI, 2, 0, 16'hABCD),          // 1
      enc_i(OP_ORI, 2, 2, 16'h5678),          // 2
      enc_r(OP_ADD, 3, 1, 2),                 // 3
      enc_r(OP_SUB, 4, 3, 1),                 // 4
      enc_r(OP_XOR, 5, 4, 2),                 // 5
      enc_i(OP_ORI, 6, 0, 16'd4),             // 6
      enc_r(OP_SLL, 7, 1, 6),                 // 7
      enc_r(OP_SRL, 8, 2, 6),                 // 8
      enc_r(OP_AND, 9, 2, 7),                 // 9
      enc_i(OP_OUT, 0, 3, 0), enc_i(OP_OUT, 0, 4, 0), enc_i(OP_OUT, 0, 5, 0),   // 10-12
      enc_i(OP_OUT, 0, 7, 0), enc_i(OP_OUT, 0, 8, 0), enc_i(OP_OUT, 0, 9, 0),   // 13-15
      enc_i(OP_ADDI, 10, 0, 16'd5),           // 16
      enc_i(OP_ADDI, 11, 0, 16'd0),           // 17
      enc_r(OP_ADD, 11, 11, 10),              // 18 loop
      enc_i(OP_ADDI, 10, 10, 16'hFFFF),       // 19
      enc_i(OP_BNE, 10, 0, 16'hFFFE),         // 20 -> 18
      enc_i(OP_OUT, 0, 11, 0),                // 21
      enc_i(OP_BEQ, 0, 0, 16'd2),             // 22 -> 24
      enc_i(OP_OUT, 0, 1, 0),                 // 23 skipped
      enc_i(OP_JMP, 0, 0, 16'd26),            // 24
      enc_i(OP_OUT, 0, 1, 0),                 // 25 skipped
      enc_i(OP_ADDI, 12, 0, 16'h77),          // 26
      enc_r(OP_CFGHI, 0, 12, 0),              // 27
      enc_i(OP_ADDI, 13, 0, 16'd100),         // 28
      enc_r(OP_CFGW, 0, 13, 2),               // 29
      enc_r(OP_IDXW, 0, 6, 13),               // 30
      enc_i(OP_ORI, 14, 0, 16'h0502),         // 31
      enc_i(OP_FTW, 0, 14, 16'd9),            // 32
      enc_i(OP_CUST, 0, 0, 16'h0009),         // 33
      enc_i(OP_CUST, 0, 0, 16'h0109),         // 34 wait for the array
      enc_i(OP_IN, 15, 0, 0),                 // 35
      enc_i(OP_OUT, 0, 15, 0),                // 36
      enc_r(OP_SYNC, 0, 0, 0),                // 37
      enc_i(OP_OUT, 0, 1, 0),                 // 38
      enc_r(OP_HALT, 0, 0, 0),                // 39
      enc_i(OP_OUT, 0, 2, 0)                  // 40 not executed
    };
    // random arithmetic block before HALT: every result is output at once,
    // so each OUT depends on the instruction right before it
    begin
      logic [31:0] rf [16];
      logic [31:0] blk [$];
      rf[0] = 0;
      for (int r = 1; r < 16; r++) begin
        rf[r] = $urandom;
        blk.push_back(enc_i(OP_LUI, 4'(r), 0, rf[r][31:16]));
        blk.push_back(enc_i(OP_ORI, 4'(r), 4'(r), rf[r][15:0]));
      end
      for (int n = 0; n < 400; n++) begin
        int unsigned k;
        logic [3:0] rd, rs, rt;
        logic [15:0] im;
        logic [31:0] a, b, y;
        k = $urandom_range(0, 9);
        rd = 4'($urandom_range(1, 15));
        rs = 4'($urandom_range(0, 15));
        rt = 4'($urandom_range(0, 15));
        im = 16'($urandom);
        a = rf[rs]; b = rf[rt];
        case (k)
          0: begin blk.push_back(enc_r(OP_ADD, rd, rs, rt)); y = a + b; end
          1: begin blk.push_back(enc_r(OP_SUB, rd, rs, rt)); y = a - b; end
          2: begin blk.push_back(enc_r(OP_AND, rd, rs, rt)); y = a & b; end
          3: begin blk.push_back(enc_r(OP_OR,  rd, rs, rt)); y = a | b; end
          4: begin blk.push_back(enc_r(OP_XOR, rd, rs, rt)); y = a ^ b; end
          5: begin blk.push_back(enc_r(OP_SLL, rd, rs, rt)); y = a << b[4:0]; end
          6: begin blk.push_back(enc_r(OP_SRL, rd, rs, rt)); y = a >> b[4:0]; end
          7: begin blk.push_back(enc_i(OP_ADDI, rd, rs, im)); y = a + {{16{im[15]}}, im}; end
          8: begin blk.push_back(enc_i(OP_LUI, rd, 0, im)); y = {im, 16'd0}; end
          default: begin blk.push_back(enc_i(OP_ORI, rd, rs, im)); y = a | {16'd0, im}; end
        endcase
        rf[rd] = y;
        if ($urandom_range(0, 1)) begin
          blk.push_back(enc_i(OP_OUT, 0, rd, 0));
          rnd_outs.push_back(y);
        end
      end
      for (int r = 1; r < 16; r++) begin
        blk.push_back(enc_i(OP_OUT, 0, 4'(r), 0));
        rnd_outs.push_back(rf[r]);
      end
      foreach (blk[i]) prog.insert(39 + i, blk[i]);
    end
    r1 = 32'h1234; r2 = 32'hABCD_5678; r3 = r1 + r2; r4 = r3 - r1;
    r7 = r1 << 4; r8 = r2 >> 4; r9 = r2 & r7;
    exp_outs = '{r3, r4, r4 ^ r2, r7, r8, r9, 32'd15, 32'h5EED_0001, r1};
    foreach (rnd_outs[i]) exp_outs.push_back(rnd_outs[i]);
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (prog[i]) begin
      @(negedge clk);
      imem_we = 1; imem_waddr = 12'(i); imem_wdata = prog[i];
    end
    @(negedge clk);
    imem_we = 0; run = 1;
    while (!halted) @(negedge clk);
    repeat (5) @(negedge clk);
    check("outputs", outs.size(), exp_outs.size());
    foreach (exp_outs[i]) if (i < outs.size()) check($sformatf("out %0d", i), outs[i], exp_outs[i]);
    check("custom instructions", cis.size(), 2);
    foreach (cis[i]) check("custom word", cis[i], 16'h0502);
    check("config writes", n_cm, 1);
    check("index writes", n_idx, 1);
    check("dependency stall seen", n_dep > 0, 1);
    check("no output while array busy after the waiting CUST", n_out_busy, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
