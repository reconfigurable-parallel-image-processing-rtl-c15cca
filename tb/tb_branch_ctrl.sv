// tb_branch_ctrl: random context sets of eight branch words placed across the
// ring wrap point, random jump condition register writes every cycle, and a
// cycle-by-cycle comparison of the context pointer, exec_en, jump_taken and
// done against an independent model of the published sequencing rule (End,
// then jump condition 0, then 1, then the default context).
module tb_branch_ctrl;
  import rp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_we, cfg_beat, start, busy, done, exec_en, jcr_we, jump_taken;
  logic [4:0] cfg_addr, start_offset, ctx_ptr;
  logic [39:0] cfg_data;
  logic [3:0] jcr_idx;
  logic [15:0] jcr_data;
  int checks = 0, failures = 0, n_jump = 0, n_done = 0;

  branch_ctrl dut (.*);

  logic [75:0] w [8];
  logic [15:0] mj [16];

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit term(logic [2:0] op, logic [15:0] r, logic [15:0] c);
    case (op)
      3'd0: return 1;
      3'd1: return r == c;
      3'd2: return r != c;
      3'd3: return r < c;
      3'd4: return r >= c;
      3'd5: return r > c;
      3'd6: return r <= c;
      default: return 0;
    endcase
  endfunction

  function automatic bit cond(logic [34:0] j);
    return term(j[9:7], mj[j[13:10]], j[34:19]) && term(j[2:0], mj[j[6:3]], j[34:19]);
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 15) $display("FAIL %s: %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    cfg_we = 0; cfg_beat = 0; cfg_addr = 0; cfg_data = 0; start = 0; start_offset = 0;
    jcr_we = 0; jcr_idx = 0; jcr_data = 0;
    for (int trial = 0; trial < 60; trial++) begin
      int base, ctx;
      rst_n = 0;
      repeat (2) @(posedge clk);
      rst_n = 1;
      for (int i = 0; i < 16; i++) mj[i] = 0;
      base = 26 + (trial % 6);
      for (int c = 0; c < 8; c++) begin
        logic [79:0] f;
        w[c] = {$urandom, $urandom, $urandom};
        w[c][75] = ($urandom_range(0, 9) == 0) || c == 7;
        w[c][74:70] = 5'($urandom_range(0, 7));
        // keep condition values, registers and contexts in a small range
        w[c][69:54] = 16'($urandom_range(0, 3)); w[c][53:49] = 5'($urandom_range(0, 7));
        w[c][48:45] = 4'($urandom_range(0, 3));  w[c][41:38] = 4'($urandom_range(0, 3));
        w[c][34:19] = 16'($urandom_range(0, 3)); w[c][18:14] = 5'($urandom_range(0, 7));
        w[c][13:10] = 4'($urandom_range(0, 3));  w[c][6:3]   = 4'($urandom_range(0, 3));
        f = {4'd0, w[c]};
        for (int bt = 0; bt < 2; bt++) begin
          @(negedge clk);
          cfg_we = 1; cfg_addr = 5'((base + c) % 32); cfg_beat = 1'(bt);
          cfg_data = bt ? f[79:40] : f[39:0];
        end
      end
      @(negedge clk);
      cfg_we = 0; start = 1; start_offset = 5'(base);
      @(negedge clk);
      start = 0;
      ctx = 0;
      for (int cyc = 0; cyc < 80; cyc++) begin
        bit c0, c1, last;
        check("busy", busy, 1);
        check("exec_en", exec_en, 1);
        check("ctx_ptr", ctx_ptr, (base + ctx) % 32);
        last = w[ctx][75];
        c0 = cond(w[ctx][69:35]);
        c1 = cond(w[ctx][34:0]);
        check("jump_taken", jump_taken, !last && (c0 || c1));
        if (!last && (c0 || c1)) n_jump++;
        jcr_we = 1'($urandom); jcr_idx = 4'($urandom_range(0, 3)); jcr_data = 16'($urandom_range(0, 3));
        @(posedge clk);
        if (jcr_we) mj[jcr_idx] = jcr_data;
        @(negedge clk);
        jcr_we = 0;
        if (last) begin
          check("done", done, 1);
          check("idle after end", busy, 0);
          n_done++;
          break;
        end
        ctx = c0 ? int'(w[ctx][53:49]) : c1 ? int'(w[ctx][18:14]) : int'(w[ctx][74:70]);
        ctx = ctx % 8;
      end
    end
    check("some jumps", n_jump > 20, 1);
    check("some sets ended", n_done > 10, 1);
    $display("jumps=%0d sets ended=%0d", n_jump, n_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
