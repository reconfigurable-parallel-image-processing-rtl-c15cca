// tb_pe: in six rounds, fills the PE's 32 contexts with random context words
// over the configuration bus (eight of them add/subtract with the carry taken
// from each network port), then executes random context pointers with random
// network inputs and random enable, comparing the memory request, the jump
// condition register write and the network output every cycle with a
// behavioural model of the context word (register file, MAC accumulator,
// carry flag and output register kept in the testbench).
module tb_pe;
  import rp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_we, cfg_beat, en;
  logic [4:0] cfg_addr, ctx_ptr;
  logic [39:0] cfg_data;
  net_word_t net_in [4];
  net_word_t net_out;
  logic mem_en, mem_we, jcr_we;
  logic [11:0] mem_addr;
  logic [15:0] mem_wdata, jcr_data;
  logic [3:0] jcr_idx;
  int checks = 0, failures = 0;

  pe dut (.*);

  pe_cfg_t ctx [32];
  logic [15:0] rf [16];
  longint acc;
  logic carry;
  net_word_t outr;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 15) $display("FAIL %s: %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [15:0] opnd(src_e s, pe_cfg_t c);
    case (s)
      SRC_RA: return rf[c.ra];
      SRC_RB: return rf[c.rb];
      SRC_N0: return net_in[0].data;
      SRC_N1: return net_in[1].data;
      SRC_N2: return net_in[2].data;
      SRC_N3: return net_in[3].data;
      SRC_IMM: return c.imm;
      default: return outr.data;
    endcase
  endfunction

  function automatic longint s9(logic [15:0] v);
    return v[8] ? longint'(v[8:0]) - 512 : longint'(v[8:0]);
  endfunction

  initial begin
    cfg_we = 0; cfg_beat = 0; cfg_addr = 0; cfg_data = 0; en = 0; ctx_ptr = 0;
    for (int i = 0; i < 4; i++) net_in[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 16; i++) rf[i] = 0;
    acc = 0; carry = 0; outr = '0;
    for (int round = 0; round < 6; round++) begin
    @(negedge clk);
    en = 0;
    // new random contexts each round; the first eight are carry-using
    // operations with operand A taken from each network port in turn
    for (int c = 0; c < 32; c++) begin
      logic [79:0] f;
      f = {16'($urandom), $urandom, $urandom};
      f[79:61] = '0;
      ctx[c] = pe_cfg_t'(f);
      if (c < 8) begin
        ctx[c].alu_op = (c % 2) ? ALU_SBB : ALU_ADC;
        ctx[c].alu_a  = src_e'(SRC_N0 + c / 2);
        ctx[c].out_we = 1'b1;
        f = ctx[c];
      end
      for (int bt = 0; bt < 2; bt++) begin
        @(negedge clk);
        cfg_we = 1; cfg_addr = 5'(c); cfg_beat = 1'(bt); cfg_data = bt ? f[79:40] : f[39:0];
      end
    end
    @(negedge clk);
    cfg_we = 0;
    for (int n = 0; n < 1000; n++) begin
      pe_cfg_t c;
      logic [15:0] a, b, y, wd, ea;
      logic cin, co;
      logic [16:0] s;
      longint sh;
      @(negedge clk);
      en = ($urandom_range(0, 7) != 0);
      ctx_ptr = 5'($urandom);
      for (int i = 0; i < 4; i++) net_in[i] = '{carry: 1'($urandom), data: 16'($urandom)};
      #1;
      c = ctx[ctx_ptr];
      a = opnd(c.alu_a, c); b = opnd(c.alu_b, c);
      case (c.alu_a)
        SRC_N0: cin = net_in[0].carry; SRC_N1: cin = net_in[1].carry;
        SRC_N2: cin = net_in[2].carry; SRC_N3: cin = net_in[3].carry;
        default: cin = carry;
      endcase
      co = 0;
      case (c.alu_op)
        ALU_ADD: begin s = a + b; y = s[15:0]; co = s[16]; end
        ALU_ADC: begin s = a + b + cin; y = s[15:0]; co = s[16]; end
        ALU_SUB: begin s = {1'b0, a} + {1'b0, ~b} + 1; y = s[15:0]; co = s[16]; end
        ALU_SBB: begin s = {1'b0, a} + {1'b0, ~b} + cin; y = s[15:0]; co = s[16]; end
        ALU_AND: y = a & b;  ALU_OR: y = a | b;  ALU_XOR: y = a ^ b;  ALU_PASS: y = a;
        ALU_SHL: y = a << b[3:0];  ALU_SHR: y = a >> b[3:0];
        ALU_SRA: y = $signed(a) >>> b[3:0];
        ALU_MIN: y = a < b ? a : b;  ALU_MAX: y = a > b ? a : b;
        ALU_ABSD: y = a > b ? a - b : b - a;
        ALU_GTU: y = a > b;  default: y = a == b;
      endcase
      sh = acc >>> c.mac_shift;
      case (c.rd_src)
        WS_ALU: wd = y; WS_MAC: wd = sh[15:0]; WS_N0: wd = net_in[0].data; default: wd = c.imm;
      endcase
      ea = rf[c.ra] + c.imm;
      check("mem_en", mem_en, en && (c.mem_op == MEM_RD || c.mem_op == MEM_WR));
      check("mem_we", mem_we, en && c.mem_op == MEM_WR);
      if (en && c.mem_op inside {MEM_RD, MEM_WR}) check("mem_addr", mem_addr, ea[11:0]);
      if (en && c.mem_op == MEM_WR) check("mem_wdata", mem_wdata, rf[c.rb]);
      check("jcr_we", jcr_we, en && c.jcr_we);
      if (en && c.jcr_we) begin check("jcr_idx", jcr_idx, c.jcr_idx); check("jcr_data", jcr_data, y); end
      check("net_out", net_out, outr);
      @(posedge clk);
      if (en) begin
        longint p;
        p = s9(opnd(c.mac_a, c)) * s9(opnd(c.mac_b, c));
        case (c.mac_op)
          MAC_MUL: acc = p; MAC_ACC: acc = acc + p; MAC_CLR: acc = 0; default: ;
        endcase
        acc = acc & ((64'd1 << 26) - 1);
        if (acc >= (64'd1 << 25)) acc -= (64'd1 << 26);
        if (c.rd_we) rf[c.rd] = wd;
        carry = co;
        if (c.out_we) outr = '{carry: co, data: y};
      end
    end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
