// tb_pe_alu: exhaustive-by-operation random test of the PE ALU against a
// behavioural model written independently with 32-bit integer arithmetic.
module tb_pe_alu;
  import rp_pkg::*;
  alu_op_e op;
  logic [15:0] a, b, y;
  logic cin, cout;
  int checks = 0, failures = 0;

  pe_alu dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      int ai, bi, s, ey, ec;
      op  = alu_op_e'(n % 16);
      a   = (n % 7 == 0) ? 16'hFFFF : 16'($urandom);
      b   = (n % 11 == 0) ? a : 16'($urandom);
      cin = 1'($urandom);
      #1;
      ai = int'(a); bi = int'(b); ec = 0;
      case (op)
        ALU_ADD:  begin s = ai + bi;           ey = s & 'hFFFF; ec = s >> 16; end
        ALU_ADC:  begin s = ai + bi + cin;     ey = s & 'hFFFF; ec = s >> 16; end
        ALU_SUB:  begin s = ai + (bi ^ 'hFFFF) + 1;   ey = s & 'hFFFF; ec = (s >> 16) & 1; end
        ALU_SBB:  begin s = ai + (bi ^ 'hFFFF) + cin; ey = s & 'hFFFF; ec = (s >> 16) & 1; end
        ALU_AND:  ey = ai & bi;
        ALU_OR:   ey = ai | bi;
        ALU_XOR:  ey = ai ^ bi;
        ALU_PASS: ey = ai;
        ALU_SHL:  ey = (ai << (bi % 16)) & 'hFFFF;
        ALU_SHR:  ey = ai >> (bi % 16);
        ALU_SRA:  ey = (((ai >= 32768) ? ai - 65536 : ai) >>> (bi % 16)) & 'hFFFF;
        ALU_MIN:  ey = (ai < bi) ? ai : bi;
        ALU_MAX:  ey = (ai > bi) ? ai : bi;
        ALU_ABSD: ey = (ai > bi) ? ai - bi : bi - ai;
        ALU_GTU:  ey = (ai > bi) ? 1 : 0;
        default:  ey = (ai == bi) ? 1 : 0;
      endcase
      checks += 2;
      if (int'(y) != ey || int'(cout) != ec) begin
        failures++;
        if (failures < 10) $display("FAIL op=%s a=%h b=%h cin=%b y=%h/%h c=%b/%0d", op.name(), a, b, cin, y, ey[15:0], cout, ec);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
