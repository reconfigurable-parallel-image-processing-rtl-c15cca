// tb_pe_mem_if: request decoding and base+offset address generation.
module tb_pe_mem_if;
  import rp_pkg::*;
  logic en;
  mem_op_e op;
  logic [15:0] base, offset, wdata, mem_wdata;
  logic mem_en, mem_we;
  logic [11:0] mem_addr;
  int checks = 0, failures = 0;

  pe_mem_if dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      bit e_en, e_we;
      en = 1'($urandom); op = mem_op_e'($urandom_range(0, 3));
      base = 16'($urandom); offset = 16'($urandom); wdata = 16'($urandom);
      #1;
      e_en = en && (op == MEM_RD || op == MEM_WR);
      e_we = en && op == MEM_WR;
      checks += 4;
      if (mem_en !== e_en) failures++;
      if (mem_we !== e_we) failures++;
      if (mem_addr !== 12'((int'(base) + int'(offset)) % 4096)) failures++;
      if (mem_wdata !== wdata) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
