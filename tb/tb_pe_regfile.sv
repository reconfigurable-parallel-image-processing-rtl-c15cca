// tb_pe_regfile: reset value, random writes, both read ports against a model.
module tb_pe_regfile;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [3:0] ra, rb, wa;
  logic [15:0] qa, qb, wd;
  logic we;
  logic [15:0] m [16];
  int checks = 0, failures = 0;

  pe_regfile dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; ra = 0; rb = 0; wa = 0; wd = 0;
    for (int i = 0; i < 16; i++) m[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      ra = 4'($urandom); rb = 4'($urandom);
      #1;
      checks += 2;
      if (qa !== m[ra] || qb !== m[rb]) begin
        failures++;
        if (failures < 10) $display("FAIL r%0d=%h/%h r%0d=%h/%h", ra, qa, m[ra], rb, qb, m[rb]);
      end
      we = 1'($urandom); wa = 4'($urandom); wd = 16'($urandom);
      @(posedge clk);
      if (we) m[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
