// tb_pe_mac: random sequences of hold/multiply/accumulate/clear with random
// shifts; accumulator and shifted output compared with an integer model.
module tb_pe_mac;
  import rp_pkg::*;
  logic clk = 0, rst_n = 0, en;
  always #5 clk = ~clk;
  mac_op_e op;
  logic [8:0] a, b;
  logic [3:0] shift;
  logic [25:0] acc;
  logic [15:0] y;
  int checks = 0, failures = 0;
  longint model;

  pe_mac dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sx9(logic [8:0] v);
    return v[8] ? longint'(v) - 512 : longint'(v);
  endfunction

  initial begin
    en = 0; op = MAC_HOLD; a = 0; b = 0; shift = 0;
    model = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      en    = ($urandom_range(0, 9) != 0);
      op    = mac_op_e'($urandom_range(0, 3));
      if (n % 50 < 10) op = MAC_ACC;
      a     = 9'($urandom);
      b     = 9'($urandom);
      shift = 4'($urandom);
      @(posedge clk); #1;
      if (en) case (op)
        MAC_MUL: model = sx9(a) * sx9(b);
        MAC_ACC: model = model + sx9(a) * sx9(b);
        MAC_CLR: model = 0;
        default: ;
      endcase
      model = model & ((64'd1 << 26) - 1);
      if (model >= (64'd1 << 25)) model = model - (64'd1 << 26);
      checks += 2;
      if (longint'($signed(acc)) != model) begin
        failures++;
        if (failures < 10) $display("FAIL acc %0d expected %0d", $signed(acc), model);
      end
      if (y != 16'(model >>> shift)) begin
        failures++;
        if (failures < 10) $display("FAIL y %h expected %h", y, 16'(model >>> shift));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
