// pe_alu: 16-bit ALU of a processing element.
//
// Combinational. Sixteen operations selected by the context's alu_op field:
// add/subtract with and without carry (borrow), bitwise logic, pass, shifts
// by b[3:0], unsigned min/max, absolute difference (for matching costs) and
// two compares that return 1/0. cout is the adder carry (for SUB/SBB the
// carry is 1 when no borrow occurred); it is 0 for the other operations.
// The 16-bit width and the carry that travels with data through the network
// follow the published PE diagram; the operation set is this design's own.
module pe_alu
  import rp_pkg::*;
(
  input  alu_op_e           op,
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  input  logic              cin,
  output logic [DATA_W-1:0] y,
  output logic              cout
);
  logic [DATA_W:0] sum;

  always_comb begin
    sum  = '0;
    y    = '0;
    cout = 1'b0;
    unique case (op)
      ALU_ADD:  begin sum = {1'b0, a} + {1'b0, b};               y = sum[DATA_W-1:0]; cout = sum[DATA_W]; end
      ALU_ADC:  begin sum = {1'b0, a} + {1'b0, b} + {16'd0, cin}; y = sum[DATA_W-1:0]; cout = sum[DATA_W]; end
      ALU_SUB:  begin sum = {1'b0, a} + {1'b0, ~b} + 17'd1;       y = sum[DATA_W-1:0]; cout = sum[DATA_W]; end
      ALU_SBB:  begin sum = {1'b0, a} + {1'b0, ~b} + {16'd0, cin}; y = sum[DATA_W-1:0]; cout = sum[DATA_W]; end
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_XOR:  y = a ^ b;
      ALU_PASS: y = a;
      ALU_SHL:  y = a << b[3:0];
      ALU_SHR:  y = a >> b[3:0];
      ALU_SRA:  y = DATA_W'($signed(a) >>> b[3:0]);
      ALU_MIN:  y = (a < b) ? a : b;
      ALU_MAX:  y = (a > b) ? a : b;
      ALU_ABSD: y = (a > b) ? a - b : b - a;
      ALU_GTU:  y = {15'd0, a > b};
      ALU_EQ:   y = {15'd0, a == b};
      default:  y = '0;
    endcase
  end
endmodule
