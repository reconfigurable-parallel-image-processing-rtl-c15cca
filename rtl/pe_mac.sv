// pe_mac: multiply-accumulate unit of a processing element, with its shifter.
//
// Two 9-bit signed operands (bit 8 is the sign, so an 8-bit pixel extended
// with a zero bit is non-negative) are multiplied and either loaded into or
// added to a 26-bit accumulator. The accumulator is shifted right
// arithmetically by 'shift' and the lower 16 bits are offered to the register
// file. The 9-bit inputs, the 26-bit path, the shifter and the "lower 16 bit"
// output are as published for the PE; signed arithmetic and the
// hold/mul/acc/clear operations are this design's choice.
// Timing: the accumulator is updated on the clock edge when en is high;
// 'y' is combinational from the accumulator already held.
module pe_mac
  import rp_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  mac_op_e               op,
  input  logic [MAC_IN_W-1:0]   a,
  input  logic [MAC_IN_W-1:0]   b,
  input  logic [3:0]            shift,
  output logic [MAC_ACC_W-1:0]  acc,
  output logic [DATA_W-1:0]     y
);
  logic signed [2*MAC_IN_W-1:0] prod;
  logic signed [MAC_ACC_W-1:0]  shifted;

  assign prod    = $signed(a) * $signed(b);
  assign shifted = $signed(acc) >>> shift;
  assign y       = shifted[DATA_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) acc <= '0;
    else if (en) begin
      unique case (op)
        MAC_MUL:  acc <= MAC_ACC_W'(prod);
        MAC_ACC:  acc <= acc + MAC_ACC_W'(prod);
        MAC_CLR:  acc <= '0;
        default:  acc <= acc;
      endcase
    end
  end
endmodule
