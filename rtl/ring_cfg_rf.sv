// ring_cfg_rf: ring configuration register file.
//
// Holds DEPTH contexts of WIDTH bits each. Contexts arrive over the 40-bit
// configuration bus in beats (beat 0 = bits [39:0], beat 1 = the rest), are
// written at the entry the configuration control chooses, and are read
// combinationally at the context pointer, so a new context can take effect
// every clock cycle. The file is used as a ring: configuration control fills
// entries in circular order and the branch control addresses them relative
// to the start offset of the running context set, modulo DEPTH.
// Published: 32 contexts, 40-bit bus in, 80-bit word out for a PE; the same
// structure serves the branch control and the interconnection network.
// Beat split and reset to all-zero contexts are this design's choices.
module ring_cfg_rf
  import rp_pkg::*;
#(
  parameter int unsigned WIDTH = PE_CFG_W,
  parameter int unsigned DEPTH = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic                     wbeat,
  input  logic [CFG_BUS_W-1:0]     wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);
  localparam int unsigned FULL_W = 2 * CFG_BUS_W;
  logic [FULL_W-1:0] mem [DEPTH];

  assign rdata = mem[raddr][WIDTH-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (we) begin
      if (wbeat) mem[waddr][FULL_W-1:CFG_BUS_W] <= wdata;
      else       mem[waddr][CFG_BUS_W-1:0]      <= wdata;
    end
  end

  initial assert (WIDTH <= FULL_W) else $error("ring_cfg_rf: WIDTH exceeds two bus beats");
endmodule
