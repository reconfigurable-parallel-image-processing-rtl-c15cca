// cfg_memory: configuration memory, 40-bit words.
//
// Holds the context sets: at the header address of each set a header word
// (number of contexts, broadcast flag, transfer length), then the set's
// configuration words in transfer order. Written by the control RISC
// through configuration instructions, read by the configuration control with
// one cycle of latency. The 40-bit width matches the published configuration
// bus; the depth (4096 words) is this design's choice.
module cfg_memory
  import rp_pkg::*;
#(
  parameter int unsigned AW = 12
) (
  input  logic                 clk,
  input  logic                 we,
  input  logic [AW-1:0]        waddr,
  input  logic [CFG_BUS_W-1:0] wdata,
  input  logic                 re,
  input  logic [AW-1:0]        raddr,
  output logic [CFG_BUS_W-1:0] rdata
);
  logic [CFG_BUS_W-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
