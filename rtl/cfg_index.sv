// cfg_index: configuration memory index.
//
// 256 entries, one per value of the 8-bit index address of a custom
// instruction; each holds the configuration memory address of a context-set
// header. Written by the control RISC, read by the configuration control with
// one cycle of latency. Reset clears the entries so an unused index points to
// address 0. The 8-bit index follows the published custom instruction format.
module cfg_index
  import rp_pkg::*;
#(
  parameter int unsigned IW = 8,
  parameter int unsigned AW = 12
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [IW-1:0] waddr,
  input  logic [AW-1:0] wdata,
  input  logic          re,
  input  logic [IW-1:0] raddr,
  output logic [AW-1:0] rdata
);
  logic [AW-1:0] idx [2**IW];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 2**IW; i++) idx[i] <= '0;
      rdata <= '0;
    end else begin
      if (we) idx[waddr] <= wdata;
      if (re) rdata <= idx[raddr];
    end
  end
endmodule
