// image_mem: dual-port image data memory of one image block.
//
// Port A faces the image sensor interface (frame input and result readout),
// port B faces the PE through its memory access interface. Both ports are
// synchronous: a read returns data on the clock edge after the request.
// A write on either port updates the array; when both ports write the same
// word in one cycle port B (the PE) wins. Published: one dual-port memory per
// PE holding a 32x32-pixel block; word width and depth are this design's
// choice (16-bit words, 4096 words = four 32x32 planes for image, working and
// result data).
module image_mem
  import rp_pkg::*;
#(
  parameter int unsigned AW = 12
) (
  input  logic              clk,
  input  logic              a_en,
  input  logic              a_we,
  input  logic [AW-1:0]     a_addr,
  input  logic [DATA_W-1:0] a_wdata,
  output logic [DATA_W-1:0] a_rdata,
  input  logic              b_en,
  input  logic              b_we,
  input  logic [AW-1:0]     b_addr,
  input  logic [DATA_W-1:0] b_wdata,
  output logic [DATA_W-1:0] b_rdata
);
  logic [DATA_W-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (a_en && a_we && !(b_en && b_we && b_addr == a_addr)) mem[a_addr] <= a_wdata;
    if (b_en && b_we) mem[b_addr] <= b_wdata;
    if (a_en) a_rdata <= mem[a_addr];
    if (b_en) b_rdata <= mem[b_addr];
  end
endmodule
