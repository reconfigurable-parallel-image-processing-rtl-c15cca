// ic_network: MUX-based interconnection network of the PE array.
//
// The image is split into GX x GY blocks, one PE and one image data memory
// per block. Each memory's read data and each PE's output register fan out
// to the block itself and its eight neighbours; each PE has NET_PORTS (4)
// input ports, and each port is a 5-bit select MUX over 18 sources:
//   0..8  memory read data of block (self, N, NE, E, SE, S, SW, W, NW)
//   9..17 PE output (data and carry) of the same nine blocks
//   other or a neighbour outside the array -> zero.
// North is y-1, east is x+1; PE index = y*GX + x. The network's own ring
// configuration register file holds one 5-bit select per PE port per
// context (4 PEs x 4 ports x 5 bits = 80 bits for the 2x2 array) and is
// read at the broadcast context pointer, so routing can change every cycle.
// Only adjacent blocks are connected, so the array scales to larger images.
// Published: MUX network, neighbour-only links, four 16-bit data-and-carry
// inputs per PE, ring configuration register. Source numbering and select
// width are this design's own. Combinational from sources to PE inputs.
module ic_network
  import rp_pkg::*;
#(
  parameter int unsigned GX    = 2,
  parameter int unsigned GY    = 2,
  parameter int unsigned N_CTX = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     cfg_we,
  input  logic [$clog2(N_CTX)-1:0] cfg_addr,
  input  logic                     cfg_beat,
  input  logic [CFG_BUS_W-1:0]     cfg_data,
  input  logic [$clog2(N_CTX)-1:0] ctx_ptr,
  input  logic [DATA_W-1:0]        mem_rdata [GX*GY],
  input  net_word_t                pe_out    [GX*GY],
  output net_word_t                pe_in     [GX*GY][NET_PORTS]
);
  localparam int unsigned NPE   = GX * GY;
  localparam int unsigned SEL_W = NPE * NET_PORTS * NET_SEL_W;

  logic [SEL_W-1:0] sel_word;

  ring_cfg_rf #(.WIDTH(SEL_W), .DEPTH(N_CTX)) u_ring (
    .clk, .rst_n,
    .we(cfg_we), .waddr(cfg_addr), .wbeat(cfg_beat), .wdata(cfg_data),
    .raddr(ctx_ptr), .rdata(sel_word)
  );

  // neighbour offsets in source order
  localparam int DX [9] = '{0, 0, 1, 1, 1, 0, -1, -1, -1};
  localparam int DY [9] = '{0, -1, -1, 0, 1, 1, 1, 0, -1};

  always_comb begin
    for (int p = 0; p < NPE; p++) begin
      for (int q = 0; q < NET_PORTS; q++) begin
        logic [NET_SEL_W-1:0] s;
        int d, nx, ny;
        s  = sel_word[(p*NET_PORTS+q)*NET_SEL_W +: NET_SEL_W];
        pe_in[p][q] = '0;
        d  = (s < 9) ? int'(s) : int'(s) - 9;
        nx = int'(p % GX) + DX[d % 9];
        ny = int'(p / GX) + DY[d % 9];
        if (s < 18 && nx >= 0 && nx < int'(GX) && ny >= 0 && ny < int'(GY)) begin
          if (s < 9) pe_in[p][q] = '{carry: 1'b0, data: mem_rdata[ny*GX + nx]};
          else       pe_in[p][q] = pe_out[ny*GX + nx];
        end
      end
    end
  end

  initial assert (SEL_W <= 2 * CFG_BUS_W)
    else $error("ic_network: select word wider than two configuration beats");
endmodule
