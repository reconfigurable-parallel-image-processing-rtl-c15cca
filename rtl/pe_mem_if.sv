// pe_mem_if: memory access interface between a PE and its image data memory.
//
// Turns the context's memory operation into a memory port request in the
// same cycle: address = base + offset (base from register port A, offset
// from the immediate), write data from register port B. The address wraps
// within the memory. Read data return one cycle later from the synchronous
// memory and reach the PE through the interconnection network, so a PE that
// reads its own block selects the "own memory" source on a network port.
// Only the block's name and position are published; the base+offset
// addressing is this design's own.
module pe_mem_if
  import rp_pkg::*;
#(
  parameter int unsigned AW = 12
) (
  input  logic              en,        // context executes this cycle
  input  mem_op_e           op,
  input  logic [DATA_W-1:0] base,
  input  logic [DATA_W-1:0] offset,
  input  logic [DATA_W-1:0] wdata,
  output logic              mem_en,
  output logic              mem_we,
  output logic [AW-1:0]     mem_addr,
  output logic [DATA_W-1:0] mem_wdata
);
  logic [DATA_W-1:0] ea;
  assign ea        = base + offset;
  assign mem_en    = en && (op == MEM_RD || op == MEM_WR);
  assign mem_we    = en && (op == MEM_WR);
  assign mem_addr  = ea[AW-1:0];
  assign mem_wdata = wdata;
endmodule
