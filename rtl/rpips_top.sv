// rpips_top: reconfigurable parallel image processing system.
//
// The control RISC processor and the reconfigurable image processor, wired
// as in the published system: the RISC writes configuration memory, index
// and its own function table through configuration instructions and sends
// 16-bit custom instructions to the processor; the processor reports busy
// back so the RISC program can wait on it. The image sensor and A/D
// converter layers sit above the image data memories in the 3D stack; here
// their side, port A of each block memory, is brought out as the sen_*
// arrays (one port per 32x32 block, all usable in parallel). The RISC's
// 32-bit io_in/io_out port and its instruction memory load port are brought
// out too. Status outputs expose the context pointer and the events of the
// configuration pipeline for observation.
module rpips_top
  import rp_pkg::*;
#(
  parameter int unsigned GX     = 2,
  parameter int unsigned GY     = 2,
  parameter int unsigned N_CTX  = 32,
  parameter int unsigned MEM_AW = 12,
  parameter int unsigned CM_AW  = 12,
  parameter int unsigned IM_AW  = 12
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 run,
  output logic                 halted,
  input  logic                 imem_we,
  input  logic [IM_AW-1:0]     imem_waddr,
  input  logic [31:0]          imem_wdata,
  input  logic [31:0]          io_in,
  output logic [31:0]          io_out,
  output logic                 io_out_valid,
  input  logic                 sen_en    [GX*GY],
  input  logic                 sen_we    [GX*GY],
  input  logic [MEM_AW-1:0]    sen_addr  [GX*GY],
  input  logic [DATA_W-1:0]    sen_wdata [GX*GY],
  output logic [DATA_W-1:0]    sen_rdata [GX*GY],
  output logic                 pe_busy,
  output logic                 exec_en,
  output logic [$clog2(N_CTX)-1:0] ctx_ptr,
  output logic                 cfg_stall,
  output logic                 jump_taken,
  output logic                 set_done,
  output logic                 dep_stall
);
  logic                 cm_we, idx_we, ci_valid, ci_ready;
  logic [CM_AW-1:0]     cm_waddr, idx_wdata;
  logic [CFG_BUS_W-1:0] cm_wdata;
  logic [7:0]           idx_waddr;
  logic [CI_W-1:0]      ci_data;

  control_risc #(.IM_AW(IM_AW), .CM_AW(CM_AW)) u_risc (
    .clk, .rst_n, .run, .halted,
    .imem_we, .imem_waddr, .imem_wdata,
    .io_in, .io_out, .io_out_valid,
    .cm_we, .cm_waddr, .cm_wdata,
    .idx_we, .idx_waddr, .idx_wdata,
    .ci_valid, .ci_data, .ci_ready,
    .pe_busy, .dep_stall
  );

  rip_core #(.GX(GX), .GY(GY), .N_CTX(N_CTX), .MEM_AW(MEM_AW), .CM_AW(CM_AW)) u_core (
    .clk, .rst_n,
    .ci_valid, .ci_data, .ci_ready,
    .cm_we, .cm_waddr, .cm_wdata,
    .idx_we, .idx_waddr, .idx_wdata,
    .sen_en, .sen_we, .sen_addr, .sen_wdata, .sen_rdata,
    .busy(pe_busy), .exec_en, .ctx_ptr, .cfg_stall, .jump_taken, .set_done
  );
endmodule
