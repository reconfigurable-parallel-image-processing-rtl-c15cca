// rip_core: the reconfigurable image processor.
//
// A GX x GY array of processing elements, each tightly coupled to its own
// dual-port image data memory (one block of the image per PE), joined by the
// MUX interconnection network, and driven by the hierarchical multi-context
// configuration machinery:
//
//   custom instruction -> configuration control -> index -> header ->
//   configuration words on the 40-bit bus -> ring configuration register
//   files (branch control, every PE, network) -> executable FIFO ->
//   execution control -> branch control -> context pointer broadcast.
//
// Configuration of the next context set overlaps execution of the current
// one as long as the 32-entry rings have room. Port A of every image memory
// is brought out as the image sensor interface (frame in, results out).
// Jump condition register writes from several PEs in one cycle are resolved
// in favour of the lowest-numbered PE (this design's choice).
// Published configuration: 2x2 PEs for a 64x64 image (32x32 pixels per PE),
// 32 contexts, 16-bit custom instruction, 40-bit configuration bus.
module rip_core
  import rp_pkg::*;
#(
  parameter int unsigned GX     = 2,
  parameter int unsigned GY     = 2,
  parameter int unsigned N_CTX  = 32,
  parameter int unsigned MEM_AW = 12,
  parameter int unsigned CM_AW  = 12
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // custom instruction from the control RISC
  input  logic                 ci_valid,
  input  logic [CI_W-1:0]      ci_data,
  output logic                 ci_ready,
  // configuration memory and index write ports (configuration instructions)
  input  logic                 cm_we,
  input  logic [CM_AW-1:0]     cm_waddr,
  input  logic [CFG_BUS_W-1:0] cm_wdata,
  input  logic                 idx_we,
  input  logic [7:0]           idx_waddr,
  input  logic [CM_AW-1:0]     idx_wdata,
  // image sensor interface: port A of each block memory
  input  logic                 sen_en    [GX*GY],
  input  logic                 sen_we    [GX*GY],
  input  logic [MEM_AW-1:0]    sen_addr  [GX*GY],
  input  logic [DATA_W-1:0]    sen_wdata [GX*GY],
  output logic [DATA_W-1:0]    sen_rdata [GX*GY],
  // status
  output logic                 busy,
  output logic                 exec_en,
  output logic [$clog2(N_CTX)-1:0] ctx_ptr,
  output logic                 cfg_stall,    // configuration waits for free ring entries
  output logic                 jump_taken,
  output logic                 set_done
);
  localparam int unsigned NPE = GX * GY;
  localparam int unsigned CW  = $clog2(N_CTX);

  // configuration memory and index
  logic                 idx_re, cm_re;
  logic [7:0]           idx_raddr;
  logic [CM_AW-1:0]     idx_rdata, cm_raddr;
  logic [CFG_BUS_W-1:0] cm_rdata;
  cfg_bus_t             cfg;

  cfg_index #(.IW(8), .AW(CM_AW)) u_idx (
    .clk, .rst_n, .we(idx_we), .waddr(idx_waddr), .wdata(idx_wdata),
    .re(idx_re), .raddr(idx_raddr), .rdata(idx_rdata)
  );

  cfg_memory #(.AW(CM_AW)) u_cm (
    .clk, .we(cm_we), .waddr(cm_waddr), .wdata(cm_wdata),
    .re(cm_re), .raddr(cm_raddr), .rdata(cm_rdata)
  );

  // configuration control, FIFO, execution control
  logic          f_push, f_pop, f_empty, f_full;
  logic [CW-1:0] f_start;
  logic [6:0]    f_nctx;
  logic [CW+6:0] f_dout;
  logic          rel_valid;
  logic [6:0]    rel_nctx;
  logic          cc_busy, ex_running;
  logic [3:0]    f_count;
  logic          br_start, br_busy, br_done;
  logic [CW-1:0] br_offset;

  cfg_control #(.NPE(NPE), .N_CTX(N_CTX), .CM_AW(CM_AW)) u_cc (
    .clk, .rst_n,
    .ci_valid, .ci_data, .ci_ready,
    .idx_re, .idx_raddr, .idx_rdata,
    .cm_re, .cm_raddr, .cm_rdata,
    .cfg,
    .fifo_push(f_push), .fifo_start(f_start), .fifo_nctx(f_nctx), .fifo_full(f_full),
    .rel_valid, .rel_nctx,
    .busy(cc_busy), .stall_full(cfg_stall)
  );

  ctx_fifo #(.W(CW + 7), .DEPTH(8)) u_fifo (
    .clk, .rst_n,
    .push(f_push), .din({f_start, f_nctx}),
    .pop(f_pop), .dout(f_dout),
    .empty(f_empty), .full(f_full), .count(f_count)
  );

  exec_control #(.N_CTX(N_CTX)) u_ex (
    .clk, .rst_n,
    .fifo_empty(f_empty), .head_start(f_dout[CW+6:7]), .head_nctx(f_dout[6:0]),
    .fifo_pop(f_pop),
    .br_busy, .br_done, .br_start, .br_offset,
    .rel_valid, .rel_nctx, .running(ex_running)
  );

  // branch control
  logic              jcr_we;
  logic [3:0]        jcr_idx;
  logic [DATA_W-1:0] jcr_data;

  branch_ctrl #(.N_CTX(N_CTX)) u_br (
    .clk, .rst_n,
    .cfg_we(cfg.we && cfg.tgt == TGT_BRANCH), .cfg_addr(cfg.addr[CW-1:0]),
    .cfg_beat(cfg.beat), .cfg_data(cfg.data),
    .start(br_start), .start_offset(br_offset),
    .busy(br_busy), .done(br_done),
    .ctx_ptr, .exec_en,
    .jcr_we, .jcr_idx, .jcr_data,
    .jump_taken
  );

  assign busy     = cc_busy || !f_empty || ex_running || br_busy;
  assign set_done = br_done;

  // PE array, memories, network
  net_word_t         pe_out [NPE];
  net_word_t         pe_in  [NPE][NET_PORTS];
  logic [DATA_W-1:0] mem_q  [NPE];
  logic              p_jwe  [NPE];
  logic [3:0]        p_jidx [NPE];
  logic [DATA_W-1:0] p_jdat [NPE];

  ic_network #(.GX(GX), .GY(GY), .N_CTX(N_CTX)) u_net (
    .clk, .rst_n,
    .cfg_we(cfg.we && cfg.tgt == TGT_NET), .cfg_addr(cfg.addr[CW-1:0]),
    .cfg_beat(cfg.beat), .cfg_data(cfg.data),
    .ctx_ptr, .mem_rdata(mem_q), .pe_out, .pe_in
  );

  for (genvar i = 0; i < NPE; i++) begin : g_pe
    logic              m_en, m_we;
    logic [MEM_AW-1:0] m_addr;
    logic [DATA_W-1:0] m_wdata;

    pe #(.N_CTX(N_CTX), .MEM_AW(MEM_AW)) u_pe (
      .clk, .rst_n,
      .cfg_we(cfg.we && cfg.tgt == TGT_PE && (cfg.bcast || cfg.pe == 4'(i))),
      .cfg_addr(cfg.addr[CW-1:0]), .cfg_beat(cfg.beat), .cfg_data(cfg.data),
      .ctx_ptr, .en(exec_en),
      .net_in(pe_in[i]), .net_out(pe_out[i]),
      .mem_en(m_en), .mem_we(m_we), .mem_addr(m_addr), .mem_wdata(m_wdata),
      .jcr_we(p_jwe[i]), .jcr_idx(p_jidx[i]), .jcr_data(p_jdat[i])
    );

    image_mem #(.AW(MEM_AW)) u_mem (
      .clk,
      .a_en(sen_en[i]), .a_we(sen_we[i]), .a_addr(sen_addr[i]),
      .a_wdata(sen_wdata[i]), .a_rdata(sen_rdata[i]),
      .b_en(m_en), .b_we(m_we), .b_addr(m_addr), .b_wdata(m_wdata), .b_rdata(mem_q[i])
    );
  end

  // lowest-numbered PE wins a jump condition register write
  always_comb begin
    jcr_we   = 1'b0;
    jcr_idx  = '0;
    jcr_data = '0;
    for (int i = NPE - 1; i >= 0; i--) begin
      if (p_jwe[i]) begin
        jcr_we   = 1'b1;
        jcr_idx  = p_jidx[i];
        jcr_data = p_jdat[i];
      end
    end
  end
endmodule
