// cfg_control: configuration control (hierarchical two-stage dispatch).
//
// Accepts a 16-bit custom instruction {index address[15:8], number of
// context sets[7:0]}. For each of the N sets it reads the configuration
// memory index at (index address + k) to get the set's header address, reads
// the header {nctx, bcast, nwords}, waits until the ring configuration
// register files have nctx free entries and the executable FIFO has room,
// then streams the nwords configuration words that follow the header onto the
// 40-bit configuration bus, one word per clock, and finally pushes {start
// address, nctx} into the executable context-set address FIFO. Ring entries
// are taken in circular order; execution control returns them (rel_valid)
// when a set has finished, so a new set is transferred while another runs.
//
// Word order inside a set, per context c: branch beat 0, branch beat 1, then
// the PE word (beats 0,1) once in broadcast mode or for PE 0..NPE-1 in turn,
// then the network word (beats 0,1). In broadcast mode every PE is written
// by the same beat, which is what shortens configuration time.
// Published: index -> header -> data hierarchy, header contents (number of
// contexts, broadcast, clock cycles for configuration), 40-bit bus, FIFO and
// the "until the register file is full" rule. Word order, header layout and
// the one-word-per-cycle streaming are this design's own.
module cfg_control
  import rp_pkg::*;
#(
  parameter int unsigned NPE   = 4,
  parameter int unsigned N_CTX = 32,
  parameter int unsigned CM_AW = 12
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // custom instruction from the control RISC
  input  logic                     ci_valid,
  input  logic [CI_W-1:0]          ci_data,
  output logic                     ci_ready,
  // configuration memory index read port
  output logic                     idx_re,
  output logic [7:0]               idx_raddr,
  input  logic [CM_AW-1:0]         idx_rdata,
  // configuration memory read port
  output logic                     cm_re,
  output logic [CM_AW-1:0]         cm_raddr,
  input  logic [CFG_BUS_W-1:0]     cm_rdata,
  // configuration bus
  output cfg_bus_t                 cfg,
  // executable context-set FIFO
  output logic                     fifo_push,
  output logic [$clog2(N_CTX)-1:0] fifo_start,
  output logic [6:0]               fifo_nctx,
  input  logic                     fifo_full,
  // contexts released by execution control
  input  logic                     rel_valid,
  input  logic [6:0]               rel_nctx,
  output logic                     busy,
  output logic                     stall_full   // waiting for free ring entries
);
  localparam int unsigned CW = $clog2(N_CTX);

  typedef enum logic [2:0] {
    CC_IDLE, CC_IDX, CC_IDXW, CC_HDR, CC_SPACE, CC_XFER, CC_PUSH
  } cc_state_e;
  cc_state_e st;

  logic [7:0]       idx_cur, sets_left;
  logic [CM_AW-1:0] hdr_addr;
  cs_header_t       hdr;
  logic [6:0]       used;
  logic [CW-1:0]    wr_ptr, set_base;
  logic [15:0]      issued, written;
  // destination of the word being issued (k) and of the word arriving (d)
  logic [6:0]       k_ctx, d_ctx;
  logic [4:0]       k_slot, d_slot;
  logic             d_valid;
  logic [4:0]       wpc;        // words per context
  logic [6:0]       free_n;
  logic [6:0]       rel_n;
  logic [CW-1:0]    d_addr;     // ring entry of the arriving word

  assign d_addr = set_base + CW'(d_ctx);

  assign wpc       = 5'(words_per_ctx(hdr.bcast, NPE));
  assign free_n    = 7'(N_CTX) - used;
  assign rel_n     = rel_valid ? rel_nctx : 7'd0;
  assign ci_ready  = (st == CC_IDLE);
  assign busy      = (st != CC_IDLE);
  assign stall_full = (st == CC_SPACE) && ({1'b0, hdr.nctx} > free_n);

  assign idx_re    = (st == CC_IDX);
  assign idx_raddr = idx_cur;
  assign cm_re     = (st == CC_IDXW) || (st == CC_XFER && issued < hdr.nwords);
  assign cm_raddr  = (st == CC_IDXW) ? idx_rdata : hdr_addr + CM_AW'(1) + CM_AW'(issued);

  assign fifo_push  = (st == CC_PUSH);
  assign fifo_start = set_base;
  assign fifo_nctx  = {1'b0, hdr.nctx};

  // decode the destination of the word that has just arrived
  always_comb begin
    int unsigned pe_words;
    cfg      = '0;
    pe_words = hdr.bcast ? 2 : 2 * NPE;
    cfg.data = cm_rdata;
    cfg.addr = 6'(d_addr);
    cfg.we   = d_valid;
    if (d_slot < 2) begin
      cfg.tgt  = TGT_BRANCH;
      cfg.beat = d_slot[0];
    end else if (32'(d_slot) < 2 + pe_words) begin
      cfg.tgt   = TGT_PE;
      cfg.bcast = hdr.bcast;
      cfg.pe    = 4'((d_slot - 5'd2) >> 1);
      cfg.beat  = d_slot[0];
    end else begin
      cfg.tgt  = TGT_NET;
      cfg.beat = d_slot[0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= CC_IDLE;
      idx_cur   <= '0;
      sets_left <= '0;
      hdr_addr  <= '0;
      hdr       <= '0;
      used      <= '0;
      wr_ptr    <= '0;
      set_base  <= '0;
      issued    <= '0;
      written   <= '0;
      k_ctx     <= '0;
      k_slot    <= '0;
      d_ctx     <= '0;
      d_slot    <= '0;
      d_valid   <= 1'b0;
    end else begin
      used    <= used - rel_n;
      d_valid <= 1'b0;
      unique case (st)
        CC_IDLE: if (ci_valid) begin
          idx_cur   <= ci_data[15:8];
          sets_left <= ci_data[7:0];
          if (ci_data[7:0] != 8'd0) st <= CC_IDX;
        end
        CC_IDX:  st <= CC_IDXW;
        CC_IDXW: begin
          hdr_addr <= idx_rdata;
          st       <= CC_HDR;
        end
        CC_HDR: begin
          hdr <= cs_header_t'(cm_rdata);
          st  <= CC_SPACE;
        end
        CC_SPACE: if ({1'b0, hdr.nctx} <= free_n && !fifo_full) begin
          used     <= used - rel_n + {1'b0, hdr.nctx};
          set_base <= wr_ptr;
          issued   <= '0;
          written  <= '0;
          k_ctx    <= '0;
          k_slot   <= '0;
          st       <= (hdr.nwords == 16'd0) ? CC_PUSH : CC_XFER;
        end
        CC_XFER: begin
          if (issued < hdr.nwords) begin
            issued  <= issued + 16'd1;
            d_valid <= 1'b1;
            d_ctx   <= k_ctx;
            d_slot  <= k_slot;
            if (k_slot == wpc - 5'd1) begin
              k_slot <= '0;
              k_ctx  <= k_ctx + 7'd1;
            end else begin
              k_slot <= k_slot + 5'd1;
            end
          end
          if (d_valid) written <= written + 16'd1;
          if (d_valid && written == hdr.nwords - 16'd1) st <= CC_PUSH;
        end
        CC_PUSH: begin
          wr_ptr    <= wr_ptr + CW'(hdr.nctx);
          idx_cur   <= idx_cur + 8'd1;
          sets_left <= sets_left - 8'd1;
          st        <= (sets_left == 8'd1) ? CC_IDLE : CC_IDX;
        end
        default: st <= CC_IDLE;
      endcase
    end
  end

  cs_header_t hdr_in;
  assign hdr_in = cs_header_t'(cm_rdata);
  a_set_fits: assert property (@(posedge clk) disable iff (!rst_n)
    (st == CC_HDR) |-> ({1'b0, hdr_in.nctx} <= 7'(N_CTX) && hdr_in.nctx != 6'd0));
  a_no_over_release: assert property (@(posedge clk) disable iff (!rst_n) rel_valid |-> rel_nctx <= used);
endmodule
