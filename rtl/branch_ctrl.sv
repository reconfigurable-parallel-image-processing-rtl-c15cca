// branch_ctrl: branch control unit.
//
// Sequences the contexts of a running context set and broadcasts the context
// pointer to every PE, to the interconnection network and (through them) to
// the memories. It owns its own ring configuration register file of 76-bit
// branch words (layout as published: End bit 75, Default Context 74..70,
// Jump Condition 0 69..35, Jump Condition 1 34..0) and 16 jump condition
// registers (JCRs) written by the PEs.
//
// Operation: 'start' with 'start_offset' (the ring address of the set's first
// context) makes context 0 of the set current. Each cycle while busy the
// current context executes (exec_en = 1) and its branch word picks the
// context executed in the next cycle:
//   End set                -> the set finishes ('done' pulses, busy drops),
//   jump condition 0 holds -> its jump context,
//   else condition 1 holds -> its jump context,
//   else                   -> the default context.
// A jump condition holds when both of its terms hold; a term compares
// JCR[register] with the 16-bit condition value using its 3-bit operation
// (encoding in rp_pkg::jop_e: true, ==, !=, <, >=, >, <=, false). Context
// numbers are relative to the start offset and wrap around the ring.
// JCR writes take effect for the branch decision of the next cycle.
// The published format carries two jump conditions per context; the
// two-term operation semantics are this design's reading of it.
module branch_ctrl
  import rp_pkg::*;
#(
  parameter int unsigned N_CTX = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // configuration bus beats addressed to the branch ring register file
  input  logic                     cfg_we,
  input  logic [$clog2(N_CTX)-1:0] cfg_addr,
  input  logic                     cfg_beat,
  input  logic [CFG_BUS_W-1:0]     cfg_data,
  // start of a context set, from execution control
  input  logic                     start,
  input  logic [$clog2(N_CTX)-1:0] start_offset,
  output logic                     busy,
  output logic                     done,
  // context pointer broadcast
  output logic [$clog2(N_CTX)-1:0] ctx_ptr,
  output logic                     exec_en,
  // jump condition register writes from the PE array
  input  logic                     jcr_we,
  input  logic [3:0]               jcr_idx,
  input  logic [DATA_W-1:0]        jcr_data,
  // statistics: jumps taken through a jump condition
  output logic                     jump_taken
);
  localparam int unsigned CW = $clog2(N_CTX);

  logic [DATA_W-1:0] jcr [NUM_JCR];
  logic [CW-1:0]     base;
  logic [CW-1:0]     ctx;       // context number relative to base
  logic [BR_CFG_W-1:0] word;
  br_cfg_t           bw;
  logic              c0, c1;
  logic [CW-1:0]     next_ctx;

  ring_cfg_rf #(.WIDTH(BR_CFG_W), .DEPTH(N_CTX)) u_ring (
    .clk, .rst_n,
    .we(cfg_we), .waddr(cfg_addr), .wbeat(cfg_beat), .wdata(cfg_data),
    .raddr(ctx_ptr), .rdata(word)
  );

  assign bw      = br_cfg_t'(word);
  assign ctx_ptr = base + ctx;
  assign exec_en = busy;

  assign c0 = jterm(bw.jc0.op0, jcr[bw.jc0.reg0], bw.jc0.cond) &&
              jterm(bw.jc0.op1, jcr[bw.jc0.reg1], bw.jc0.cond);
  assign c1 = jterm(bw.jc1.op0, jcr[bw.jc1.reg0], bw.jc1.cond) &&
              jterm(bw.jc1.op1, jcr[bw.jc1.reg1], bw.jc1.cond);

  always_comb begin
    if (c0)      next_ctx = CW'(bw.jc0.jctx);
    else if (c1) next_ctx = CW'(bw.jc1.jctx);
    else         next_ctx = CW'(bw.dflt);
  end

  assign jump_taken = busy && !bw.last && (c0 || c1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      base <= '0;
      ctx  <= '0;
      for (int i = 0; i < NUM_JCR; i++) jcr[i] <= '0;
    end else begin
      done <= 1'b0;
      if (jcr_we) jcr[jcr_idx] <= jcr_data;
      if (busy) begin
        if (bw.last) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          ctx <= next_ctx;
        end
      end else if (start) begin
        busy <= 1'b1;
        base <= start_offset;
        ctx  <= '0;
      end
    end
  end

  a_start_when_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
endmodule
