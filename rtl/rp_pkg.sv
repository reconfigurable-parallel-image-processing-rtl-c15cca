// rp_pkg: shared constants and types of the reconfigurable image processor.
//
// The processor is an array of coarse-grain processing elements (PEs), each
// sitting on its own image data memory, driven by per-cycle "contexts" held in
// ring configuration register files. This package fixes the word formats that
// more than one module decodes:
//   * the 40-bit configuration bus that fills every ring register file,
//   * the 76-bit branch configuration word (field positions as published for
//     the branch control unit: End, Default Context, two Jump Conditions),
//   * the 80-bit PE configuration word (its width is published, its field
//     layout is this design's own),
//   * the 16-bit custom instruction (index address in [15:8], number of
//     context sets in [7:0], as published),
//   * the context-set header held in configuration memory (own layout).
package rp_pkg;

  // ---------------------------------------------------------------- widths
  localparam int DATA_W     = 16;  // PE datapath width
  localparam int CFG_BUS_W  = 40;  // configuration bus width
  localparam int PE_CFG_W   = 80;  // PE configuration word (one context)
  localparam int BR_CFG_W   = 76;  // branch configuration word (one context)
  localparam int NUM_JCR    = 16;  // jump condition registers
  localparam int NET_PORTS  = 4;   // network input ports per PE
  localparam int NET_SEL_W  = 5;   // select code width of one network port
  localparam int MAC_IN_W   = 9;   // MAC operand width
  localparam int MAC_ACC_W  = 26;  // MAC accumulator width
  localparam int CI_W       = 16;  // custom instruction width
  localparam int CTXF_W     = 5;   // context number field in branch words

  // ------------------------------------------------------ configuration bus
  typedef enum logic [1:0] {
    TGT_BRANCH = 2'd0,
    TGT_PE     = 2'd1,
    TGT_NET    = 2'd2,
    TGT_NONE   = 2'd3
  } cfg_tgt_e;

  // One beat on the configuration bus. A context word wider than the bus is
  // written in beats: beat 0 carries bits [39:0], beat 1 bits [79:40].
  typedef struct packed {
    logic           we;
    cfg_tgt_e       tgt;
    logic           bcast;   // TGT_PE: write every PE at once
    logic [3:0]     pe;      // TGT_PE and !bcast: which PE
    logic [5:0]     addr;    // ring register file entry (context address)
    logic           beat;
    logic [CFG_BUS_W-1:0] data;
  } cfg_bus_t;

  // --------------------------------------------------- network data word
  typedef struct packed {
    logic              carry;
    logic [DATA_W-1:0] data;
  } net_word_t;

  // ---------------------------------------------------------------- PE word
  typedef enum logic [2:0] {
    SRC_RA  = 3'd0,  // register file read port A
    SRC_RB  = 3'd1,  // register file read port B
    SRC_N0  = 3'd2,  // network input port 0
    SRC_N1  = 3'd3,
    SRC_N2  = 3'd4,
    SRC_N3  = 3'd5,
    SRC_IMM = 3'd6,  // immediate field
    SRC_OUT = 3'd7   // this PE's own output register
  } src_e;

  typedef enum logic [3:0] {
    ALU_ADD = 4'd0,  ALU_ADC = 4'd1,  ALU_SUB = 4'd2,  ALU_SBB = 4'd3,
    ALU_AND = 4'd4,  ALU_OR  = 4'd5,  ALU_XOR = 4'd6,  ALU_PASS = 4'd7,
    ALU_SHL = 4'd8,  ALU_SHR = 4'd9,  ALU_SRA = 4'd10, ALU_MIN = 4'd11,
    ALU_MAX = 4'd12, ALU_ABSD = 4'd13, ALU_GTU = 4'd14, ALU_EQ = 4'd15
  } alu_op_e;

  typedef enum logic [1:0] {
    MAC_HOLD = 2'd0,  // accumulator unchanged
    MAC_MUL  = 2'd1,  // acc = a*b
    MAC_ACC  = 2'd2,  // acc = acc + a*b
    MAC_CLR  = 2'd3   // acc = 0
  } mac_op_e;

  typedef enum logic [1:0] {
    WS_ALU = 2'd0,   // ALU result
    WS_MAC = 2'd1,   // shifted MAC accumulator, lower 16 bits
    WS_N0  = 2'd2,   // network port 0 (typically memory read data)
    WS_IMM = 2'd3    // immediate
  } wsel_e;

  typedef enum logic [1:0] {
    MEM_NOP = 2'd0,
    MEM_RD  = 2'd1,  // read  mem[rf[ra] + imm]
    MEM_WR  = 2'd2,  // write mem[rf[ra] + imm] = rf[rb]
    MEM_RSV = 2'd3
  } mem_op_e;

  typedef struct packed {
    logic [18:0]       rsvd;
    alu_op_e           alu_op;
    src_e              alu_a;
    src_e              alu_b;
    mac_op_e           mac_op;
    src_e              mac_a;
    src_e              mac_b;
    logic [3:0]        mac_shift;
    logic [3:0]        ra;
    logic [3:0]        rb;
    logic [3:0]        rd;
    logic              rd_we;
    wsel_e             rd_src;
    mem_op_e           mem_op;
    logic              out_we;   // load the network output register with the ALU result
    logic              jcr_we;   // write the ALU result to a jump condition register
    logic [3:0]        jcr_idx;
    logic [DATA_W-1:0] imm;
  } pe_cfg_t;

  // ------------------------------------------------------------ branch word
  // Operation codes of a jump condition term (this design's encoding).
  typedef enum logic [2:0] {
    JOP_TRUE  = 3'd0,  // term always true
    JOP_EQ    = 3'd1,  // JCR == condition
    JOP_NE    = 3'd2,
    JOP_LTU   = 3'd3,  // JCR <  condition
    JOP_GEU   = 3'd4,
    JOP_GTU   = 3'd5,
    JOP_LEU   = 3'd6,
    JOP_FALSE = 3'd7   // term never true: jump disabled
  } jop_e;

  // Bits 34..0 of one jump condition, as published.
  typedef struct packed {
    logic [15:0]       cond;   // 34..19 jump condition value
    logic [CTXF_W-1:0] jctx;   // 18..14 jump context
    logic [3:0]        reg0;   // 13..10
    jop_e              op0;    //  9..7
    logic [3:0]        reg1;   //  6..3
    jop_e              op1;    //  2..0
  } jcond_t;

  // Bits 75..0 of the branch configuration register, as published.
  typedef struct packed {
    logic              last;   // 75    End of the context set
    logic [CTXF_W-1:0] dflt;   // 74..70 default next context
    jcond_t            jc0;    // 69..35
    jcond_t            jc1;    // 34..0
  } br_cfg_t;

  // --------------------------------------------------- custom instruction
  typedef struct packed {
    logic [7:0] idx;   // configuration memory index address
    logic [7:0] nsets; // number of context sets
  } custom_instr_t;

  // ------------------------------------------------- context-set header
  typedef struct packed {
    logic [16:0] rsvd;
    logic [15:0] nwords;   // configuration words that follow (= clock cycles of transfer)
    logic        bcast;    // PE words are broadcast to all PEs
    logic [5:0]  nctx;     // contexts in the set
  } cs_header_t;

  // Configuration words per context in a context set.
  function automatic int unsigned words_per_ctx(input logic bcast, input int unsigned npe);
    return bcast ? 6 : (4 + 2 * npe);
  endfunction

  // Evaluate one jump condition term.
  function automatic logic jterm(input jop_e op, input logic [15:0] r, input logic [15:0] c);
    unique case (op)
      JOP_TRUE:  return 1'b1;
      JOP_EQ:    return r == c;
      JOP_NE:    return r != c;
      JOP_LTU:   return r <  c;
      JOP_GEU:   return r >= c;
      JOP_GTU:   return r >  c;
      JOP_LEU:   return r <= c;
      default:   return 1'b0;
    endcase
  endfunction

endpackage
