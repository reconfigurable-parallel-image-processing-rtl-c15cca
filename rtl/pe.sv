// pe: coarse-grain processing element with a ring configuration register file.
//
// Each clock cycle in which the array executes (en = 1) the PE reads the
// 80-bit context at the broadcast context pointer from its own ring
// configuration register file and carries it out in one cycle:
//   * the ALU operates on two operands chosen from register ports A/B, the
//     four network inputs, the immediate or the PE's own output register,
//   * the MAC multiplies two 9-bit operands into its 26-bit accumulator
//     (hold / multiply / accumulate / clear) and offers the shifted lower
//     16 bits,
//   * the register file may write back the ALU result, the MAC output,
//     network port 0 or the immediate,
//   * the memory access interface may issue a read or write of
//     mem[rf[ra] + imm] (read data come back through the network a cycle
//     later),
//   * the output register towards the network may load the ALU result and
//     its carry, and the ALU result may be written to a jump condition
//     register of the branch control.
// The carry input of ADC/SBB is the carry of the network port chosen as
// operand A, otherwise the PE's carry flag, which every ALU operation
// updates. When en = 0 no state changes.
// The block structure (MAC with 9-bit inputs and 26-bit result, shifter,
// ALU with 16-bit inputs, 16x16 register file, memory access interface,
// 32-context ring register file fed by a 40-bit bus and read as 80-bit
// words, four 16-bit data-and-carry network inputs) is as published; the
// context word's fields and the operand choices are this design's own.
module pe
  import rp_pkg::*;
#(
  parameter int unsigned N_CTX  = 32,
  parameter int unsigned MEM_AW = 12
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // configuration bus beats addressed to this PE
  input  logic                     cfg_we,
  input  logic [$clog2(N_CTX)-1:0] cfg_addr,
  input  logic                     cfg_beat,
  input  logic [CFG_BUS_W-1:0]     cfg_data,
  // context pointer broadcast
  input  logic [$clog2(N_CTX)-1:0] ctx_ptr,
  input  logic                     en,
  // interconnection network
  input  net_word_t                net_in [NET_PORTS],
  output net_word_t                net_out,
  // image data memory port
  output logic                     mem_en,
  output logic                     mem_we,
  output logic [MEM_AW-1:0]        mem_addr,
  output logic [DATA_W-1:0]        mem_wdata,
  // jump condition register write
  output logic                     jcr_we,
  output logic [3:0]               jcr_idx,
  output logic [DATA_W-1:0]        jcr_data
);
  logic [PE_CFG_W-1:0] word;
  pe_cfg_t             c;
  logic [DATA_W-1:0]   qa, qb, alu_a, alu_b, alu_y, mac_y, wd;
  logic [DATA_W-1:0]   mac_a16, mac_b16;
  logic                alu_cout, cin, carry_q;
  logic [MAC_ACC_W-1:0] acc;

  ring_cfg_rf #(.WIDTH(PE_CFG_W), .DEPTH(N_CTX)) u_ring (
    .clk, .rst_n,
    .we(cfg_we), .waddr(cfg_addr), .wbeat(cfg_beat), .wdata(cfg_data),
    .raddr(ctx_ptr), .rdata(word)
  );
  assign c = pe_cfg_t'(word);

  function automatic logic [DATA_W-1:0] operand(input src_e s, input logic [DATA_W-1:0] ra_v,
      input logic [DATA_W-1:0] rb_v, input net_word_t n [NET_PORTS],
      input logic [DATA_W-1:0] imm, input logic [DATA_W-1:0] outv);
    unique case (s)
      SRC_RA:  return ra_v;
      SRC_RB:  return rb_v;
      SRC_N0:  return n[0].data;
      SRC_N1:  return n[1].data;
      SRC_N2:  return n[2].data;
      SRC_N3:  return n[3].data;
      SRC_IMM: return imm;
      default: return outv;
    endcase
  endfunction

  assign alu_a   = operand(c.alu_a, qa, qb, net_in, c.imm, net_out.data);
  assign alu_b   = operand(c.alu_b, qa, qb, net_in, c.imm, net_out.data);
  assign mac_a16 = operand(c.mac_a, qa, qb, net_in, c.imm, net_out.data);
  assign mac_b16 = operand(c.mac_b, qa, qb, net_in, c.imm, net_out.data);

  always_comb begin
    unique case (c.alu_a)
      SRC_N0:  cin = net_in[0].carry;
      SRC_N1:  cin = net_in[1].carry;
      SRC_N2:  cin = net_in[2].carry;
      SRC_N3:  cin = net_in[3].carry;
      default: cin = carry_q;
    endcase
  end

  pe_regfile u_rf (
    .clk, .rst_n,
    .ra(c.ra), .rb(c.rb), .qa, .qb,
    .we(en && c.rd_we), .wa(c.rd), .wd
  );

  pe_alu u_alu (.op(c.alu_op), .a(alu_a), .b(alu_b), .cin, .y(alu_y), .cout(alu_cout));

  pe_mac u_mac (
    .clk, .rst_n, .en, .op(c.mac_op),
    .a(mac_a16[MAC_IN_W-1:0]), .b(mac_b16[MAC_IN_W-1:0]),
    .shift(c.mac_shift), .acc, .y(mac_y)
  );

  pe_mem_if #(.AW(MEM_AW)) u_mif (
    .en, .op(c.mem_op), .base(qa), .offset(c.imm), .wdata(qb),
    .mem_en, .mem_we, .mem_addr, .mem_wdata
  );

  always_comb begin
    unique case (c.rd_src)
      WS_ALU:  wd = alu_y;
      WS_MAC:  wd = mac_y;
      WS_N0:   wd = net_in[0].data;
      default: wd = c.imm;
    endcase
  end

  assign jcr_we   = en && c.jcr_we;
  assign jcr_idx  = c.jcr_idx;
  assign jcr_data = alu_y;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      net_out <= '0;
      carry_q <= 1'b0;
    end else if (en) begin
      carry_q <= alu_cout;
      if (c.out_we) net_out <= '{carry: alu_cout, data: alu_y};
    end
  end
endmodule
