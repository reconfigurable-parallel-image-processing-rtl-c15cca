// control_risc: control RISC processor for reconfiguration.
//
// A three-stage pipeline (fetch, decode/register read, execute/write-back)
// with 16 x 32-bit registers (r0 reads as zero) and its own instruction
// memory, loaded through the imem_* port while 'run' is low. Arithmetic
// results are forwarded from execute to decode, so back-to-back dependent
// instructions need no stall; a taken branch or jump (resolved in execute)
// discards the two younger instructions.
//
// Besides ordinary arithmetic it executes configuration instructions, which
// write the configuration memory, its index and the function table, and
// image processing instructions. CUST looks up the function table, the
// programmable decode stage that maps an instruction to a 16-bit custom
// instruction {index address, number of context sets}, and hands it to the
// PE array (valid/ready; the pipeline stalls while not ready). Data
// dependencies between the PE array and the RISC pipeline are protected by
// what the program states: CUST with imm[8] set, or a SYNC, holds the
// pipeline until the array reports idle, while CUST without it lets RISC
// work continue in parallel with image processing.
// Published: fetch, decode, function table, 3-stage pipeline, the three
// instruction classes, 16-bit custom instruction, dependency protection by
// the program. ISA encoding (risc_pkg), register count and handshakes are
// this design's own.
module control_risc
  import rp_pkg::*;
  import risc_pkg::*;
#(
  parameter int unsigned IM_AW = 12,
  parameter int unsigned CM_AW = 12
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 run,
  output logic                 halted,
  // instruction memory load port
  input  logic                 imem_we,
  input  logic [IM_AW-1:0]     imem_waddr,
  input  logic [31:0]          imem_wdata,
  // general I/O
  input  logic [31:0]          io_in,
  output logic [31:0]          io_out,
  output logic                 io_out_valid,
  // configuration instructions
  output logic                 cm_we,
  output logic [CM_AW-1:0]     cm_waddr,
  output logic [CFG_BUS_W-1:0] cm_wdata,
  output logic                 idx_we,
  output logic [7:0]           idx_waddr,
  output logic [CM_AW-1:0]     idx_wdata,
  // custom instructions to the PE array
  output logic                 ci_valid,
  output logic [CI_W-1:0]      ci_data,
  input  logic                 ci_ready,
  input  logic                 pe_busy,
  output logic                 dep_stall      // pipeline held for a PE-array dependency
);
  logic [31:0]     imem [2**IM_AW];
  logic [CI_W-1:0] ftab [256];
  logic [31:0]     rf   [16];
  logic [7:0]      cfg_hi;

  // ---------------- fetch
  logic [IM_AW-1:0] pc, if_pc;
  logic [31:0]      if_ir;
  logic             if_v;

  // ---------------- decode -> execute
  logic             ex_v;
  rop_e             ex_op;
  logic [3:0]       ex_rd;
  logic [31:0]      ex_a, ex_b, ex_d;   // rs value, rt value, rd value
  logic [15:0]      ex_imm;
  logic [IM_AW-1:0] ex_pc;
  logic             cust_sent;

  // ---------------- decode
  rop_e        id_op;
  logic [3:0]  id_rd, id_rs, id_rt;
  logic [31:0] id_a, id_b, id_d;
  assign id_op = rop_e'(if_ir[31:26]);
  assign id_rd = if_ir[25:22];
  assign id_rs = if_ir[21:18];
  assign id_rt = if_ir[17:14];

  // execute results
  logic        ex_wen, ex_taken, stall;
  logic [31:0] ex_res;
  logic [IM_AW-1:0] ex_target;

  function automatic logic [31:0] rd_fwd(input logic [3:0] r, input logic [31:0] regv,
      input logic fv, input logic [3:0] fr, input logic [31:0] fval);
    if (r == 4'd0)          return 32'd0;
    if (fv && fr == r)      return fval;
    return regv;
  endfunction

  assign id_a = rd_fwd(id_rs, rf[id_rs], ex_v && ex_wen, ex_rd, ex_res);
  assign id_b = rd_fwd(id_rt, rf[id_rt], ex_v && ex_wen, ex_rd, ex_res);
  assign id_d = rd_fwd(id_rd, rf[id_rd], ex_v && ex_wen, ex_rd, ex_res);

  // ---------------- execute
  logic [31:0] simm;
  assign simm = {{16{ex_imm[15]}}, ex_imm};

  always_comb begin
    ex_res    = '0;
    ex_wen    = 1'b0;
    ex_taken  = 1'b0;
    ex_target = ex_pc + IM_AW'(simm);
    unique case (ex_op)
      OP_ADD:  begin ex_res = ex_a + ex_b;            ex_wen = 1'b1; end
      OP_SUB:  begin ex_res = ex_a - ex_b;            ex_wen = 1'b1; end
      OP_AND:  begin ex_res = ex_a & ex_b;            ex_wen = 1'b1; end
      OP_OR:   begin ex_res = ex_a | ex_b;            ex_wen = 1'b1; end
      OP_XOR:  begin ex_res = ex_a ^ ex_b;            ex_wen = 1'b1; end
      OP_SLL:  begin ex_res = ex_a << ex_b[4:0];      ex_wen = 1'b1; end
      OP_SRL:  begin ex_res = ex_a >> ex_b[4:0];      ex_wen = 1'b1; end
      OP_ADDI: begin ex_res = ex_a + simm;            ex_wen = 1'b1; end
      OP_LUI:  begin ex_res = {ex_imm, 16'd0};        ex_wen = 1'b1; end
      OP_ORI:  begin ex_res = ex_a | {16'd0, ex_imm}; ex_wen = 1'b1; end
      OP_IN:   begin ex_res = io_in;                  ex_wen = 1'b1; end
      OP_BEQ:  ex_taken = (ex_d == ex_a);
      OP_BNE:  ex_taken = (ex_d != ex_a);
      OP_JMP:  begin ex_taken = 1'b1; ex_target = IM_AW'(ex_imm); end
      default: ;
    endcase
    if (ex_rd == 4'd0) ex_wen = 1'b0;
  end

  // custom instruction issue and dependency stalls
  assign ci_valid  = ex_v && ex_op == OP_CUST && !cust_sent;
  assign ci_data   = ftab[ex_imm[7:0]];
  assign dep_stall = ex_v && ((ex_op == OP_SYNC && pe_busy) ||
                              (ex_op == OP_CUST && cust_sent && ex_imm[8] && pe_busy));
  assign stall     = (ex_v && ex_op == OP_CUST && !cust_sent &&
                      (!ci_ready || ex_imm[8])) || dep_stall;

  assign cm_we     = run && ex_v && !stall && ex_op == OP_CFGW;
  assign cm_waddr  = ex_a[CM_AW-1:0];
  assign cm_wdata  = {cfg_hi, ex_b};
  assign idx_we    = run && ex_v && !stall && ex_op == OP_IDXW;
  assign idx_waddr = ex_a[7:0];
  assign idx_wdata = ex_b[CM_AW-1:0];

  always_ff @(posedge clk) begin
    if (imem_we && !run) imem[imem_waddr] <= imem_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc <= '0; if_pc <= '0; if_ir <= '0; if_v <= 1'b0;
      ex_v <= 1'b0; ex_op <= OP_NOP; ex_rd <= '0; ex_a <= '0; ex_b <= '0; ex_d <= '0;
      ex_imm <= '0; ex_pc <= '0; cust_sent <= 1'b0;
      halted <= 1'b0; io_out <= '0; io_out_valid <= 1'b0; cfg_hi <= '0;
      for (int i = 0; i < 16; i++) rf[i] <= '0;
      for (int i = 0; i < 256; i++) ftab[i] <= '0;
    end else if (run && !halted) begin
      io_out_valid <= 1'b0;
      if (ci_valid && ci_ready) cust_sent <= 1'b1;
      if (!stall) begin
        cust_sent <= 1'b0;
        // execute / write back
        if (ex_v) begin
          if (ex_wen) rf[ex_rd] <= ex_res;
          unique case (ex_op)
            OP_OUT:   begin io_out <= ex_a; io_out_valid <= 1'b1; end
            OP_CFGHI: cfg_hi <= ex_a[7:0];
            OP_FTW:   ftab[ex_imm[7:0]] <= ex_a[CI_W-1:0];
            OP_HALT:  halted <= 1'b1;
            default:  ;
          endcase
        end
        if (ex_v && (ex_taken || ex_op == OP_HALT)) begin
          pc   <= ex_target;
          if_v <= 1'b0;
          ex_v <= 1'b0;
        end else begin
          // decode
          ex_v   <= if_v;
          ex_op  <= id_op;
          ex_rd  <= id_rd;
          ex_a   <= id_a;
          ex_b   <= id_b;
          ex_d   <= id_d;
          ex_imm <= if_ir[15:0];
          ex_pc  <= if_pc;
          // fetch
          if_ir <= imem[pc];
          if_pc <= pc;
          if_v  <= 1'b1;
          pc    <= pc + 1'b1;
        end
      end
    end
  end

  a_ci_stable: assert property (@(posedge clk) disable iff (!rst_n)
    ci_valid && !ci_ready |=> ci_valid && $stable(ci_data));
endmodule
