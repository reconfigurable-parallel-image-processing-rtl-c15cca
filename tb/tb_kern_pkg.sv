// tb_kern_pkg: context-set builders and reference kernels for the testbenches.
//
// A cs_builder collects the contexts of one context set (branch word, PE
// word per PE, network select word) and serialises it into configuration
// memory words: a header {nctx, bcast, nwords} followed by, per context,
// branch beats 0/1, PE beats 0/1 (once when broadcast, else per PE) and
// network beats 0/1. Three kernels are provided:
//   thr_set     binary thresholding of a 32x32 block: out[1024+i] = in[i] > T
//               (six contexts, three per pixel)
//   nbsum_set   out[2048+i] = own[i] + east_neighbour[i] + p for PE p, sent
//               per PE (not broadcast), reads the east block over the network
//   line_set    straight-line set of n contexts: sums 1..n-3 and writes the
//               sum to address 3500 (used to fill the ring)
// and a 3x3 convolution on blocks stored with a one-pixel border (34x34
// words from address 0, pixel (x,y) of the block at 35 + 34*y + x):
//   halo_edge_set    fills one border column or row from the neighbouring
//                    block over the network (zero outside the frame)
//   halo_corner_set  fills the four border corners from the diagonal blocks
//   conv_set         loads nine weights into r7..r15, then for every pixel
//                    reads its 3x3 window and multiply-accumulates it;
//                    out[2048 + 32*y + x] = (sum w*p) >>> shift
// and block-matching optical flow (frame 1 at 0, frame 2 at 1024, 32x32):
//   of_init_set   constants and pointers for the first template
//   of_match_set  full search of one 5x5 template over 12x12 displacements
//                 (dx, dy = -6..5) by sum of absolute differences; writes the
//                 best candidate index 12*(dy+6) + (dx+6) to 3072 + t and its
//                 SAD to 3136 + t (first minimum in scan order wins)
//   of_next_set   moves to the next template of the 5x5 grid (corners 6..22
//                 in steps of 4, so every search stays inside the block)
// One custom instruction runs init, then (match, next) for each template, so
// the template loop is a sequence of context-set invocations.
package tb_kern_pkg;
  import rp_pkg::*;

  localparam int NPE = 4;

  function automatic pe_cfg_t pe_nop();
    pe_cfg_t c = '0;
    c.alu_op = ALU_PASS;
    c.alu_a  = SRC_IMM;
    c.alu_b  = SRC_IMM;
    c.mac_op = MAC_HOLD;
    c.mem_op = MEM_NOP;
    return c;
  endfunction

  function automatic jcond_t jc_never();
    jcond_t j = '0;
    j.op0 = JOP_FALSE;
    j.op1 = JOP_FALSE;
    return j;
  endfunction

  function automatic br_cfg_t br_next(input int nxt);
    br_cfg_t b = '0;
    b.dflt = 5'(nxt);
    b.jc0  = jc_never();
    b.jc1  = jc_never();
    return b;
  endfunction

  function automatic br_cfg_t br_end();
    br_cfg_t b = br_next(0);
    b.last = 1'b1;
    return b;
  endfunction

  // jump to 'target' while JCR[r] != cond, else go to 'nxt'
  function automatic br_cfg_t br_loop_ne(input int r, input int cond, input int target, input int nxt);
    br_cfg_t b = br_next(nxt);
    b.jc0.cond = 16'(cond);
    b.jc0.jctx = 5'(target);
    b.jc0.reg0 = 4'(r);
    b.jc0.op0  = JOP_NE;
    b.jc0.reg1 = 4'(r);
    b.jc0.op1  = JOP_TRUE;
    return b;
  endfunction

  class cs_builder;
    bit      bcast;
    int      nctx;
    br_cfg_t br  [64];
    pe_cfg_t pe  [64][NPE];
    logic [79:0] net [64];

    function new(bit bc, int n);
      bcast = bc;
      nctx  = n;
      for (int c = 0; c < 64; c++) begin
        br[c]  = br_next(c + 1);
        net[c] = '0;
        for (int p = 0; p < NPE; p++) pe[c][p] = pe_nop();
      end
    endfunction

    function void set_all(int c, pe_cfg_t w);
      for (int p = 0; p < NPE; p++) pe[c][p] = w;
    endfunction

    function int nwords();
      return nctx * (bcast ? 6 : 4 + 2 * NPE);
    endfunction

    // append header + data words to q
    function void emit(ref logic [39:0] q[$]);
      cs_header_t h = '0;
      logic [79:0] bw;
      h.nctx   = 6'(nctx);
      h.bcast  = bcast;
      h.nwords = 16'(nwords());
      q.push_back(40'(h));
      for (int c = 0; c < nctx; c++) begin
        bw = 80'(br[c]);
        q.push_back(bw[39:0]); q.push_back(bw[79:40]);
        for (int p = 0; p < (bcast ? 1 : NPE); p++) begin
          q.push_back(pe[c][p][39:0]); q.push_back(pe[c][p][79:40]);
        end
        q.push_back(net[c][39:0]); q.push_back(net[c][79:40]);
      end
    endfunction
  endclass

  function automatic cs_builder thr_set(input int T);
    cs_builder b = new(1'b1, 6);
    pe_cfg_t w;
    // c0: r1 = 0, JCR0 = 0
    w = pe_nop(); w.rd = 4'd1; w.rd_we = 1'b1; w.rd_src = WS_IMM; w.imm = 16'd0;
    w.jcr_we = 1'b1; w.jcr_idx = 4'd0;
    b.set_all(0, w);
    // c1: out = 1 (increment constant)
    w = pe_nop(); w.imm = 16'd1; w.out_we = 1'b1;
    b.set_all(1, w);
    // c2: read in[r1]
    w = pe_nop(); w.mem_op = MEM_RD; w.ra = 4'd1; w.imm = 16'd0;
    b.set_all(2, w);
    // c3: r4 = pixel > T
    w = pe_nop(); w.alu_op = ALU_GTU; w.alu_a = SRC_N0; w.alu_b = SRC_IMM; w.imm = 16'(T);
    w.rd = 4'd4; w.rd_we = 1'b1; w.rd_src = WS_ALU;
    b.set_all(3, w);
    // c4: out[1024 + r1] = r4 ; r1 = r1 + 1 ; JCR0 = r1 + 1 ; loop
    w = pe_nop(); w.mem_op = MEM_WR; w.ra = 4'd1; w.rb = 4'd4; w.imm = 16'd1024;
    w.alu_op = ALU_ADD; w.alu_a = SRC_RA; w.alu_b = SRC_OUT;
    w.rd = 4'd1; w.rd_we = 1'b1; w.rd_src = WS_ALU; w.jcr_we = 1'b1; w.jcr_idx = 4'd0;
    b.set_all(4, w);
    b.br[4] = br_loop_ne(0, 1023, 2, 5);
    b.br[5] = br_end();
    return b;
  endfunction

  function automatic cs_builder nbsum_set();
    cs_builder b = new(1'b0, 7);
    pe_cfg_t w;
    // every context routes port 0 = own memory (0), port 1 = east memory (3)
    for (int c = 0; c < 7; c++)
      for (int p = 0; p < NPE; p++)
        b.net[c][(p*4 + 1)*5 +: 5] = 5'd3;
    w = pe_nop(); w.rd = 4'd1; w.rd_we = 1'b1; w.rd_src = WS_IMM; w.imm = 16'd0;
    w.jcr_we = 1'b1; w.jcr_idx = 4'd1;
    b.set_all(0, w);
    w = pe_nop(); w.imm = 16'd1; w.out_we = 1'b1;
    b.set_all(1, w);
    w = pe_nop(); w.mem_op = MEM_RD; w.ra = 4'd1; w.imm = 16'd0;
    b.set_all(2, w);
    w = pe_nop(); w.alu_op = ALU_ADD; w.alu_a = SRC_N0; w.alu_b = SRC_N1;
    w.rd = 4'd4; w.rd_we = 1'b1; w.rd_src = WS_ALU;
    b.set_all(3, w);
    for (int p = 0; p < NPE; p++) begin
      w = pe_nop(); w.alu_op = ALU_ADD; w.alu_a = SRC_RA; w.ra = 4'd4; w.alu_b = SRC_IMM;
      w.imm = 16'(p); w.rd = 4'd4; w.rd_we = 1'b1; w.rd_src = WS_ALU;
      b.pe[4][p] = w;
    end
    w = pe_nop(); w.mem_op = MEM_WR; w.ra = 4'd1; w.rb = 4'd4; w.imm = 16'd2048;
    w.alu_op = ALU_ADD; w.alu_a = SRC_RA; w.alu_b = SRC_OUT;
    w.rd = 4'd1; w.rd_we = 1'b1; w.rd_src = WS_ALU; w.jcr_we = 1'b1; w.jcr_idx = 4'd1;
    b.set_all(5, w);
    b.br[5] = br_loop_ne(1, 1023, 2, 6);
    b.br[6] = br_end();
    return b;
  endfunction

  function automatic cs_builder line_set(input int n);
    cs_builder b = new(1'b1, n);
    pe_cfg_t w;
    w = pe_nop(); w.rd = 4'd6; w.rd_we = 1'b1; w.rd_src = WS_IMM; w.imm = 16'd0;
    b.set_all(0, w);
    for (int c = 1; c <= n - 3; c++) begin
      w = pe_nop(); w.alu_op = ALU_ADD; w.alu_a = SRC_RA; w.ra = 4'd6; w.alu_b = SRC_IMM;
      w.imm = 16'(c); w.rd = 4'd6; w.rd_we = 1'b1; w.rd_src = WS_ALU;
      b.set_all(c, w);
    end
    w = pe_nop(); w.mem_op = MEM_WR; w.ra = 4'd7; w.rb = 4'd6; w.imm = 16'd3500;
    b.set_all(n - 2, w);
    b.br[n - 1] = br_end();
    return b;
  endfunction

  localparam int PW = 34;           // bordered block row pitch
  localparam int CONV_OUT = 2048;   // convolution output base

  // port 0 of every PE selects network source 'src' in context c
  function automatic void route_p0(cs_builder b, int c, int src);
    for (int p = 0; p < NPE; p++) b.net[c][(p*4)*5 +: 5] = 5'(src);
  endfunction

  // mem[r1 + dst] = neighbour(src_dir).mem[r1 + src], r1 = 0, step, ... 31*step
  function automatic cs_builder halo_edge_set(input int step, input int src, input int dst,
                                              input int dir);
    cs_builder b = new(1'b1, 6);
    pe_cfg_t w;
    for (int c = 0; c < 6; c++) route_p0(b, c, dir);
    w = pe_nop(); w.rd = 4'd1; w.rd_we = 1'b1; w.rd_src = WS_IMM; w.imm = 16'd0;
    w.jcr_we = 1'b1; w.jcr_idx = 4'd2;
    b.set_all(0, w);
    w = pe_nop(); w.imm = 16'(step); w.out_we = 1'b1;
    b.set_all(1, w);
    w = pe_nop(); w.mem_op = MEM_RD; w.ra = 4'd1; w.imm = 16'(src);
    b.set_all(2, w);
    w = pe_nop(); w.rd = 4'd4; w.rd_we = 1'b1; w.rd_src = WS_N0;
    b.set_all(3, w);
    w = pe_nop(); w.mem_op = MEM_WR; w.ra = 4'd1; w.rb = 4'd4; w.imm = 16'(dst);
    w.alu_op = ALU_ADD; w.alu_a = SRC_RA; w.alu_b = SRC_OUT;
    w.rd = 4'd1; w.rd_we = 1'b1; w.rd_src = WS_ALU; w.jcr_we = 1'b1; w.jcr_idx = 4'd2;
    b.set_all(4, w);
    b.br[4] = br_loop_ne(2, 32 * step, 2, 5);
    b.br[5] = br_end();
    return b;
  endfunction

  // four corners, one read / take / write triple each, routed per context
  function automatic cs_builder halo_corner_set();
    int src [4] = '{32*PW + 32, 32*PW + 1, PW + 32, PW + 1};
    int dst [4] = '{0, 33, 33*PW, 33*PW + 33};
    int dir [4] = '{8, 2, 6, 4};  // NW, NE, SW, SE
    cs_builder b = new(1'b1, 14);
    pe_cfg_t w;
    w = pe_nop(); w.rd = 4'd5; w.rd_we = 1'b1; w.rd_src = WS_IMM; w.imm = 16'd0;
    b.set_all(0, w);
    for (int k = 0; k < 4; k++) begin
      w = pe_nop(); w.mem_op = MEM_RD; w.ra = 4'd5; w.imm = 16'(src[k]);
      b.set_all(1 + 3*k, w);
      w = pe_nop(); w.rd = 4'd4; w.rd_we = 1'b1; w.rd_src = WS_N0;
      b.set_all(2 + 3*k, w);
      route_p0(b, 2 + 3*k, dir[k]);
      w = pe_nop(); w.mem_op = MEM_WR; w.ra = 4'd5; w.rb = 4'd4; w.imm = 16'(dst[k]);
      b.set_all(3 + 3*k, w);
    end
    b.br[13] = br_end();
    return b;
  endfunction

  // 13 set-up contexts, then 12 contexts per pixel, 2 more per row
  function automatic cs_builder conv_set(input int wt [9], input int shift);
    int off [9] = '{0, 1, 2, PW, PW + 1, PW + 2, 2*PW, 2*PW + 1, 2*PW + 2};
    cs_builder b = new(1'b1, 28);
    pe_cfg_t w;
    br_cfg_t br;
    for (int k = 0; k < 9; k++) begin
      w = pe_nop(); w.rd = 4'(7 + k); w.rd_we = 1'b1; w.rd_src = WS_IMM; w.imm = 16'(wt[k]);
      b.set_all(k, w);
    end
    w = pe_nop(); w.rd = 4'd1; w.rd_we = 1'b1; w.rd_src = WS_IMM; w.imm = 16'd0;  // window base
    b.set_all(9, w);
    w = pe_nop(); w.rd = 4'd2; w.rd_we = 1'b1; w.rd_src = WS_IMM; w.imm = 16'd0;  // output index
    w.jcr_we = 1'b1; w.jcr_idx = 4'd0;
    b.set_all(10, w);
    w = pe_nop(); w.rd = 4'd3; w.rd_we = 1'b1; w.rd_src = WS_IMM; w.imm = 16'd0;  // column
    w.jcr_we = 1'b1; w.jcr_idx = 4'd1;
    b.set_all(11, w);
    w = pe_nop(); w.imm = 16'd1; w.out_we = 1'b1;                                // constant 1
    b.set_all(12, w);
    // pixel loop: contexts 13..24
    for (int k = 0; k < 10; k++) begin
      w = pe_nop();
      if (k < 9) begin w.mem_op = MEM_RD; w.ra = 4'd1; w.imm = 16'(off[k]); end
      if (k >= 1) begin
        w.mac_op = (k == 1) ? MAC_MUL : MAC_ACC;
        w.mac_a = SRC_N0; w.mac_b = SRC_RB; w.rb = 4'(7 + k - 1);
      end
      if (k == 9) begin   // column counter (both read ports are free here)
        w.alu_op = ALU_ADD; w.alu_a = SRC_RA; w.alu_b = SRC_OUT; w.ra = 4'd3;
        w.rd = 4'd3; w.rd_we = 1'b1; w.rd_src = WS_ALU; w.jcr_we = 1'b1; w.jcr_idx = 4'd1;
      end
      if (k == 8) begin   // next window (address read above uses the old base)
        w.alu_op = ALU_ADD; w.alu_a = SRC_RA; w.alu_b = SRC_OUT;
        w.rd = 4'd1; w.rd_we = 1'b1; w.rd_src = WS_ALU;
      end
      b.set_all(13 + k, w);
    end
    w = pe_nop(); w.mac_shift = 4'(shift); w.rd = 4'd4; w.rd_we = 1'b1; w.rd_src = WS_MAC;
    b.set_all(23, w);
    w = pe_nop(); w.mem_op = MEM_WR; w.ra = 4'd2; w.rb = 4'd4; w.imm = 16'(CONV_OUT);
    w.alu_op = ALU_ADD; w.alu_a = SRC_RA; w.alu_b = SRC_OUT;
    w.rd = 4'd2; w.rd_we = 1'b1; w.rd_src = WS_ALU; w.jcr_we = 1'b1; w.jcr_idx = 4'd0;
    b.set_all(24, w);
    b.br[24] = br_loop_ne(1, 32, 13, 25);     // same row: next pixel
    // end of row: skip the two border words, clear the column counter
    w = pe_nop(); w.alu_op = ALU_ADD; w.alu_a = SRC_RA; w.ra = 4'd1; w.alu_b = SRC_IMM;
    w.imm = 16'd2; w.rd = 4'd1; w.rd_we = 1'b1; w.rd_src = WS_ALU;
    b.set_all(25, w);
    w = pe_nop(); w.rd = 4'd3; w.rd_we = 1'b1; w.rd_src = WS_IMM; w.imm = 16'd0;
    w.jcr_we = 1'b1; w.jcr_idx = 4'd1;
    b.set_all(26, w);
    b.br[26] = br_loop_ne(0, 1024, 13, 27);   // more rows
    b.br[27] = br_end();
    return b;
  endfunction

  localparam int OF_F2 = 1024, OF_IDX = 3072, OF_SAD = 3136;

  function automatic pe_cfg_t set_reg(input int r, input int v, input int jcr = -1);
    pe_cfg_t w = pe_nop();
    w.rd = 4'(r); w.rd_we = 1'b1; w.rd_src = WS_IMM; w.imm = 16'(v);
    if (jcr >= 0) begin w.jcr_we = 1'b1; w.jcr_idx = 4'(jcr); end
    return w;
  endfunction

  // rd = rs + imm (and the JCR, if given, gets the same value)
  function automatic pe_cfg_t add_imm(input int rd, input int rs, input int v, input int jcr = -1);
    pe_cfg_t w = pe_nop();
    w.alu_op = ALU_ADD; w.alu_a = SRC_RA; w.ra = 4'(rs); w.alu_b = SRC_IMM; w.imm = 16'(v);
    w.rd = 4'(rd); w.rd_we = 1'b1; w.rd_src = WS_ALU;
    if (jcr >= 0) begin w.jcr_we = 1'b1; w.jcr_idx = 4'(jcr); end
    return w;
  endfunction

  // rd = ra op rb
  function automatic pe_cfg_t alu_rr(input alu_op_e op, input int rd, input int ra, input int rb);
    pe_cfg_t w = pe_nop();
    w.alu_op = op; w.alu_a = SRC_RA; w.ra = 4'(ra); w.alu_b = SRC_RB; w.rb = 4'(rb);
    w.rd = 4'(rd); w.rd_we = 1'b1; w.rd_src = WS_ALU;
    return w;
  endfunction

  // registers: r1 = 1, r2/r3 = frame 1/2 work address, r4 = template corner,
  // r5 = candidate corner, r6 = best SAD, r7 = best index, r8 = candidate,
  // r9 = dx count, r10 = row count, r11 = grid column, r12 = template,
  // r13 = SAD, r14 = select mask, r15 = scratch;
  // JCR0 row, JCR1 dx, JCR2 candidate, JCR4 grid column
  function automatic cs_builder of_init_set();
    cs_builder b = new(1'b1, 10);
    pe_cfg_t w;
    b.set_all(0, set_reg(1, 1));
    b.set_all(1, set_reg(4, 6 * 32 + 6));
    b.set_all(2, set_reg(12, 0));
    b.set_all(3, set_reg(11, 0, 4));
    b.set_all(4, set_reg(5, OF_F2));
    b.set_all(5, set_reg(6, 16'hFFFF));
    b.set_all(6, set_reg(8, 0, 2));
    b.set_all(7, set_reg(9, 0, 1));
    w = pe_nop(); w.mac_op = MAC_CLR;
    b.set_all(8, w);
    b.br[9] = br_end();
    return b;
  endfunction

  function automatic cs_builder of_next_set();
    cs_builder b = new(1'b1, 10);
    b.set_all(0, add_imm(12, 12, 1));
    b.set_all(1, add_imm(11, 11, 1, 4));
    b.set_all(2, add_imm(4, 4, 4));
    b.br[2] = br_loop_ne(4, 5, 5, 3);                  // not the last column: done
    b.set_all(3, add_imm(4, 4, 4 * 32 - 20));          // next grid row
    b.set_all(4, set_reg(11, 0, 4));
    b.set_all(5, add_imm(5, 4, OF_F2 - (6 * 32 + 6)));
    b.set_all(6, set_reg(6, 16'hFFFF));
    b.set_all(7, set_reg(8, 0, 2));
    b.set_all(8, set_reg(9, 0, 1));
    b.br[9] = br_end();
    return b;
  endfunction

  function automatic cs_builder of_match_set();
    cs_builder b = new(1'b1, 32);
    pe_cfg_t w;
    // candidate start: 0..2
    b.set_all(0, add_imm(2, 4, 0));
    b.set_all(1, add_imm(3, 5, 0));
    b.set_all(2, set_reg(10, 0, 0));
    // one template row, two cycles per pixel: 3..16
    for (int k = 0; k < 5; k++) begin
      w = pe_nop(); w.mem_op = MEM_RD; w.ra = 4'd2; w.imm = 16'(k);        // frame 1 pixel
      if (k > 0) begin w.alu_op = ALU_ABSD; w.alu_a = SRC_N0; w.alu_b = SRC_OUT; w.out_we = 1'b1; end
      b.set_all(3 + 2 * k, w);
      w = pe_nop(); w.mem_op = MEM_RD; w.ra = 4'd3; w.imm = 16'(k);        // frame 2 pixel
      w.alu_op = ALU_PASS; w.alu_a = SRC_N0; w.out_we = 1'b1;
      if (k > 0) begin w.mac_op = MAC_ACC; w.mac_a = SRC_OUT; w.mac_b = SRC_RB; w.rb = 4'd1; end
      b.set_all(4 + 2 * k, w);
    end
    w = pe_nop(); w.alu_op = ALU_ABSD; w.alu_a = SRC_N0; w.alu_b = SRC_OUT; w.out_we = 1'b1;
    b.set_all(13, w);
    w = add_imm(10, 10, 1, 0);
    w.mac_op = MAC_ACC; w.mac_a = SRC_OUT; w.mac_b = SRC_RB; w.rb = 4'd1;
    b.set_all(14, w);
    b.set_all(15, add_imm(2, 2, 32));
    b.set_all(16, add_imm(3, 3, 32));
    b.br[16] = br_loop_ne(0, 5, 3, 17);
    // candidate finished: 17..25. All PEs follow one context sequence, so
    // the best match is kept without branching:
    // mask = -(best > sad); best index ^= (best index ^ candidate) & mask
    w = pe_nop(); w.rd = 4'd13; w.rd_we = 1'b1; w.rd_src = WS_MAC; w.mac_op = MAC_CLR;
    b.set_all(17, w);
    b.set_all(18, alu_rr(ALU_GTU, 14, 6, 13));
    w = pe_nop(); w.alu_op = ALU_SUB; w.alu_a = SRC_IMM; w.imm = 16'd0; w.alu_b = SRC_RA; w.ra = 4'd14;
    w.rd = 4'd14; w.rd_we = 1'b1; w.rd_src = WS_ALU;
    b.set_all(19, w);
    b.set_all(20, alu_rr(ALU_XOR, 15, 7, 8));
    b.set_all(21, alu_rr(ALU_AND, 15, 15, 14));
    b.set_all(22, alu_rr(ALU_XOR, 7, 7, 15));
    b.set_all(23, alu_rr(ALU_MIN, 6, 6, 13));
    b.set_all(24, add_imm(9, 9, 1, 1));
    b.set_all(25, add_imm(8, 8, 1, 2));
    // next candidate: 26..28
    b.set_all(26, add_imm(5, 5, 1));
    b.br[26] = br_loop_ne(1, 12, 0, 27);
    b.set_all(27, add_imm(5, 5, 32 - 12));
    b.set_all(28, set_reg(9, 0, 1));
    b.br[28] = br_loop_ne(2, 144, 0, 29);
    // results: 29..30
    w = pe_nop(); w.mem_op = MEM_WR; w.ra = 4'd12; w.rb = 4'd7; w.imm = 16'(OF_IDX);
    b.set_all(29, w);
    w = pe_nop(); w.mem_op = MEM_WR; w.ra = 4'd12; w.rb = 4'd6; w.imm = 16'(OF_SAD);
    b.set_all(30, w);
    b.br[31] = br_end();
    return b;
  endfunction

  function automatic int line_sum(input int n);
    return (n - 3) * (n - 2) / 2;
  endfunction
endpackage
