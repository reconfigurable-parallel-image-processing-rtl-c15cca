// tb_ic_network: random select words written into random ring entries,
// random memory data and PE outputs; every PE input port is compared with an
// independent model of the 18-source neighbour MUX of a 2x2 array.
module tb_ic_network;
  import rp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_we, cfg_beat;
  logic [4:0] cfg_addr, ctx_ptr;
  logic [39:0] cfg_data;
  logic [15:0] mem_rdata [4];
  net_word_t pe_out [4];
  net_word_t pe_in [4][4];
  logic [79:0] m [32];
  int checks = 0, failures = 0, n_nb = 0;

  ic_network dut (.*);

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // neighbour of PE p in direction d (0 self, 1 N, 2 NE, 3 E, 4 SE, 5 S, 6 SW, 7 W, 8 NW), -1 if none
  function automatic int nb(int p, int d);
    int x, y;
    x = p % 2; y = p / 2;
    case (d)
      1: y--; 2: begin y--; x++; end 3: x++; 4: begin y++; x++; end
      5: y++; 6: begin y++; x--; end 7: x--; 8: begin y--; x--; end
      default: ;
    endcase
    if (x < 0 || x > 1 || y < 0 || y > 1) return -1;
    return y * 2 + x;
  endfunction

  initial begin
    cfg_we = 0; cfg_beat = 0; cfg_addr = 0; cfg_data = 0; ctx_ptr = 0;
    for (int i = 0; i < 4; i++) begin mem_rdata[i] = 0; pe_out[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 32; i++) m[i] = '0;
    for (int n = 0; n < 1500; n++) begin
      logic [79:0] f;
      int a;
      a = $urandom_range(0, 31);
      for (int k = 0; k < 16; k++) f[k*5 +: 5] = 5'($urandom_range(0, 20));
      for (int bt = 0; bt < 2; bt++) begin
        @(negedge clk);
        cfg_we = 1; cfg_addr = 5'(a); cfg_beat = 1'(bt); cfg_data = bt ? f[79:40] : f[39:0];
      end
      m[a] = f;
      @(negedge clk);
      cfg_we = 0;
      ctx_ptr = 5'($urandom_range(0, 31));
      for (int i = 0; i < 4; i++) begin
        mem_rdata[i] = 16'($urandom);
        pe_out[i] = '{carry: 1'($urandom), data: 16'($urandom)};
      end
      #1;
      for (int p = 0; p < 4; p++)
        for (int q = 0; q < 4; q++) begin
          int s, src;
          net_word_t e;
          s = int'(m[ctx_ptr][(p*4+q)*5 +: 5]);
          e = '0;
          if (s < 18) begin
            src = nb(p, s % 9);
            if (src >= 0) begin
              e = (s < 9) ? '{carry: 1'b0, data: mem_rdata[src]} : pe_out[src];
              if (s % 9 != 0) n_nb++;
            end
          end
          checks++;
          if (pe_in[p][q] !== e) begin
            failures++;
            if (failures < 10) $display("FAIL pe%0d port%0d sel %0d: %h expected %h", p, q, s, pe_in[p][q], e);
          end
        end
    end
    checks++; if (n_nb == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
