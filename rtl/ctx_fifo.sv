// ctx_fifo: executable context-set address FIFO.
//
// Configuration control pushes an entry (start address of a context set in
// the ring configuration register files and its number of contexts) once the
// set is completely transferred; execution control reads the head, runs the
// set, and pops it when the set has finished. Synchronous, first-word
// fall-through head, push and pop allowed in the same cycle. Pushing when
// full or popping when empty is a protocol error caught by assertions. The
// FIFO is published; its depth (8) is this design's choice.
module ctx_fifo #(
  parameter int unsigned W     = 11,
  parameter int unsigned DEPTH = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [W-1:0] din,
  input  logic         pop,
  output logic [W-1:0] dout,
  output logic         empty,
  output logic         full,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned PW = $clog2(DEPTH);
  logic [W-1:0]  q [DEPTH];
  logic [PW-1:0] rp, wp;

  assign empty = (count == '0);
  assign full  = (count == (PW+1)'(DEPTH));
  assign dout  = q[rp];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp <= '0; wp <= '0; count <= '0;
      for (int i = 0; i < DEPTH; i++) q[i] <= '0;
    end else begin
      if (push) begin q[wp] <= din; wp <= wp + 1'b1; end
      if (pop)  rp <= rp + 1'b1;
      count <= count + (PW+1)'(push) - (PW+1)'(pop);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));
endmodule
