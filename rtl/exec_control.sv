// exec_control: execution control of the context-set pipeline.
//
// Watches the executable context-set address FIFO. When it holds an entry
// and the branch control is idle, it starts the branch control with the
// entry's start address as start offset. When the branch control reports
// that the set has finished, it pops the entry and hands the set's number of
// contexts back to configuration control, which may then reuse those ring
// entries. Published: the FIFO, the start offset and the removal after
// execution; the two-state handshake is this design's own.
module exec_control #(
  parameter int unsigned N_CTX = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     fifo_empty,
  input  logic [$clog2(N_CTX)-1:0] head_start,
  input  logic [6:0]               head_nctx,
  output logic                     fifo_pop,
  input  logic                     br_busy,
  input  logic                     br_done,
  output logic                     br_start,
  output logic [$clog2(N_CTX)-1:0] br_offset,
  output logic                     rel_valid,
  output logic [6:0]               rel_nctx,
  output logic                     running
);
  typedef enum logic {EX_IDLE, EX_RUN} ex_state_e;
  ex_state_e st;

  assign br_start  = (st == EX_IDLE) && !fifo_empty && !br_busy;
  assign br_offset = head_start;
  assign fifo_pop  = (st == EX_RUN) && br_done;
  assign rel_valid = fifo_pop;
  assign rel_nctx  = head_nctx;
  assign running   = (st == EX_RUN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) st <= EX_IDLE;
    else unique case (st)
      EX_IDLE: if (br_start) st <= EX_RUN;
      EX_RUN:  if (br_done)  st <= EX_IDLE;
      default: st <= EX_IDLE;
    endcase
  end
endmodule
