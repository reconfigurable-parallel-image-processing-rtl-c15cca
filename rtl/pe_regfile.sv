// pe_regfile: data register file of a processing element, 16 words of 16 bits.
//
// Two combinational read ports (ra, rb) and one write port written on the
// clock edge. Reset clears every register. Size as published (16bit x 16);
// port count is this design's choice, matching two ALU operands per context.
module pe_regfile
  import rp_pkg::*;
#(
  parameter int unsigned NREG = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(NREG)-1:0]  ra,
  input  logic [$clog2(NREG)-1:0]  rb,
  output logic [DATA_W-1:0]        qa,
  output logic [DATA_W-1:0]        qb,
  input  logic                     we,
  input  logic [$clog2(NREG)-1:0]  wa,
  input  logic [DATA_W-1:0]        wd
);
  logic [DATA_W-1:0] r [NREG];

  assign qa = r[ra];
  assign qb = r[rb];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREG; i++) r[i] <= '0;
    end else if (we) begin
      r[wa] <= wd;
    end
  end
endmodule
