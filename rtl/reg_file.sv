// reg_file - register file of the component library.
//
// DEPTH words of W bits with one write port and two read ports (A and B),
// the library's "1 inport, 2 outports, size 4". A write of inp to entry wa
// happens at the rising clock edge when we is high. Reads are combinational:
// outA shows entry raA while reA is high and 0 otherwise, likewise for B, so
// a value written at an edge can be read in the following cycle. rst
// (synchronous) clears every entry; the clearing is this design's choice.
module reg_file
  import parity_pkg::*;
#(
  parameter int unsigned W     = DATA_W,
  parameter int unsigned DEPTH = 4,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [W-1:0]  inp,
  input  logic [AW-1:0] wa,
  input  logic          we,
  input  logic [AW-1:0] raA,
  input  logic          reA,
  output logic [W-1:0]  outA,
  input  logic [AW-1:0] raB,
  input  logic          reB,
  output logic [W-1:0]  outB
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (we) begin
      mem[wa] <= inp;
    end
  end

  assign outA = reA ? mem[raA] : '0;
  assign outB = reB ? mem[raB] : '0;

endmodule
