// shifter_pipe - two-stage pipelined version of the library shifter.
//
// Same function as shifter. Stage 1 shifts by the coarse part of the amount
// (multiples of 8 bits) and notes whether the amount reaches W; stage 2
// shifts by the remaining 0..7 bits and forces 0 for an amount of W or more.
// Timing: so is the result for the inputs presented one clock earlier; one
// new shift may start every clock. The coarse/fine split is this design's
// choice. W must be a power of two of at least 16.
module shifter_pipe
  import parity_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] si,
  input  logic [W-1:0] amount,
  input  shift_op_e    op,
  output logic [W-1:0] so
);

  localparam int unsigned LOG = $clog2(W);

  logic [W-1:0] part_d, part_q;
  logic [2:0]   fine_q;
  logic         big_d, big_q;
  shift_op_e    op_q;

  always_comb begin
    logic [LOG-1:0] coarse;
    coarse = {amount[LOG-1:3], 3'b000};
    big_d  = |(amount >> LOG);
    part_d = (op == SH_RIGHT) ? (si >> coarse) : (si << coarse);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      part_q <= '0;
      fine_q <= '0;
      big_q  <= 1'b0;
      op_q   <= SH_RIGHT;
    end else begin
      part_q <= part_d;
      fine_q <= amount[2:0];
      big_q  <= big_d;
      op_q   <= op;
    end
  end

  always_comb begin
    if (big_q)                so = '0;
    else if (op_q == SH_RIGHT) so = part_q >> fine_q;
    else                       so = part_q << fine_q;
  end

endmodule
