// alu_pipe - two-stage pipelined version of the library ALU.
//
// Same operations and codes as alu. The word is cut at its middle bit:
// stage 1 computes the low half (sum and carry-out, logic result, or the
// low-half "less than" / "equal" flags) and registers it together with the
// operation and the high halves of the operands; stage 2 finishes the high
// half with the stored carry, or combines the high-half compare with the
// stored low-half flags. Each stage therefore holds about half the delay of
// the combinational ALU, which is the property the pipelined designs rely on.
// Timing: y is the result of the operands presented one clock earlier; a new
// operation may be issued every clock. The half-word split is this design's
// choice. W must be even.
module alu_pipe
  import parity_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  alu_op_e      op,
  output logic [W-1:0] y
);

  localparam int unsigned H = W / 2;

  // stage 1 register contents
  typedef struct packed {
    alu_op_e        op;
    logic [W-H-1:0] x_hi;   // first adder operand, high half
    logic [W-H-1:0] z_hi;   // second adder operand, high half
    logic [W-H-1:0] a_hi;   // raw high halves for compares and logic
    logic [W-H-1:0] b_hi;
    logic [H-1:0]   lo;     // low half of the result
    logic           carry;  // carry out of the low half
    logic           lo_lt;  // a_lo < b_lo
    logic           lo_eq;  // a_lo == b_lo
  } stage_t;

  stage_t s1_d, s1_q;

  // Stage 1: adder operands are chosen so that add, sub and negate share
  // one carry chain: x + z + cin.
  always_comb begin
    logic [W-1:0] x, z;
    logic         cin;
    logic [H:0]   lo_sum;
    unique case (op)
      ALU_SUB: begin x = a;  z = ~b; cin = 1'b1; end
      ALU_NEG: begin x = ~a; z = '0; cin = 1'b1; end
      default: begin x = a;  z = b;  cin = 1'b0; end
    endcase
    lo_sum     = {1'b0, x[H-1:0]} + {1'b0, z[H-1:0]} + (H+1)'(cin);
    s1_d.op    = op;
    s1_d.x_hi  = x[W-1:H];
    s1_d.z_hi  = z[W-1:H];
    s1_d.a_hi  = a[W-1:H];
    s1_d.b_hi  = b[W-1:H];
    s1_d.carry = lo_sum[H];
    s1_d.lo_lt = a[H-1:0] <  b[H-1:0];
    s1_d.lo_eq = a[H-1:0] == b[H-1:0];
    unique case (op)
      ALU_AND: s1_d.lo = a[H-1:0] & b[H-1:0];
      ALU_OR:  s1_d.lo = a[H-1:0] | b[H-1:0];
      ALU_NOT: s1_d.lo = ~a[H-1:0];
      default: s1_d.lo = lo_sum[H-1:0];
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) s1_q <= '0;
    else     s1_q <= s1_d;
  end

  // Stage 2: high half and compare results.
  always_comb begin
    logic [W-H-1:0] hi_sum;
    logic           hi_lt, hi_eq, lt, eq;
    hi_sum = s1_q.x_hi + s1_q.z_hi + (W-H)'(s1_q.carry);
    hi_lt  = s1_q.a_hi <  s1_q.b_hi;
    hi_eq  = s1_q.a_hi == s1_q.b_hi;
    lt     = hi_lt | (hi_eq & s1_q.lo_lt);
    eq     = hi_eq & s1_q.lo_eq;
    unique case (s1_q.op)
      ALU_LT:  y = W'(lt);
      ALU_LE:  y = W'(lt | eq);
      ALU_GT:  y = W'(!(lt | eq));
      ALU_GE:  y = W'(!lt);
      ALU_NE:  y = W'(!eq);
      ALU_EQ:  y = W'(eq);
      ALU_AND: y = {s1_q.a_hi & s1_q.b_hi, s1_q.lo};
      ALU_OR:  y = {s1_q.a_hi | s1_q.b_hi, s1_q.lo};
      ALU_NOT: y = {~s1_q.a_hi, s1_q.lo};
      default: y = {hi_sum, s1_q.lo};   // add, sub, negate
    endcase
  end

endmodule
