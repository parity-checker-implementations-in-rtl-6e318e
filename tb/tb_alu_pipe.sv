// tb_alu_pipe - self-checking testbench of the two-stage pipelined ALU.
//
// Issues a new random operation every clock, including back-to-back
// operations of different kinds, and checks that y one clock later equals
// the result computed here. Operands stress the carry across the half-word
// boundary and compares decided in either half.
module tb_alu_pipe;
  import parity_pkg::*;
  localparam int W = 32;
  logic clk = 1'b0, rst = 1'b1;
  logic [W-1:0] a = '0, b = '0, y;
  alu_op_e op = ALU_ADD;
  logic [W-1:0] expect_q;
  logic         have_q = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  alu_pipe u_dut (.*);

  function automatic logic [W-1:0] model(alu_op_e o, logic [W-1:0] x, logic [W-1:0] z);
    case (o)
      ALU_ADD: return x + z;
      ALU_SUB: return x + ~z + 1;
      ALU_LT:  return (x < z) ? 1 : 0;
      ALU_LE:  return (x <= z) ? 1 : 0;
      ALU_GT:  return (x > z) ? 1 : 0;
      ALU_GE:  return (x >= z) ? 1 : 0;
      ALU_NE:  return (x != z) ? 1 : 0;
      ALU_EQ:  return (x == z) ? 1 : 0;
      ALU_AND: return x & z;
      ALU_OR:  return x | z;
      ALU_NOT: return ~x;
      ALU_NEG: return ~x + 1;
      default: return '0;
    endcase
  endfunction

  function automatic logic [W-1:0] pick();
    case ($urandom_range(5, 0))
      0: return 32'h0000_FFFF;
      1: return 32'h0001_0000;
      2: return {$urandom_range(3, 0) == 0 ? 16'h1234 : 16'($urandom()), 16'($urandom())};
      3: return 32'hFFFF_FFFF;
      default: return $urandom();
    endcase
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (have_q) begin
        checks++;
        if (y !== expect_q) begin
          failures++;
          $display("FAIL y=%h expected %h", y, expect_q);
        end
      end
      op = alu_op_e'($urandom_range(11, 0));
      a  = pick();
      b  = ($urandom_range(3, 0) == 0) ? {a[31:16], 16'($urandom())} : pick();
      expect_q = model(op, a, b);
      have_q   = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
