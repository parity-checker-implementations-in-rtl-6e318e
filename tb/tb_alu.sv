// tb_alu - self-checking testbench of the combinational ALU.
//
// Applies every operation to corner operands and random operands and
// compares y with the result computed here from the operation's definition.
module tb_alu;
  import parity_pkg::*;
  localparam int W = 32;
  logic [W-1:0] a, b, y;
  alu_op_e op;
  int checks = 0, failures = 0;

  alu u_dut (.*);

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

  task automatic try(alu_op_e o, logic [W-1:0] x, logic [W-1:0] z);
    op = o; a = x; b = z;
    #1;
    checks++;
    if (y !== model(o, x, z)) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h y=%h expected %h", o.name(), x, z, y, model(o, x, z));
    end
  endtask

  initial begin
    logic [W-1:0] corners [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h0000_FFFF, 32'h0001_0000};
    for (int o = 0; o <= 11; o++) begin
      foreach (corners[i]) foreach (corners[j]) try(alu_op_e'(o), corners[i], corners[j]);
      for (int r = 0; r < 200; r++) try(alu_op_e'(o), $urandom(), (r % 4 == 0) ? $urandom() & 32'hFFFF : $urandom());
      try(alu_op_e'(o), 32'h1234_5678, 32'h1234_5678);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
