// tb_shifter_pipe - self-checking testbench of the two-stage pipelined
// shifter: a new random shift every clock, result checked one clock later
// against a bit-by-bit model.
module tb_shifter_pipe;
  import parity_pkg::*;
  localparam int W = 32;
  logic clk = 1'b0, rst = 1'b1;
  logic [W-1:0] si = '0, amount = '0, so, expect_q;
  shift_op_e op = SH_RIGHT;
  logic have_q = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  shifter_pipe u_dut (.*);

  function automatic logic [W-1:0] model(shift_op_e o, logic [W-1:0] x, logic [W-1:0] n);
    logic [W-1:0] r = '0;
    for (int i = 0; i < W; i++) begin
      if (o == SH_RIGHT) begin
        if (n < W && i + int'(n) < W) r[i] = x[i + int'(n)];
      end else begin
        if (n < W && i >= int'(n)) r[i] = x[i - int'(n)];
      end
    end
    return r;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (have_q) begin
        checks++;
        if (so !== expect_q) begin
          failures++;
          $display("FAIL so=%h expected %h", so, expect_q);
        end
      end
      si     = $urandom();
      amount = ($urandom_range(9, 0) == 0) ? $urandom() : $urandom_range(34, 0);
      op     = shift_op_e'($urandom_range(1, 0));
      expect_q = model(op, si, amount);
      have_q = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
