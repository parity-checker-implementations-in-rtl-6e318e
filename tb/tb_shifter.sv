// tb_shifter - self-checking testbench of the combinational shifter.
//
// Shifts random words left and right by every amount 0..40 and by large
// amounts, comparing with a bit-by-bit model.
module tb_shifter;
  import parity_pkg::*;
  localparam int W = 32;
  logic [W-1:0] si, amount, so;
  shift_op_e op;
  int checks = 0, failures = 0;

  shifter u_dut (.*);

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
    for (int k = 0; k < 20; k++) begin
      logic [W-1:0] x = $urandom();
      for (int n = 0; n <= 40; n++) begin
        for (int o = 0; o < 2; o++) begin
          si = x; amount = n; op = shift_op_e'(o);
          #1;
          checks++;
          if (so !== model(op, si, amount)) begin
            failures++;
            $display("FAIL op=%0d si=%h n=%0d so=%h", o, si, n, so);
          end
        end
      end
      si = x; amount = 32'h8000_0001; op = SH_RIGHT; #1;
      checks++;
      if (so !== '0) begin failures++; $display("FAIL large amount"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
