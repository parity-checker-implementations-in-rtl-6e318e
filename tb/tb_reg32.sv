// tb_reg32 - self-checking testbench of the single register: random data
// with random write enables against a model, plus reset.
module tb_reg32;
  localparam int W = 32;
  logic clk = 1'b0, rst = 1'b1, write = 1'b0;
  logic [W-1:0] din = '0, dout, model;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  reg32 u_dut (.*);

  initial begin
    repeat (2) @(negedge clk);
    checks++;
    if (dout !== '0) begin failures++; $display("FAIL reset"); end
    rst = 1'b0;
    model = '0;
    for (int i = 0; i < 1000; i++) begin
      din = $urandom(); write = $urandom();
      @(posedge clk);
      if (write) model = din;
      @(negedge clk);
      checks++;
      if (dout !== model) begin failures++; $display("FAIL dout=%h expected %h", dout, model); end
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
