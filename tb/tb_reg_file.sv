// tb_reg_file - self-checking testbench of the 4-entry register file.
//
// Random writes and reads on both ports against a shadow array kept here;
// checks that disabled read ports give 0 and that a write becomes visible
// in the next cycle, and that reset clears every entry.
module tb_reg_file;
  localparam int W = 32, DEPTH = 4;
  logic clk = 1'b0, rst = 1'b1;
  logic [W-1:0] inp = '0, outA, outB;
  logic [1:0] wa = '0, raA = '0, raB = '0;
  logic we = 1'b0, reA = 1'b0, reB = 1'b0;
  logic [W-1:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  reg_file u_dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    foreach (shadow[i]) shadow[i] = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    reA = 1'b1; reB = 1'b1;
    for (int i = 0; i < DEPTH; i++) begin
      raA = i; #1 check(outA == '0, "cleared by reset");
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      raA = $urandom(); raB = $urandom(); reA = $urandom(); reB = $urandom();
      #1;
      check(outA == (reA ? shadow[raA] : '0), $sformatf("port A entry %0d", raA));
      check(outB == (reB ? shadow[raB] : '0), $sformatf("port B entry %0d", raB));
      we = $urandom(); wa = $urandom(); inp = $urandom();
      @(posedge clk);
      if (we) shadow[wa] = inp;
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
