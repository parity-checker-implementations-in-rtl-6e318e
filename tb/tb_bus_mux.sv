// tb_bus_mux - self-checking testbench of the shared bus with four drivers:
// each single enabled driver must appear on the bus, an idle bus reads 0.
module tb_bus_mux;
  localparam int W = 32, N = 4;
  logic [N-1:0][W-1:0] drv;
  logic [N-1:0] oe;
  logic [W-1:0] bus;
  int checks = 0, failures = 0;

  bus_mux #(.W(W), .N(N)) u_dut (.*);

  initial begin
    for (int r = 0; r < 500; r++) begin
      for (int i = 0; i < N; i++) drv[i] = $urandom();
      for (int s = -1; s < N; s++) begin
        oe = (s < 0) ? '0 : N'(1) << s;
        #1;
        checks++;
        if (bus !== ((s < 0) ? '0 : drv[s])) begin
          failures++;
          $display("FAIL oe=%b bus=%h", oe, bus);
        end
      end
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
