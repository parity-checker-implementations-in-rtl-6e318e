// tb_parity_checker - self-checking testbench of the parity checker with
// both halves on one clock (SYNC_STAGES = 0).
//
// Builds the parity checker once per One's Counter implementation and runs
// the same words through all six at once, in the Start/Done manner of an
// environment that raises Start, waits for Done, reads Outport and drops
// Start. Checks Outport against the parity computed here and the number of
// clocks from the edge that samples Start to the edge after which Done is
// high: the One's Counter's own count (PRE + LOOP*(k+1) + 1) plus the two
// Even Checker states S1 and S2 before istart.
module tb_parity_checker;
  localparam int W = 32;
  localparam int PRE  [6] = '{2, 4, 2, 2, 4, 2};
  localparam int LOOP [6] = '{1, 4, 4, 2, 5, 4};
  localparam int NWORDS = 40;

  logic clk = 1'b0, rst = 1'b1;
  logic [W-1:0] words [NWORDS];
  int checks = 0, failures = 0, finished = 0;

  always #5 clk = ~clk;

  function automatic int popcount(logic [W-1:0] v);
    int n = 0;
    for (int i = 0; i < W; i++) n += int'(v[i]);
    return n;
  endfunction

  function automatic int top_one(logic [W-1:0] v);
    int k = 0;
    for (int i = 0; i < W; i++) if (v[i]) k = i;
    return k;
  endfunction

  initial begin
    words[0] = 32'hFFFF_FFFF;
    words[1] = 32'h0;
    words[2] = 32'h1;
    words[3] = 32'h8000_0000;
    for (int i = 4; i < NWORDS; i++) words[i] = $urandom() >> $urandom_range(20, 0);
  end

  for (genvar g = 0; g < 6; g++) begin : g_impl
    logic [W-1:0] Inport = '0, Outport;
    logic Start = 1'b0, Done;

    parity_checker #(.W(W), .ONES_IMPL(g), .SYNC_STAGES(0)) u_dut (
      .clk1(clk), .clk2(clk), .rst, .Inport, .Outport, .Start, .Done);

    initial begin
      @(negedge rst);
      for (int i = 0; i < NWORDS; i++) begin
        int cycles, expect_cycles;
        cycles = 0;
        @(negedge clk);
        Inport = words[i];
        Start  = 1'b1;
        do begin
          @(posedge clk);
          cycles++;
          @(negedge clk);
        end while (!Done && cycles < 1000);
        expect_cycles = PRE[g] + LOOP[g] * (top_one(words[i]) + 1) + 1 + 2;
        checks++;
        if (cycles != expect_cycles) begin
          failures++;
          $display("FAIL impl %0d word %h: %0d clocks, expected %0d", g, words[i], cycles, expect_cycles);
        end
        checks++;
        if (Outport != W'(popcount(words[i]) % 2)) begin
          failures++;
          $display("FAIL impl %0d word %h: Outport %h", g, words[i], Outport);
        end
        Start = 1'b0;
        while (Done) @(negedge clk);
      end
      finished++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    wait (finished == 6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
