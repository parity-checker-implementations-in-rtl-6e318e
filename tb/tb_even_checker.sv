// tb_even_checker - self-checking testbench of the Even Checker.
//
// The testbench plays both the environment (Inport, Start, Done, Outport)
// and the One's Counter side of the two handshakes, with random response
// delays. Checks: istart rises two clocks after Start is sampled and stays
// up until ack_istart; idata carries the word; iocount values offered before
// idone are not used; Outport equals bit 0 of the final count (the parity);
// Done and ack_idone rise one clock after idone is sampled and stay up until
// idone falls; Outport stays valid until the next Start; the checker then
// returns to idle.
module tb_even_checker;
  localparam int W = 32, CW = 5;
  logic clk = 1'b0, rst = 1'b1;
  logic [W-1:0]  Inport = '0, Outport, idata;
  logic [CW-1:0] iocount = '0;
  logic Start = 1'b0, Done, istart, idone = 1'b0, ack_istart = 1'b0, ack_idone;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  even_checker u_dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int popcount(logic [W-1:0] v);
    int n = 0;
    for (int i = 0; i < W; i++) n += int'(v[i]);
    return n;
  endfunction

  task automatic run_word(input logic [W-1:0] d);
    int wait_ack = $urandom_range(4, 0);
    int wait_done = $urandom_range(6, 0);
    int wait_drop = $urandom_range(4, 0);
    @(negedge clk);
    Inport = d; Start = 1'b1;
    @(negedge clk);                      // S1
    check(!istart, "istart low in S1");
    @(negedge clk);                      // S2
    check(istart && idata == d, "istart and idata in S2");
    Inport = ~d;                         // word already captured
    repeat (wait_ack) begin
      @(negedge clk);
      check(istart, "istart held until ack_istart");
    end
    ack_istart = 1'b1;
    @(negedge clk);                      // S3
    check(!istart, "istart dropped after ack_istart");
    repeat (wait_done) begin
      iocount = CW'($urandom());         // counting in progress: ignored
      @(negedge clk);
      check(!Done && !ack_idone, "no Done before idone");
    end
    iocount = CW'(popcount(d));
    idone = 1'b1;
    @(negedge clk);                      // S4
    check(Done && ack_idone, "Done and ack_idone one clock after idone");
    check(Outport == W'(popcount(d) % 2), $sformatf("Outport for %h: %h", d, Outport));
    iocount = CW'($urandom());
    repeat (wait_drop) begin
      @(negedge clk);
      check(Done && ack_idone, "Done held while idone high");
    end
    Start = 1'b0;
    idone = 1'b0; ack_istart = 1'b0;
    @(negedge clk);                      // back in S0
    check(!Done && !ack_idone && !istart, "idle after idone falls");
    check(Outport == W'(popcount(d) % 2), "Outport held after Done");
    Inport = $urandom();
    repeat (2) @(negedge clk);
    check(!istart, "no new round without Start");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    run_word(32'hFFFF_FFFF);
    run_word(32'h0000_0000);
    run_word(32'h0000_0001);
    run_word(32'h8000_0001);
    for (int i = 0; i < 60; i++) run_word($urandom());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
