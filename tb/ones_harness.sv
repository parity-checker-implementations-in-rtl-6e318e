// ones_harness - self-checking test of one One's Counter implementation.
//
// IMPL selects the counter (0 = ones_counter_ref, k = ones_counter_dk). The
// harness plays the Even Checker's side of both handshakes on a single
// clock: it presents a word on idata, raises istart, drops it after
// ack_istart, waits for idone, checks iocount against a population count
// computed here, holds ack_idone back for a few cycles to check that idone
// waits for it, then acknowledges. For every word it also checks the number
// of clocks from the edge at which the counter samples istart to the edge
// at which idone is first seen high: PRE + LOOP*(k+1) + 1, k being the index
// of the highest one (0 for the word 0), with the published totals for a
// word of 32 ones (133, 131, 67, 165, 131 for Designs 1..5; 35 for the
// reference structure).
module ones_harness #(
  parameter int IMPL = 0
);
  localparam int W = 32;
  localparam int CW = 5;
  // states outside the loop before it, and states per loop iteration
  localparam int PRE  = (IMPL == 1 || IMPL == 4) ? 4 : 2;
  localparam int LOOP = (IMPL == 0) ? 1 : (IMPL == 3) ? 2 : (IMPL == 4) ? 5 : 4;
  localparam int ALL_ONES_CYCLES [6] = '{35, 133, 131, 67, 165, 131};

  logic          clk = 1'b0;
  logic          rst = 1'b1;
  logic [W-1:0]  idata = '0;
  logic [CW-1:0] iocount;
  logic          istart = 1'b0, idone, ack_istart, ack_idone = 1'b0;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  if (IMPL == 0) begin : g_dut
    ones_counter_ref u_dut (.*);
  end else if (IMPL == 1) begin : g_dut
    ones_counter_d1 u_dut (.*);
  end else if (IMPL == 2) begin : g_dut
    ones_counter_d2 u_dut (.*);
  end else if (IMPL == 3) begin : g_dut
    ones_counter_d3 u_dut (.*);
  end else if (IMPL == 4) begin : g_dut
    ones_counter_d4 u_dut (.*);
  end else begin : g_dut
    ones_counter_d5 u_dut (.*);
  end

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

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [impl %0d] %s", IMPL, what);
    end
  endtask

  task automatic run_word(input logic [W-1:0] d);
    int cycles, expect_cycles;
    idata = d;
    @(negedge clk);
    check(!idone && !ack_istart, "idle before request");
    istart = 1'b1;
    cycles = 0;
    do begin
      @(posedge clk);
      cycles++;
      @(negedge clk);
      if (cycles == 1) begin
        check(ack_istart, "ack_istart one cycle after istart");
        istart = 1'b0;
      end
      if (cycles == 2) idata = ~d;   // the counter has taken the word in S1
    end while (!idone && cycles < 1000);
    cycles++;          // the edge at which idone is sampled
    expect_cycles = PRE + LOOP * (top_one(d) + 1) + 1;
    check(cycles == expect_cycles,
          $sformatf("cycles for %h: got %0d expected %0d", d, cycles, expect_cycles));
    if (d == '1)
      check(cycles == ALL_ONES_CYCLES[IMPL],
            $sformatf("32 ones: %0d cycles, published %0d", cycles, ALL_ONES_CYCLES[IMPL]));
    check(iocount == CW'(popcount(d)),
          $sformatf("count of %h: got %0d expected %0d", d, iocount, popcount(d) % 32));
    // idone must wait for ack_idone
    repeat (3) @(negedge clk);
    check(idone && ack_istart && iocount == CW'(popcount(d)), "idone held until ack_idone");
    ack_idone = 1'b1;
    @(negedge clk);
    check(!idone && !ack_istart, "idone and ack_istart dropped after ack_idone");
    ack_idone = 1'b0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    run_word(32'hFFFF_FFFF);
    run_word(32'h0000_0000);
    run_word(32'h0000_0001);
    run_word(32'h8000_0000);
    run_word(32'h5555_5555);
    run_word(32'hAAAA_AAAA);
    run_word(32'h7FFF_FFFF);
    for (int i = 0; i < 40; i++) run_word($urandom());
    for (int i = 0; i < 10; i++) run_word($urandom() >> $urandom_range(31, 0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL [impl %0d] watchdog expired", IMPL);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
