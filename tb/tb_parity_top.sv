// tb_parity_top - end-to-end testbench of the six parity checkers, at the
// top's default parameters (32-bit words, two-flop synchronizers).
//
// The Even Checkers run on clk1 and the One's Counters on clk2, with periods
// in the ratio 5:4. For each implementation an environment process applies
// words the way a host would: set Inport, raise Start, wait for Done, read
// Outport, drop Start, pause. Outport is checked against the parity
// computed here. All six receive the same words, and for a word of 32 ones
// the Start-to-Done times must rank as the One's Counter schedules predict:
// reference < Design 3 < Design 2 < Design 4.
//
// The One's Counter clock is switched every few thousand time units between
// three regimes: the 5:4 period ratio, a clk2 about three times slower than
// clk1 and a clk2 about three times faster, so the handshakes are exercised
// with either side waiting on the other; every implementation must finish
// words in all three regimes.
//
// Each mechanism of the design is counted per implementation and must occur:
// a completed round, odd and even results, the zero word (one loop pass),
// the word of 32 ones (count wraps to 0 in the 5-bit iocount), more than
// one loop pass, the Even Checker waiting in S2 for ack_istart and in S3 for
// idone, and the One's Counter holding idone until ack_idone.
module tb_parity_top;
  localparam int W = 32, NIMPL = 6, NWORDS = 60;

  logic clk1 = 1'b0, clk2 = 1'b0, rst = 1'b1;
  logic [NIMPL-1:0][W-1:0] Inport, Outport;
  logic [NIMPL-1:0] Start, Done;

  logic [W-1:0] words [NWORDS];
  longint ones_latency [NIMPL];   // Start to Done for 32 ones, in time units
  int checks = 0, failures = 0, finished = 0;

  // clk2 half period per regime: 5:4 ratio, slow, fast
  localparam int HALF2 [3] = '{4, 16, 2};
  int regime = 0;

  always #5 clk1 = ~clk1;
  always #(HALF2[regime]) clk2 = ~clk2;

  initial forever begin
    #2000;
    regime = (regime + 1) % 3;
  end

  parity_top u_dut (.*);

  function automatic int popcount(logic [W-1:0] v);
    int n = 0;
    for (int i = 0; i < W; i++) n += int'(v[i]);
    return n;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    words[0] = 32'h0000_0000;
    words[1] = 32'hFFFF_FFFF;
    words[2] = 32'h0000_0007;
    words[3] = 32'h8000_0000;
    for (int i = 4; i < NWORDS; i++) words[i] = $urandom();
  end

  for (genvar g = 0; g < NIMPL; g++) begin : g_env
    // mechanism counters
    int rounds = 0, odd = 0, even = 0, zero_word = 0, all_ones = 0, multi_pass = 0;
    int wait_ack_istart = 0, wait_idone = 0, hold_idone = 0;
    int per_regime [3] = '{0, 0, 0};

    always @(posedge clk1) begin
      if (!rst) begin
        if (u_dut.g_impl[g].u_parity.istart_src && !u_dut.g_impl[g].u_parity.ack_istart_dst)
          wait_ack_istart++;
        if (u_dut.g_impl[g].u_parity.u_even.state == 3'd3 && !u_dut.g_impl[g].u_parity.idone_dst)
          wait_idone++;
      end
    end
    always @(posedge clk2) begin
      if (!rst && u_dut.g_impl[g].u_parity.idone_src && !u_dut.g_impl[g].u_parity.ack_idone_dst)
        hold_idone++;
    end

    initial begin
      Start[g]  = 1'b0;
      Inport[g] = '0;
      @(negedge rst);
      for (int i = 0; i < NWORDS; i++) begin
        longint t0;
        int n;
        n = popcount(words[i]);
        @(negedge clk1);
        Inport[g] = words[i];
        Start[g]  = 1'b1;
        t0 = $time;
        while (!Done[g]) @(negedge clk1);
        if (words[i] == '1) ones_latency[g] = $time - t0;
        check(Outport[g] == W'(n % 2),
              $sformatf("impl %0d word %h: Outport %h, expected %0d", g, words[i], Outport[g], n % 2));
        rounds++;
        per_regime[regime]++;
        if (n % 2 == 1) odd++; else even++;
        if (words[i] == '0) zero_word++;
        if (n == 32) all_ones++;
        if (words[i] > 1) multi_pass++;
        Start[g] = 1'b0;
        while (Done[g]) @(negedge clk1);
        repeat ($urandom_range(3, 0)) @(negedge clk1);
      end
      check(rounds == NWORDS, $sformatf("impl %0d: %0d rounds", g, rounds));
      check(odd > 0,             $sformatf("impl %0d: no odd result", g));
      check(even > 0,            $sformatf("impl %0d: no even result", g));
      check(zero_word > 0,       $sformatf("impl %0d: zero word never run", g));
      check(all_ones > 0,        $sformatf("impl %0d: count wrap never run", g));
      check(multi_pass > 0,      $sformatf("impl %0d: no multi-pass word", g));
      check(wait_ack_istart > 0, $sformatf("impl %0d: never waited for ack_istart", g));
      check(wait_idone > 0,      $sformatf("impl %0d: never waited for idone", g));
      foreach (per_regime[r])
        check(per_regime[r] > 0, $sformatf("impl %0d: no word finished in clock regime %0d", g, r));
      check(hold_idone > 0,      $sformatf("impl %0d: idone never held for ack_idone", g));
      $display("impl %0d: rounds=%0d odd=%0d even=%0d zero=%0d wrap=%0d multi=%0d wait_ack_istart=%0d wait_idone=%0d hold_idone=%0d per_regime=%0d/%0d/%0d latency(32 ones)=%0d",
               g, rounds, odd, even, zero_word, all_ones, multi_pass, wait_ack_istart, wait_idone, hold_idone,
               per_regime[0], per_regime[1], per_regime[2], ones_latency[g]);
      finished++;
    end
  end

  initial begin
    repeat (6) @(negedge clk1);
    rst = 1'b0;
    wait (finished == NIMPL);
    check(ones_latency[0] < ones_latency[3], "reference faster than Design 3");
    check(ones_latency[3] < ones_latency[2], "Design 3 faster than Design 2");
    check(ones_latency[2] < ones_latency[4], "Design 2 faster than Design 4 in clocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk1);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
