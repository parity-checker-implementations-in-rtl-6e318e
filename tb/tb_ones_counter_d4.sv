// tb_ones_counter_d4 - self-checking testbench of ones_counter_d4.
//
// Runs the shared ones_harness with IMPL = 4: fixed and random words, the
// counted value against a population count, the full handshake, and the
// clock count of every word against the implementation's state schedule.
module tb_ones_counter_d4;
  ones_harness #(.IMPL(4)) u_harness ();
endmodule
