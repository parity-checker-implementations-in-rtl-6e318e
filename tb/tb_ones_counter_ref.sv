// tb_ones_counter_ref - self-checking testbench of ones_counter_ref.
//
// Runs the shared ones_harness with IMPL = 0: fixed and random words, the
// counted value against a population count, the full handshake, and the
// clock count of every word against the implementation's state schedule.
module tb_ones_counter_ref;
  ones_harness #(.IMPL(0)) u_harness ();
endmodule
