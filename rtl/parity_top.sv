// parity_top - all six parity checker implementations side by side.
//
// One parity_checker per One's Counter implementation: index 0 uses the
// reference counter (one unit per operation), index k = 1..5 uses Design k
// (1: 1 ALU + register file; 2: 1 ALU + 4 registers; 3: 2 ALUs + 4
// registers; 4: pipelined ALU and shifter + register file; 5: 2 pipelined
// ALUs + pipelined shifter + 4 registers). The six share clk1 (Even
// Checkers), clk2 (One's Counters) and rst, and each has its own Inport,
// Start, Outport and Done, so the same word can be run through all of them
// to compare their latencies. Each works as described in parity_checker.
module parity_top
  import parity_pkg::*;
#(
  parameter int unsigned W           = DATA_W,
  parameter int unsigned SYNC_STAGES = 2,
  localparam int unsigned NIMPL      = 6
) (
  input  logic                    clk1,
  input  logic                    clk2,
  input  logic                    rst,
  input  logic [NIMPL-1:0][W-1:0] Inport,
  input  logic [NIMPL-1:0]        Start,
  output logic [NIMPL-1:0][W-1:0] Outport,
  output logic [NIMPL-1:0]        Done
);

  for (genvar i = 0; i < NIMPL; i++) begin : g_impl
    parity_checker #(
      .W           (W),
      .ONES_IMPL   (i),
      .SYNC_STAGES (SYNC_STAGES)
    ) u_parity (
      .clk1    (clk1),
      .clk2    (clk2),
      .rst     (rst),
      .Inport  (Inport[i]),
      .Outport (Outport[i]),
      .Start   (Start[i]),
      .Done    (Done[i])
    );
  end

endmodule
