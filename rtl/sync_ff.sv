// sync_ff - flip-flop chain that brings a level signal into a clock domain.
//
// The parity checker's two halves may run on different clocks and talk
// through four level-sensitive handshake signals. Each crossing passes
// through STAGES flip-flops clocked by the receiving domain; STAGES = 0 is a
// plain wire for use when both halves share one clock. Adds STAGES cycles of
// latency. The synchronizer is this design's addition; reset clears it.
module sync_ff #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,
  input  logic rst,
  input  logic d,
  output logic q
);

  if (STAGES == 0) begin : g_wire
    assign q = d;
  end else begin : g_sync
    logic [STAGES-1:0] chain;
    always_ff @(posedge clk) begin
      if (rst) chain <= '0;
      else     chain <= (chain << 1) | STAGES'(d);
    end
    assign q = chain[STAGES-1];
  end

endmodule
