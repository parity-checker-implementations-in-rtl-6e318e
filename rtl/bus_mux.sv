// bus_mux - a shared bus with N drivers.
//
// The library bus is a plain W-bit connection that several units drive in
// turn. Its drivers are modelled as an AND-OR multiplexer: drv[i] reaches the
// bus while oe[i] is high, and a bus nobody drives reads 0. At most one
// driver may be enabled at a time; an assertion reports a conflict.
// Purely combinational.
module bus_mux
  import parity_pkg::*;
#(
  parameter int unsigned W = DATA_W,
  parameter int unsigned N = 2
) (
  input  logic [N-1:0][W-1:0] drv,
  input  logic [N-1:0]        oe,
  output logic [W-1:0]        bus
);

  always_comb begin
    bus = '0;
    for (int i = 0; i < N; i++) begin
      if (oe[i]) bus |= drv[i];
    end
  end

  always_comb begin
    assert ((oe & (oe - 1'b1)) == '0)
      else $error("bus_mux: more than one driver enabled (oe=%b)", oe);
  end

endmodule
