// reg32 - single register of the component library.
//
// Stores din at the rising clock edge while write is high and shows the
// stored word on dout at all times. rst (synchronous) clears it. The
// library's separate read strobe is not modelled: which register reaches a
// bus is decided by the bus drivers (bus_mux).
module reg32
  import parity_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] din,
  input  logic         write,
  output logic [W-1:0] dout
);

  always_ff @(posedge clk) begin
    if (rst)        dout <= '0;
    else if (write) dout <= din;
  end

endmodule
