// shifter - combinational logical shifter of the component library.
//
// so = si >> amount (op = SH_RIGHT, code 0) or si << amount (op = SH_LEFT,
// code 1), zero filled, as in the library. The amount is a full word; any
// amount of W or more gives 0. No clock.
module shifter
  import parity_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic [W-1:0] si,
  input  logic [W-1:0] amount,
  input  shift_op_e    op,
  output logic [W-1:0] so
);

  always_comb begin
    if (op == SH_RIGHT) so = si >> amount;
    else                so = si << amount;
  end

endmodule
