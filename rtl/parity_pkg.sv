// parity_pkg - shared types and constants of the parity checker.
//
// Holds the default word widths and the operation codes of the component
// library (ALU and shifter). The ALU codes 0..8 follow the library's own
// numbering (add, sub, <, <=, >, >=, !=, ==, and); or, not and negate are the
// further operations the library's component table lists, numbered 9..11 by
// this design. All compares are unsigned and yield 0 or 1.
package parity_pkg;

  localparam int unsigned DATA_W = 32;  // Inport / idata / Outport width
  localparam int unsigned COUNT_W = 5;  // iocount width

  typedef enum logic [3:0] {
    ALU_ADD = 4'd0,
    ALU_SUB = 4'd1,
    ALU_LT  = 4'd2,
    ALU_LE  = 4'd3,
    ALU_GT  = 4'd4,
    ALU_GE  = 4'd5,
    ALU_NE  = 4'd6,
    ALU_EQ  = 4'd7,
    ALU_AND = 4'd8,
    ALU_OR  = 4'd9,
    ALU_NOT = 4'd10,
    ALU_NEG = 4'd11
  } alu_op_e;

  typedef enum logic {
    SH_RIGHT = 1'b0,
    SH_LEFT  = 1'b1
  } shift_op_e;

endpackage
