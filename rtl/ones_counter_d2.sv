// ones_counter_d2 - One's Counter, Design 2: 1 ALU, 1 shifter, 4 registers,
// 3 buses.
//
// Same function and handshake as ones_counter_ref. Each variable has its own
// register, so S1 initialises all of them at once, but the single ALU still
// serialises the loop body:
//
//   S0  wait for istart                       S2  temp   = data & mask   (ALU)
//   S1  data = idata, ocount = 0, mask = 1    X0  ocount = ocount + temp (ALU)
//   S3  iocount = ocount, idone = 1,          X1  data   = data >> mask  (shifter)
//       wait for ack_idone                    X2  data == 0 ? (ALU) -> S3 : S2
//
// bus0 is driven by data or ocount, bus1 by mask or temp, bus2 by the ALU or
// the shifter; bus2 returns to the registers.
// Timing: 2 + 4*(k+1) + 1 clocks from the edge at which S0 samples istart to
// the edge at which idone is seen (k = index of the highest one, 0 for the
// word 0); 131 for 32 ones. The schedule and bus use follow the synthesized
// design; the Moore handshake outputs and iocount taken from bus0 in S3 are
// this design's choices.
module ones_counter_d2
  import parity_pkg::*;
#(
  parameter int unsigned W     = DATA_W,
  parameter int unsigned CNT_W = COUNT_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [W-1:0]     idata,
  output logic [CNT_W-1:0] iocount,
  input  logic             istart,
  output logic             idone,
  output logic             ack_istart,
  input  logic             ack_idone
);

  typedef enum logic [2:0] {S0, S1, S2, S3, X0, X1, X2} state_e;

  typedef struct packed {
    logic [1:0] oe0;        // bus0 drivers: [0] data, [1] ocount
    logic [1:0] oe1;        // bus1 drivers: [0] mask, [1] temp
    logic [1:0] oe2;        // bus2 drivers: [0] ALU,  [1] shifter
    alu_op_e    alu_op;
    logic       alu_b_zero;
    logic       init;       // S1: load idata, 0 and 1
    logic       wr_data;
    logic       wr_temp;
    logic       wr_ocount;
  } ctrl_t;

  state_e state, state_n;
  ctrl_t  ctrl;

  logic [W-1:0] data, mask, temp, ocount;
  logic [W-1:0] bus0, bus1, bus2, alu_b, alu_y, sh_y;

  // ---------------------------------------------------------------- controller
  always_ff @(posedge clk) begin
    if (rst) state <= S0;
    else     state <= state_n;
  end

  always_comb begin
    state_n = state;
    unique case (state)
      S0: if (istart)    state_n = S1;
      S1:                state_n = S2;
      S2:                state_n = X0;
      X0:                state_n = X1;
      X1:                state_n = X2;
      X2: state_n = alu_y[0] ? S3 : S2;
      S3: if (ack_idone) state_n = S0;
      default:           state_n = S0;
    endcase
  end

  always_comb begin
    ctrl = '{alu_op: ALU_ADD, default: '0};
    unique case (state)
      S1: ctrl.init = 1'b1;
      S2: begin
        ctrl.oe0 = 2'b01; ctrl.oe1 = 2'b01; ctrl.alu_op = ALU_AND;
        ctrl.oe2 = 2'b01; ctrl.wr_temp = 1'b1;
      end
      X0: begin
        ctrl.oe0 = 2'b10; ctrl.oe1 = 2'b10; ctrl.alu_op = ALU_ADD;
        ctrl.oe2 = 2'b01; ctrl.wr_ocount = 1'b1;
      end
      X1: begin
        ctrl.oe0 = 2'b01; ctrl.oe1 = 2'b01;
        ctrl.oe2 = 2'b10; ctrl.wr_data = 1'b1;
      end
      X2: begin
        ctrl.oe0 = 2'b01; ctrl.alu_op = ALU_EQ; ctrl.alu_b_zero = 1'b1;
      end
      S3: ctrl.oe0 = 2'b10;
      default: ;
    endcase
  end

  assign ack_istart = (state != S0);
  assign idone      = (state == S3);

  // ------------------------------------------------------------------ datapath
  reg32 #(.W(W)) u_data   (.clk, .rst, .din(ctrl.init ? idata : bus2), .write(ctrl.init | ctrl.wr_data),   .dout(data));
  reg32 #(.W(W)) u_mask   (.clk, .rst, .din(W'(1)),                      .write(ctrl.init),                  .dout(mask));
  reg32 #(.W(W)) u_temp   (.clk, .rst, .din(bus2),                       .write(ctrl.wr_temp),               .dout(temp));
  reg32 #(.W(W)) u_ocount (.clk, .rst, .din(ctrl.init ? '0 : bus2),      .write(ctrl.init | ctrl.wr_ocount), .dout(ocount));

  bus_mux #(.W(W), .N(2)) u_bus0 (.drv({ocount, data}), .oe(ctrl.oe0), .bus(bus0));
  bus_mux #(.W(W), .N(2)) u_bus1 (.drv({temp, mask}),   .oe(ctrl.oe1), .bus(bus1));

  assign alu_b = ctrl.alu_b_zero ? '0 : bus1;

  alu #(.W(W)) u_alu0 (.a(bus0), .b(alu_b), .op(ctrl.alu_op), .y(alu_y));

  shifter #(.W(W)) u_shift0 (.si(bus0), .amount(bus1), .op(SH_RIGHT), .so(sh_y));

  bus_mux #(.W(W), .N(2)) u_bus2 (.drv({sh_y, alu_y}), .oe(ctrl.oe2), .bus(bus2));

  assign iocount = bus0[CNT_W-1:0];

endmodule
