// ones_counter_d5 - One's Counter, Design 5: 2 pipelined ALUs, 1 pipelined
// shifter, 4 registers, 5 buses.
//
// Same function and handshake as ones_counter_ref, combining Design 3's
// resources with Design 4's two-stage pipelined units. Operations issued in
// one state deliver their results in the next:
//
//   S0  wait for istart
//   S1  data = idata, ocount = 0, mask = 1
//   S2  issue data & mask (ALU0) and data >> mask (shifter)
//   X0  temp = ALU0 result, data = shifter result
//   X1  issue data == 0 (ALU0) and ocount + temp (ALU1)
//   X2  ocount = ALU1 result; ALU0 result ? -> S3 : S2
//   S3  iocount = ocount, idone = 1, wait for ack_idone
//
// Buses: bus0 carries data; bus1 mask or ocount; bus2 temp or the ALU0
// result; bus3 the shifter result; bus4 the ALU1 result.
// Timing: 2 + 4*(k+1) + 1 clocks from the edge at which S0 samples istart to
// the edge at which idone is seen (k = index of the highest one, 0 for the
// word 0); 131 for 32 ones. The states, operations per state and bus use
// follow the synthesized design (whose results appear one state after
// issue, X0 being the pipeline wait); the Moore handshake outputs and
// iocount taken from bus1 in S3 are this design's choices.
module ones_counter_d5
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
    logic       oe0;        // bus0 driver: data
    logic [1:0] oe1;        // bus1 drivers: [0] mask, [1] ocount
    logic [1:0] oe2;        // bus2 drivers: [0] temp, [1] ALU0
    logic       oe3;        // bus3 driver: shifter
    logic       oe4;        // bus4 driver: ALU1
    alu_op_e    alu0_op;
    logic       alu0_b_zero;
    logic       init;
    logic       wr_data;
    logic       wr_temp;
    logic       wr_ocount;
  } ctrl_t;

  state_e state, state_n;
  ctrl_t  ctrl;

  logic [W-1:0] data, mask, temp, ocount;
  logic [W-1:0] bus0, bus1, bus2, bus3, bus4, alu0_b, alu0_y, alu1_y, sh_y;

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
      X2: state_n = alu0_y[0] ? S3 : S2;
      S3: if (ack_idone) state_n = S0;
      default:           state_n = S0;
    endcase
  end

  always_comb begin
    ctrl = '{alu0_op: ALU_ADD, default: '0};
    unique case (state)
      S1: ctrl.init = 1'b1;
      S2: begin
        ctrl.oe0 = 1'b1; ctrl.oe1 = 2'b01; ctrl.alu0_op = ALU_AND;
      end
      X0: begin
        ctrl.oe2 = 2'b10; ctrl.wr_temp = 1'b1;
        ctrl.oe3 = 1'b1;  ctrl.wr_data = 1'b1;
      end
      X1: begin
        ctrl.oe0 = 1'b1; ctrl.alu0_op = ALU_EQ; ctrl.alu0_b_zero = 1'b1;
        ctrl.oe1 = 2'b10; ctrl.oe2 = 2'b01;
      end
      X2: begin
        ctrl.oe4 = 1'b1; ctrl.wr_ocount = 1'b1;
      end
      S3: ctrl.oe1 = 2'b10;
      default: ;
    endcase
  end

  assign ack_istart = (state != S0);
  assign idone      = (state == S3);

  // ------------------------------------------------------------------ datapath
  reg32 #(.W(W)) u_data   (.clk, .rst, .din(ctrl.init ? idata : bus3), .write(ctrl.init | ctrl.wr_data),   .dout(data));
  reg32 #(.W(W)) u_mask   (.clk, .rst, .din(W'(1)),                      .write(ctrl.init),                  .dout(mask));
  reg32 #(.W(W)) u_temp   (.clk, .rst, .din(bus2),                       .write(ctrl.wr_temp),               .dout(temp));
  reg32 #(.W(W)) u_ocount (.clk, .rst, .din(ctrl.init ? '0 : bus4),      .write(ctrl.init | ctrl.wr_ocount), .dout(ocount));

  bus_mux #(.W(W), .N(1)) u_bus0 (.drv(data),             .oe(ctrl.oe0), .bus(bus0));
  bus_mux #(.W(W), .N(2)) u_bus1 (.drv({ocount, mask}),   .oe(ctrl.oe1), .bus(bus1));
  bus_mux #(.W(W), .N(2)) u_bus2 (.drv({alu0_y, temp}),   .oe(ctrl.oe2), .bus(bus2));
  bus_mux #(.W(W), .N(1)) u_bus3 (.drv(sh_y),             .oe(ctrl.oe3), .bus(bus3));
  bus_mux #(.W(W), .N(1)) u_bus4 (.drv(alu1_y),           .oe(ctrl.oe4), .bus(bus4));

  assign alu0_b = ctrl.alu0_b_zero ? '0 : bus1;

  alu_pipe #(.W(W)) u_alu0 (.clk, .rst, .a(bus0), .b(alu0_b), .op(ctrl.alu0_op), .y(alu0_y));
  alu_pipe #(.W(W)) u_alu1 (.clk, .rst, .a(bus1), .b(bus2),   .op(ALU_ADD),       .y(alu1_y));

  shifter_pipe #(.W(W)) u_shift0 (.clk, .rst, .si(bus0), .amount(bus1), .op(SH_RIGHT), .so(sh_y));

  assign iocount = bus1[CNT_W-1:0];

endmodule
