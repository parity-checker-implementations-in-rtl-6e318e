// ones_counter_d3 - One's Counter, Design 3: 2 ALUs, 1 shifter, 4 registers,
// 5 buses (the fastest allocation).
//
// Same function and handshake as ones_counter_ref. With a second ALU the loop
// body takes two states:
//
//   S0  wait for istart
//   S1  data = idata, ocount = 0, mask = 1
//   S2  temp = data & mask (ALU0)  and  data = data >> mask (shifter)
//   X0  ocount = ocount + temp (ALU0)  and  data == 0 ? (ALU1) -> S3 : S2
//   S3  iocount = ocount, idone = 1, wait for ack_idone
//
// Buses: bus0 carries data; bus1 mask or temp; bus2 the shifter result or
// ocount; bus3 the ALU0 result. Of the five buses allocated only these four
// carry anything, so the fifth is not built.
// Timing: 2 + 2*(k+1) + 1 clocks from the edge at which S0 samples istart to
// the edge at which idone is seen (k = index of the highest one, 0 for the
// word 0); 67 for 32 ones. The schedule and bus use follow the synthesized
// design; the Moore handshake outputs and iocount taken from bus2 in S3 are
// this design's choices. ALU1 only compares, so only bit 0 of its result
// is used.
module ones_counter_d3
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

  typedef enum logic [2:0] {S0, S1, S2, S3, X0} state_e;

  typedef struct packed {
    logic       oe0;        // bus0 driver: data
    logic [1:0] oe1;        // bus1 drivers: [0] mask, [1] temp
    logic [1:0] oe2;        // bus2 drivers: [0] shifter, [1] ocount
    logic       oe3;        // bus3 driver: ALU0
    alu_op_e    alu0_op;
    logic       alu0_a_bus2; // ALU0 operand A from bus2 instead of bus0
    logic       init;
    logic       wr_data;
    logic       wr_temp;
    logic       wr_ocount;
  } ctrl_t;

  state_e state, state_n;
  ctrl_t  ctrl;

  logic [W-1:0] data, mask, temp, ocount;
  logic [W-1:0] bus0, bus1, bus2, bus3, alu0_a, alu0_y, alu1_y, sh_y;

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
      X0: state_n = alu1_y[0] ? S3 : S2;
      S3: if (ack_idone) state_n = S0;
      default:           state_n = S0;
    endcase
  end

  always_comb begin
    ctrl = '{alu0_op: ALU_ADD, default: '0};
    unique case (state)
      S1: ctrl.init = 1'b1;
      S2: begin
        ctrl.oe0 = 1'b1; ctrl.oe1 = 2'b01;
        ctrl.alu0_op = ALU_AND; ctrl.oe3 = 1'b1; ctrl.wr_temp = 1'b1;
        ctrl.oe2 = 2'b01; ctrl.wr_data = 1'b1;
      end
      X0: begin
        ctrl.oe2 = 2'b10; ctrl.oe1 = 2'b10; ctrl.alu0_a_bus2 = 1'b1;
        ctrl.alu0_op = ALU_ADD; ctrl.oe3 = 1'b1; ctrl.wr_ocount = 1'b1;
        ctrl.oe0 = 1'b1;
      end
      S3: ctrl.oe2 = 2'b10;
      default: ;
    endcase
  end

  assign ack_istart = (state != S0);
  assign idone      = (state == S3);

  // ------------------------------------------------------------------ datapath
  reg32 #(.W(W)) u_data   (.clk, .rst, .din(ctrl.init ? idata : bus2), .write(ctrl.init | ctrl.wr_data),   .dout(data));
  reg32 #(.W(W)) u_mask   (.clk, .rst, .din(W'(1)),                      .write(ctrl.init),                  .dout(mask));
  reg32 #(.W(W)) u_temp   (.clk, .rst, .din(bus3),                       .write(ctrl.wr_temp),               .dout(temp));
  reg32 #(.W(W)) u_ocount (.clk, .rst, .din(ctrl.init ? '0 : bus3),      .write(ctrl.init | ctrl.wr_ocount), .dout(ocount));

  bus_mux #(.W(W), .N(1)) u_bus0 (.drv(data),           .oe(ctrl.oe0), .bus(bus0));
  bus_mux #(.W(W), .N(2)) u_bus1 (.drv({temp, mask}),   .oe(ctrl.oe1), .bus(bus1));
  bus_mux #(.W(W), .N(2)) u_bus2 (.drv({ocount, sh_y}), .oe(ctrl.oe2), .bus(bus2));
  bus_mux #(.W(W), .N(1)) u_bus3 (.drv(alu0_y),         .oe(ctrl.oe3), .bus(bus3));

  assign alu0_a = ctrl.alu0_a_bus2 ? bus2 : bus0;

  alu #(.W(W)) u_alu0 (.a(alu0_a), .b(bus1), .op(ctrl.alu0_op), .y(alu0_y));
  alu #(.W(W)) u_alu1 (.a(bus0),   .b('0),   .op(ALU_EQ),       .y(alu1_y));

  shifter #(.W(W)) u_shift0 (.si(bus0), .amount(bus1), .op(SH_RIGHT), .so(sh_y));

  assign iocount = bus2[CNT_W-1:0];

endmodule
