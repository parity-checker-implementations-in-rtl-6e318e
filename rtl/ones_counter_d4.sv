// ones_counter_d4 - One's Counter, Design 4: 1 pipelined ALU, 1 pipelined
// shifter, 1 register file, 3 buses.
//
// Same function and handshake as ones_counter_ref, with the resources of
// Design 1 but two-stage pipelined ALU and shifter, which halve the longest
// combinational path. An operation issued in one state (operands read from
// the register file, first stage computed) delivers its result in the next
// state, where it is written back over bus2 while the next operation is
// issued:
//
//   S0  wait for istart
//   S1  data = idata      X0  ocount = 0      X1  mask = 1
//   S2  issue data & mask (ALU)
//   X2  temp = ALU result;    issue data >> mask (shifter)
//   X3  data = shifter result; issue ocount + temp (ALU)
//   X4  ocount = ALU result;  issue data == 0 (ALU)
//   X5  ALU result ? -> S3 : S2
//   S3  iocount = ocount, idone = 1, wait for ack_idone
//
// Register file entries: 0 data, 1 ocount, 2 mask, 3 temp; its write
// multiplexer takes idata, 0, 1 and bus2.
// Timing: 4 + 5*(k+1) + 1 clocks from the edge at which S0 samples istart to
// the edge at which idone is seen (k = index of the highest one, 0 for the
// word 0); 165 for 32 ones. The state list, the five-state loop and the
// resources follow the synthesized design; the placement of issue and
// write-back within the loop is this design's reading of it, as are the Moore
// handshake outputs and iocount taken from bus0 in S3.
module ones_counter_d4
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

  typedef enum logic [3:0] {S0, S1, S2, S3, X0, X1, X2, X3, X4, X5} state_e;
  typedef enum logic [1:0] {R_DATA = 2'd0, R_OCOUNT = 2'd1, R_MASK = 2'd2, R_TEMP = 2'd3} rf_addr_e;
  typedef enum logic [1:0] {WS_IDATA, WS_ZERO, WS_ONE, WS_BUS2} wsel_e;

  typedef struct packed {
    rf_addr_e   ra_a;
    logic       re_a;
    rf_addr_e   ra_b;
    logic       re_b;
    rf_addr_e   wa;
    logic       we;
    wsel_e      wsel;
    alu_op_e    alu_op;
    logic       alu_b_zero;
    logic [1:0] oe2;        // bus2 drivers: [0] ALU, [1] shifter
  } ctrl_t;

  state_e state, state_n;
  ctrl_t  ctrl;

  logic [W-1:0] bus0, bus1, bus2, rf_in, alu_b, alu_y, sh_y;

  // ---------------------------------------------------------------- controller
  always_ff @(posedge clk) begin
    if (rst) state <= S0;
    else     state <= state_n;
  end

  always_comb begin
    state_n = state;
    unique case (state)
      S0: if (istart)    state_n = S1;
      S1:                state_n = X0;
      X0:                state_n = X1;
      X1:                state_n = S2;
      S2:                state_n = X2;
      X2:                state_n = X3;
      X3:                state_n = X4;
      X4:                state_n = X5;
      X5: state_n = alu_y[0] ? S3 : S2;
      S3: if (ack_idone) state_n = S0;
      default:           state_n = S0;
    endcase
  end

  always_comb begin
    ctrl = '{ra_a: R_DATA, ra_b: R_DATA, wa: R_DATA, wsel: WS_BUS2,
             alu_op: ALU_ADD, oe2: 2'b00, default: 1'b0};
    unique case (state)
      S1: begin ctrl.wa = R_DATA;   ctrl.we = 1'b1; ctrl.wsel = WS_IDATA; end
      X0: begin ctrl.wa = R_OCOUNT; ctrl.we = 1'b1; ctrl.wsel = WS_ZERO;  end
      X1: begin ctrl.wa = R_MASK;   ctrl.we = 1'b1; ctrl.wsel = WS_ONE;   end
      S2: begin
        ctrl.ra_a = R_DATA; ctrl.re_a = 1'b1;
        ctrl.ra_b = R_MASK; ctrl.re_b = 1'b1;
        ctrl.alu_op = ALU_AND;
      end
      X2: begin
        ctrl.oe2 = 2'b01; ctrl.wa = R_TEMP; ctrl.we = 1'b1;
        ctrl.ra_a = R_DATA; ctrl.re_a = 1'b1;
        ctrl.ra_b = R_MASK; ctrl.re_b = 1'b1;
      end
      X3: begin
        ctrl.oe2 = 2'b10; ctrl.wa = R_DATA; ctrl.we = 1'b1;
        ctrl.ra_a = R_OCOUNT; ctrl.re_a = 1'b1;
        ctrl.ra_b = R_TEMP;   ctrl.re_b = 1'b1;
        ctrl.alu_op = ALU_ADD;
      end
      X4: begin
        ctrl.oe2 = 2'b01; ctrl.wa = R_OCOUNT; ctrl.we = 1'b1;
        ctrl.ra_a = R_DATA; ctrl.re_a = 1'b1;
        ctrl.alu_op = ALU_EQ; ctrl.alu_b_zero = 1'b1;
      end
      S3: begin ctrl.ra_a = R_OCOUNT; ctrl.re_a = 1'b1; end
      default: ;
    endcase
  end

  assign ack_istart = (state != S0);
  assign idone      = (state == S3);

  // ------------------------------------------------------------------ datapath
  always_comb begin
    unique case (ctrl.wsel)
      WS_IDATA: rf_in = idata;
      WS_ZERO:  rf_in = '0;
      WS_ONE:   rf_in = W'(1);
      default:  rf_in = bus2;
    endcase
  end

  reg_file #(.W(W), .DEPTH(4)) u_rf (
    .clk (clk),         .rst (rst),
    .inp (rf_in),       .wa  (ctrl.wa),   .we (ctrl.we),
    .raA (ctrl.ra_a),   .reA (ctrl.re_a), .outA(bus0),
    .raB (ctrl.ra_b),   .reB (ctrl.re_b), .outB(bus1)
  );

  assign alu_b = ctrl.alu_b_zero ? '0 : bus1;

  alu_pipe #(.W(W)) u_alu0 (.clk, .rst, .a(bus0), .b(alu_b), .op(ctrl.alu_op), .y(alu_y));

  shifter_pipe #(.W(W)) u_shift0 (.clk, .rst, .si(bus0), .amount(bus1), .op(SH_RIGHT), .so(sh_y));

  bus_mux #(.W(W), .N(2)) u_bus2 (.drv({sh_y, alu_y}), .oe(ctrl.oe2), .bus(bus2));

  assign iocount = bus0[CNT_W-1:0];

endmodule
