// even_checker - the Even Checker half of the parity checker.
//
// A five-state FSMD (controller + datapath). It waits for Start, copies
// Inport into its data register, offers the word to the One's Counter on
// idata with the istart/ack_istart handshake, collects the count from
// iocount while waiting for idone, and finally writes (count AND mask) -
// bit 0 of the count, i.e. 1 for an odd number of ones - to Outport, raising
// Done and ack_idone until the One's Counter drops idone.
//
//   S0  Done=0 istart=0 ack_idone=0        -> S1 when Start
//   S1  mask=1, data=Inport                -> S2
//   S2  idata=data, istart=1               -> S3 when ack_istart
//   S3  istart=0, ocount=iocount           -> S4 when idone
//   S4  Outport=ocount&mask, ack_idone=1, Done=1   -> S0 when !idone
//
// The states, their actions and the datapath (a small register file for
// data, mask and ocount, one input multiplexer for Inport / iocount, and an
// AND unit between the two read buses) follow the document. This design's
// own choices: the handshake and Done outputs are decoded from the state
// register (Moore outputs); the register file has one write enable per entry
// so that S1 can set mask and data together; mask is loaded from the
// constant 1. Outport is the AND unit's output, as wired in the structure:
// the left bus carries data in S1, S2 and S3 (it also feeds idata, which
// must hold until the One's Counter has taken the word, however slow its
// clock) and ocount in S0 and S4, so Outport is valid from the cycle Done
// rises until the next Start is taken, and shows intermediate values while a
// word is being processed. Reset is synchronous and returns to S0 with all
// registers cleared. All handshake inputs must already be synchronous to clk.
module even_checker
  import parity_pkg::*;
#(
  parameter int unsigned W     = DATA_W,
  parameter int unsigned CNT_W = COUNT_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [W-1:0]     Inport,
  output logic [W-1:0]     Outport,
  input  logic             Start,
  output logic             Done,
  output logic [W-1:0]     idata,
  input  logic [CNT_W-1:0] iocount,
  output logic             istart,
  input  logic             idone,
  input  logic             ack_istart,
  output logic             ack_idone
);

  typedef enum logic [2:0] {S0, S1, S2, S3, S4} state_e;

  // register file entries
  typedef enum logic [1:0] {R_DATA = 2'd0, R_MASK = 2'd1, R_OCOUNT = 2'd2} ereg_e;

  // control word produced by the output logic
  typedef struct packed {
    ereg_e bus_a;       // entry read onto the left bus (data or ocount)
    logic  wr_data;     // data   <= Inport
    logic  wr_mask;     // mask   <= 1
    logic  wr_ocount;   // ocount <= iocount
  } ctrl_t;

  state_e state, state_n;
  ctrl_t  ctrl;

  // ---------------------------------------------------------------- controller
  always_ff @(posedge clk) begin
    if (rst) state <= S0;
    else     state <= state_n;
  end

  always_comb begin
    state_n = state;
    unique case (state)
      S0: if (Start)      state_n = S1;
      S1:                 state_n = S2;
      S2: if (ack_istart) state_n = S3;
      S3: if (idone)      state_n = S4;
      S4: if (!idone)     state_n = S0;
      default:            state_n = S0;
    endcase
  end

  always_comb begin
    ctrl = '{bus_a: R_OCOUNT, default: 1'b0};
    unique case (state)
      S1: begin ctrl.bus_a = R_DATA; ctrl.wr_data = 1'b1; ctrl.wr_mask = 1'b1; end
      S2: ctrl.bus_a = R_DATA;
      S3: begin ctrl.bus_a = R_DATA; ctrl.wr_ocount = 1'b1; end
      default: ;
    endcase
  end

  assign Done      = (state == S4);
  assign ack_idone = (state == S4);
  assign istart    = (state == S2);

  // ------------------------------------------------------------------ datapath
  logic [W-1:0] rf [3];
  logic [W-1:0] bus_a, bus_b, and_y;

  always_ff @(posedge clk) begin
    if (rst) begin
      rf[R_DATA]   <= '0;
      rf[R_MASK]   <= '0;
      rf[R_OCOUNT] <= '0;
    end else begin
      if (ctrl.wr_data)   rf[R_DATA]   <= Inport;
      if (ctrl.wr_mask)   rf[R_MASK]   <= W'(1);
      if (ctrl.wr_ocount) rf[R_OCOUNT] <= W'(iocount);
    end
  end

  assign bus_a = rf[ctrl.bus_a];
  assign bus_b = rf[R_MASK];
  assign idata   = bus_a;
  assign Outport = and_y;

  alu #(.W(W)) u_and (
    .a (bus_a),
    .b (bus_b),
    .op(ALU_AND),
    .y (and_y)
  );

endmodule
