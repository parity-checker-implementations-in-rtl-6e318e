// parity_checker - Even Checker plus One's Counter: outputs 1 when the input
// word has an odd number of ones.
//
// The Even Checker (clock clk1) takes the word on Start, hands it to the
// One's Counter (clock clk2) over idata, and turns the returned count into
// the parity bit on Outport, raising Done. The two controllers are separate
// FSMs talking through two four-phase handshakes, istart/ack_istart and
// idone/ack_idone, so the halves may run at different clock rates.
//
// Interface: Start is a level; after Done rises the environment must drop
// Start before the Even Checker returns to its idle state, or a new round
// begins with the same Inport. Outport holds {31'b0, parity} from the cycle
// Done rises until the next result is written. rst is synchronous and must
// be held for at least SYNC_STAGES + 1 cycles of the slower clock.
//
// ONES_IMPL picks the One's Counter: 0 = the reference structure with one
// unit per operation, 1..5 = the five resource-constrained designs. All six
// have the same ports and function and differ in cost and clock cycles.
//
// The four handshake signals cross between the clock domains through
// SYNC_STAGES flip-flops each (0 = no synchronizer, for clk1 == clk2); the
// synchronizers are this design's addition. idata and iocount are not
// synchronized: the handshake keeps each stable while the other side reads
// it.
module parity_checker
  import parity_pkg::*;
#(
  parameter int unsigned W           = DATA_W,
  parameter int unsigned CNT_W       = COUNT_W,
  parameter int unsigned ONES_IMPL   = 0,
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic         clk1,
  input  logic         clk2,
  input  logic         rst,
  input  logic [W-1:0] Inport,
  output logic [W-1:0] Outport,
  input  logic         Start,
  output logic         Done
);

  logic [W-1:0]     idata;
  logic [CNT_W-1:0] iocount;
  // each handshake signal on the side that drives it (_src) and after the
  // synchronizer on the side that reads it (_dst)
  logic istart_src, istart_dst;
  logic ack_istart_src, ack_istart_dst;
  logic idone_src, idone_dst;
  logic ack_idone_src, ack_idone_dst;

  even_checker #(.W(W), .CNT_W(CNT_W)) u_even (
    .clk        (clk1),
    .rst        (rst),
    .Inport     (Inport),
    .Outport    (Outport),
    .Start      (Start),
    .Done       (Done),
    .idata      (idata),
    .iocount    (iocount),
    .istart     (istart_src),
    .idone      (idone_dst),
    .ack_istart (ack_istart_dst),
    .ack_idone  (ack_idone_src)
  );

  sync_ff #(.STAGES(SYNC_STAGES)) u_sync_istart     (.clk(clk2), .rst, .d(istart_src),     .q(istart_dst));
  sync_ff #(.STAGES(SYNC_STAGES)) u_sync_ack_idone  (.clk(clk2), .rst, .d(ack_idone_src),  .q(ack_idone_dst));
  sync_ff #(.STAGES(SYNC_STAGES)) u_sync_ack_istart (.clk(clk1), .rst, .d(ack_istart_src), .q(ack_istart_dst));
  sync_ff #(.STAGES(SYNC_STAGES)) u_sync_idone      (.clk(clk1), .rst, .d(idone_src),      .q(idone_dst));

  if (ONES_IMPL == 0) begin : g_ref
    ones_counter_ref #(.W(W), .CNT_W(CNT_W)) u_ones (
      .clk(clk2), .rst, .idata, .iocount, .istart(istart_dst), .idone(idone_src),
      .ack_istart(ack_istart_src), .ack_idone(ack_idone_dst));
  end else if (ONES_IMPL == 1) begin : g_d1
    ones_counter_d1 #(.W(W), .CNT_W(CNT_W)) u_ones (
      .clk(clk2), .rst, .idata, .iocount, .istart(istart_dst), .idone(idone_src),
      .ack_istart(ack_istart_src), .ack_idone(ack_idone_dst));
  end else if (ONES_IMPL == 2) begin : g_d2
    ones_counter_d2 #(.W(W), .CNT_W(CNT_W)) u_ones (
      .clk(clk2), .rst, .idata, .iocount, .istart(istart_dst), .idone(idone_src),
      .ack_istart(ack_istart_src), .ack_idone(ack_idone_dst));
  end else if (ONES_IMPL == 3) begin : g_d3
    ones_counter_d3 #(.W(W), .CNT_W(CNT_W)) u_ones (
      .clk(clk2), .rst, .idata, .iocount, .istart(istart_dst), .idone(idone_src),
      .ack_istart(ack_istart_src), .ack_idone(ack_idone_dst));
  end else if (ONES_IMPL == 4) begin : g_d4
    ones_counter_d4 #(.W(W), .CNT_W(CNT_W)) u_ones (
      .clk(clk2), .rst, .idata, .iocount, .istart(istart_dst), .idone(idone_src),
      .ack_istart(ack_istart_src), .ack_idone(ack_idone_dst));
  end else begin : g_d5
    ones_counter_d5 #(.W(W), .CNT_W(CNT_W)) u_ones (
      .clk(clk2), .rst, .idata, .iocount, .istart(istart_dst), .idone(idone_src),
      .ack_istart(ack_istart_src), .ack_idone(ack_idone_dst));
  end

  // Handshake rules (checked in simulation): a request is held until it is
  // acknowledged, and an acknowledge is not raised without its request.
  property p_hold(logic req, logic ack);
    @(posedge clk1) disable iff (rst) (req && !ack) |=> req;
  endproperty
  a_istart_held: assert property (p_hold(istart_src, ack_istart_dst))
    else $error("parity_checker: istart dropped before ack_istart");
  a_ack_idone_needs_idone: assert property (@(posedge clk1) disable iff (rst)
    $rose(ack_idone_src) |-> idone_dst)
    else $error("parity_checker: ack_idone raised without idone");

endmodule
