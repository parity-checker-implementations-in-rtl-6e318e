// ones_counter_ref - the One's Counter with one unit per operation.
//
// Counts the ones in idata by testing bit 0 and shifting right until the
// word is zero. This is the reference structure: four registers (data, mask,
// temp, ocount), dedicated AND, adder and right-shifter units and a NOR
// zero detector on the shifter output, so one bit is handled per clock.
//
//   S0  idone=0 ack_istart=0                         -> S1 when istart
//   S1  ack_istart=1, data=idata, ocount=0, mask=1   -> S2
//   S2  temp=data&mask; ocount=ocount+temp; data=data>>mask
//                                                    -> S3 when new data==0
//   S3  iocount=ocount, idone=1                      -> S0 when ack_idone
//
// Timing: a word whose highest one is bit k (or the word 0, k=0) needs
// 2 + (k+1) + 1 clocks from the edge at which S0 samples istart to the edge
// at which idone is seen high; 35 for 32 ones.
// States, registers and units follow the document. This design's own
// choices: the AND result feeds the adder in the same cycle (temp is also
// stored); ack_istart = (state != S0) and idone = (state == S3) are decoded
// from the state; iocount is the low CNT_W bits of ocount, so 32 ones read as
// 0 with CNT_W = 5 (bit 0, the parity, is always right). Synchronous reset.
// temp is kept because the structure has it, although nothing reads it (a
// lint tool reports it unused; synthesis removes it).
module ones_counter_ref
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

  typedef enum logic [1:0] {S0, S1, S2, S3} state_e;

  state_e       state, state_n;
  logic [W-1:0] data, mask, temp, ocount;
  logic [W-1:0] and_y, add_y, shr_y;
  logic         zero;   // NOR of the shifter output

  // ------------------------------------------------------------------ datapath
  assign and_y = data & mask;
  assign add_y = ocount + and_y;
  assign shr_y = data >> mask;
  assign zero  = ~|shr_y;

  always_ff @(posedge clk) begin
    if (rst) begin
      data   <= '0;
      mask   <= '0;
      temp   <= '0;
      ocount <= '0;
    end else begin
      unique case (state)
        S1: begin
          data   <= idata;
          ocount <= '0;
          mask   <= W'(1);
        end
        S2: begin
          temp   <= and_y;
          ocount <= add_y;
          data   <= shr_y;
        end
        default: ;
      endcase
    end
  end

  assign iocount = ocount[CNT_W-1:0];

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
      S2: if (zero)      state_n = S3;
      S3: if (ack_idone) state_n = S0;
      default:           state_n = S0;
    endcase
  end

  assign ack_istart = (state != S0);
  assign idone      = (state == S3);

endmodule
