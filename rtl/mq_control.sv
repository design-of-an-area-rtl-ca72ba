// mq_control: control unit of the MQ encoder.
//
// A small state machine that sequences one coded message:
//   IDLE  --start-->  RUN      (init pulse: A, C, CT, B, contexts, FIFO reset)
//   RUN   --flush_req accepted--> DRAIN  (input pairs accepted while in RUN)
//   DRAIN --> FLUSH   (the last pair leaves stage 1 for stage 2)
//   FLUSH --> FINAL   (flush cycle: SETBITS and two byte-outs)
//   FINAL --> DONE    (last pending byte written unless 0xFF)
//   DONE  --FIFO empty--> IDLE, with a one-cycle done pulse.
// Back-pressure: the whole pipeline advances only while at least two FIFO
// entries are free, because a cycle may write two bytes; otherwise every
// stage holds (stall) and in_ready is low. A pair and flush_req offered in
// the same RUN cycle are both accepted, the pair first.
module mq_control #(
  parameter int unsigned FREE_W = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              flush_req,
  input  logic [FREE_W-1:0] fifo_free,
  input  logic              fifo_empty,
  output logic              init,
  output logic              advance,
  output logic              in_ready,
  output logic              flush,
  output logic              final_push,
  output logic              busy,
  output logic              done,
  output logic              stall
);

  typedef enum logic [2:0] {IDLE, RUN, DRAIN, FLUSH, FINAL, DONE} state_t;
  state_t state_q, state_d;

  always_comb begin
    advance     = (fifo_free >= FREE_W'(2));
    stall       = (state_q != IDLE) & (state_q != DONE) & ~advance;
    init        = (state_q == IDLE) & start;
    in_ready    = (state_q == RUN) & advance;
    flush       = (state_q == FLUSH) & advance;
    final_push  = (state_q == FINAL) & advance;
    busy        = (state_q != IDLE);
    done        = (state_q == DONE) & fifo_empty;
    state_d     = state_q;
    unique case (state_q)
      IDLE:  if (start)                   state_d = RUN;
      RUN:   if (flush_req & in_ready)    state_d = DRAIN;
      DRAIN: if (advance)                 state_d = FLUSH;
      FLUSH: if (advance)                 state_d = FINAL;
      FINAL: if (advance)                 state_d = DONE;
      DONE:  if (fifo_empty)              state_d = IDLE;
      default:                            state_d = IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state_q <= IDLE;
    else        state_q <= state_d;
  end

endmodule
