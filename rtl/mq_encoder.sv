// mq_encoder: three-stage pipelined MQ (context-based binary arithmetic)
// encoder, compatible with the JPEG2000 Part 1 arithmetic encoder.
//
// Stage 1 (mq_context_update) looks up the context of each (CX, D) pair and
// its probability-table row. Stage 2 (mq_interval_subdiv) updates A and C
// and renormalises in a single barrel shift. Stage 3 (mq_data_formation)
// produces up to two bytes per cycle from the intermediate C with two
// byte-out circuits and buffers them in a 4 x 8 FIFO; it also performs the
// flush. mq_control sequences start, flush and back-pressure.
// Interface: pulse start in idle to begin a message; offer pairs with
// in_valid/in_ready (one pair per cycle while the FIFO has room); offer
// flush_req (accepted like a pair) after the last pair. Compressed bytes
// appear on out_byte with out_valid/out_ready; done pulses when the whole
// codeword has been read out. Latency: a pair is coded in stage 2 one cycle
// after acceptance; its bytes are readable from the FIFO the cycle after.
// The event outputs (stall, fwd_hit, renorm, exchange, carry, stuff,
// byteout, two_byteouts) report the internal mechanisms for observation.
module mq_encoder
  import mq_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic           in_valid,
  output logic           in_ready,
  input  logic [CX_W-1:0] in_cx,
  input  logic           in_d,
  input  logic           flush_req,
  output logic           out_valid,
  input  logic           out_ready,
  output logic [B_W-1:0] out_byte,
  output logic           busy,
  output logic           done,
  output logic           ev_stall,
  output logic           ev_fwd_hit,
  output logic           ev_renorm,
  output logic           ev_exchange,
  output logic           ev_carry,
  output logic           ev_stuff,
  output logic           ev_byteout,
  output logic           ev_two_byteouts
);

  localparam int unsigned FREE_W = $clog2(FIFO_DEPTH + 1);

  logic              init, advance, flush, final_push;
  logic [FREE_W-1:0] fifo_free;
  stage1_t           s1;
  ctx_update_t       upd;
  logic [C_W-1:0]    sc, c_q, c_next;
  logic [A_W-1:0]    a_q;
  logic [CT_W-1:0]   ct_q, ct_next;
  logic [SH_W-1:0]   shift;
  logic              coding, bo1_fire, bo0_fire;

  mq_control #(.FREE_W(FREE_W)) u_control (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (start),
    .flush_req   (flush_req),
    .fifo_free   (fifo_free),
    .fifo_empty  (~out_valid),
    .init        (init),
    .advance     (advance),
    .in_ready    (in_ready),
    .flush       (flush),
    .final_push  (final_push),
    .busy        (busy),
    .done        (done),
    .stall       (ev_stall)
  );

  mq_context_update u_stage1 (
    .clk      (clk),
    .rst_n    (rst_n),
    .init     (init),
    .advance  (advance),
    .in_valid (in_valid & in_ready),
    .in_cx    (in_cx),
    .in_d     (in_d),
    .upd      (upd),
    .out      (s1),
    .fwd_hit  (ev_fwd_hit)
  );

  mq_interval_subdiv u_stage2 (
    .clk      (clk),
    .rst_n    (rst_n),
    .init     (init),
    .advance  (advance),
    .in       (s1),
    .flush    (flush),
    .c_next   (c_next),
    .ct_next  (ct_next),
    .upd      (upd),
    .sc       (sc),
    .shift    (shift),
    .coding   (coding),
    .a_q      (a_q),
    .c_q      (c_q),
    .ct_q     (ct_q),
    .exchange (ev_exchange),
    .renorm   (ev_renorm)
  );

  mq_data_formation #(.FIFO_DEPTH(FIFO_DEPTH)) u_stage3 (
    .clk        (clk),
    .rst_n      (rst_n),
    .init       (init),
    .advance    (advance),
    .coding     (coding),
    .flush      (flush),
    .final_push (final_push),
    .sc         (sc),
    .shift      (shift),
    .c_q        (c_q),
    .a_q        (a_q),
    .ct_q       (ct_q),
    .c_next     (c_next),
    .ct_next    (ct_next),
    .out_valid  (out_valid),
    .out_ready  (out_ready),
    .out_byte   (out_byte),
    .fifo_free  (fifo_free),
    .bo1_fire   (bo1_fire),
    .bo0_fire   (bo0_fire),
    .carry_evt  (ev_carry),
    .stuff_evt  (ev_stuff)
  );

  assign ev_byteout      = bo1_fire & ~flush;
  assign ev_two_byteouts = bo0_fire & ~flush;

endmodule
