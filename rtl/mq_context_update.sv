// mq_context_update: pipeline stage 1, the context update module.
//
// For an accepted input pair (CX, D) this stage reads the context state
// (I, MPS) from the context memories, looks the state up in the
// probability-estimation tables, compares D with the MPS and registers
// everything stage 2 needs (Qe, NMPS, NLPS, SWITCH, the coded state, LPS
// flag) in the stage-1 pipeline register.
// The context update is decided one stage later, since an MPS changes I
// only when it renormalises, which depends on A. Stage 2 presents the
// update (upd) in the cycle it codes the decision; it is written into the
// memories at that clock edge, and when the pair being read in the same
// cycle uses the same context, the new state is forwarded around the memory
// (fwd_hit) so that back-to-back decisions of one context stay exact.
// Timing: one decision per cycle; out holds a decision one cycle after it
// is accepted. advance low freezes the register (back-pressure).
module mq_context_update
  import mq_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  logic        advance,
  input  logic        in_valid,
  input  cx_t         in_cx,
  input  logic        in_d,
  input  ctx_update_t upd,
  output stage1_t     out,
  output logic        fwd_hit
);

  ctx_state_t  rd_st, st;
  prob_entry_t pe;
  stage1_t     nxt;

  mq_context_mem u_ctx_mem (
    .clk   (clk),
    .rst_n (rst_n),
    .init  (init),
    .rd_cx (in_cx),
    .rd_st (rd_st),
    .we    (upd.we),
    .wr_cx (upd.cx),
    .wr_st (upd.st)
  );

  always_comb begin
    fwd_hit = upd.we && (upd.cx == in_cx);
    st      = fwd_hit ? upd.st : rd_st;
  end

  mq_prob_rom u_prob_rom (
    .idx   (st.i),
    .entry (pe)
  );

  always_comb begin
    nxt.valid = in_valid;
    nxt.cx    = in_cx;
    nxt.lps   = in_d ^ st.mps;
    nxt.st    = st;
    nxt.pe    = pe;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       out <= '0;
    else if (init)    out <= '0;
    else if (advance) out <= nxt;
  end

endmodule
