// mq_interval_subdiv: pipeline stage 2, interval-size probability subdivision.
//
// Holds the interval register A, the code register C and the bit counter
// CT. For the decision in the stage-1 register it computes in one cycle:
//   * A - Qe, and the conditional exchange: the new interval is Qe (and C is
//     left alone) for an LPS when A - Qe >= Qe, or for a renormalising MPS
//     when A - Qe < Qe; otherwise the new interval is A - Qe and Qe is added
//     to C (through the carry-select adder).
//   * the renormalisation as one barrel shift: the shift count s is the
//     number of leading zeros of the new 16-bit interval, so A leaves this
//     stage normalised (A >= 0x8000) whatever the number of shifts.
//   * the context update: an LPS moves the context to NLPS and flips the MPS
//     when SWITCH is set; an MPS moves it to NMPS only if it renormalised.
// The sum SC = C + (Qe or 0) and s go to the compressed data formation
// module, which shifts C, performs the byte-outs and returns the next C and
// CT (c_next, ct_next); they are loaded here at the same clock edge.
// All registers load only when advance is high and a decision is valid
// (or on the flush cycle for C and CT). init loads A = 0x8000, C = 0,
// CT = 12 (the encoder initialisation).
module mq_interval_subdiv
  import mq_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            init,
  input  logic            advance,
  input  stage1_t         in,
  input  logic            flush,
  input  logic [C_W-1:0]  c_next,
  input  logic [CT_W-1:0] ct_next,
  output ctx_update_t     upd,
  output logic [C_W-1:0]  sc,
  output logic [SH_W-1:0] shift,
  output logic            coding,
  output logic [A_W-1:0]  a_q,
  output logic [C_W-1:0]  c_q,
  output logic [CT_W-1:0] ct_q,
  output logic            exchange,
  output logic            renorm
);

  logic [A_W-1:0] qe, a_sub, a_new, a_norm;
  logic           swap, take_qe;

  always_comb begin
    coding  = advance & in.valid;
    qe      = in.pe.qe;
    a_sub   = a_q - qe;
    swap    = (a_sub < qe);
    // An MPS that does not renormalise has a_sub >= 0x8000 > Qe, so
    // swap is 0 for it and the same select serves all three cases.
    take_qe = in.lps ^ swap;
    a_new   = take_qe ? qe : a_sub;
    shift   = '0;
    for (int k = 0; k < A_W; k++) begin
      if (a_new[k]) shift = SH_W'(A_W - 1 - k);
    end
    a_norm   = a_new << shift;
    renorm   = in.valid & (shift != '0);
    exchange = in.valid & take_qe & ~in.lps;
  end

  mq_csel_add u_csel_add (
    .c      (c_q),
    .addend (take_qe ? '0 : qe),
    .sum    (sc)
  );

  always_comb begin
    upd.we     = coding & (in.lps | (shift != '0));
    upd.cx     = in.cx;
    upd.st.i   = in.lps ? in.pe.nlps : in.pe.nmps;
    upd.st.mps = in.st.mps ^ (in.lps & in.pe.sw);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q  <= A_INIT;
      c_q  <= '0;
      ct_q <= CT_INIT;
    end else if (init) begin
      a_q  <= A_INIT;
      c_q  <= '0;
      ct_q <= CT_INIT;
    end else if (coding) begin
      a_q  <= a_norm;
      c_q  <= c_next;
      ct_q <= ct_next;
    end else if (advance & flush) begin
      c_q  <= c_next;
      ct_q <= ct_next;
    end
  end

endmodule
