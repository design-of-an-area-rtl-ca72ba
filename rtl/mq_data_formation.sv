// mq_data_formation: compressed data formation module.
//
// Turns the code register into output bytes. It holds the pending byte
// register B, two byte-out circuits in cascade (B1 for the first byte
// boundary crossed in a cycle, B0 for the second), the flush hardware and
// the 4 x 8 output FIFO.
// Encoding cycle (coding): stage 2 supplies SC = C + (Qe or 0), the
// renormalisation shift s and the bit counter CT. If s >= CT the first
// byte boundary is reached after CT shifts and B1 runs on SC << CT; if the
// remaining r = s - CT shifts reach the new counter CT1, B0 runs on B1's C
// shifted by CT1. The rest of the shift is applied to the last C and the
// counter is reduced by it; c_next and ct_next go back to stage 2. A shift
// is at most 15 and a counter after a byte-out at least 7, so two byte-out
// circuits cover every case.
// Flush cycle (flush): C is set to C | 0xFFFF, or to that value minus
// 0x8000 when it is not below C + A, and both byte-out circuits run
// (C << CT, byte-out, C << CT, byte-out). Final cycle (final_push): the
// pending B is written unless it is 0xFF.
// Each byte-out writes the byte it finalises (B plus carry) to the FIFO,
// except the very first one after init, which only discards the empty
// initial B. At most two bytes are written per cycle; the controller only
// advances the pipeline when two FIFO entries are free.
module mq_data_formation
  import mq_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            init,
  input  logic            advance,
  input  logic            coding,
  input  logic            flush,
  input  logic            final_push,
  input  logic [C_W-1:0]  sc,
  input  logic [SH_W-1:0] shift,
  input  logic [C_W-1:0]  c_q,
  input  logic [A_W-1:0]  a_q,
  input  logic [CT_W-1:0] ct_q,
  output logic [C_W-1:0]  c_next,
  output logic [CT_W-1:0] ct_next,
  output logic            out_valid,
  input  logic            out_ready,
  output logic [B_W-1:0]  out_byte,
  output logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_free,
  output logic            bo1_fire,
  output logic            bo0_fire,
  output logic            carry_evt,
  output logic            stuff_evt
);

  logic [B_W-1:0]  b_q;
  logic            first_q;
  logic [C_W-1:0]  c_set, temp_c, c_bo;
  logic [4:0]      r1, r2;
  logic [B_W-1:0]  b1_fin, b1_new, b0_fin, b0_new;
  logic [C_W-1:0]  c1_out, c0_out;
  logic [CT_W-1:0] ct1_out, ct0_out;
  logic            seven1, seven0;
  logic            wr0, wr1;
  logic [B_W-1:0]  wd0, wd1;
  logic [B_W-1:0]  b_next;

  // Flush hardware: SETBITS.
  always_comb begin
    temp_c = c_q + C_W'(a_q);
    c_set  = c_q | C_W'(16'hFFFF);
    if (c_set >= temp_c) c_set = {c_q[C_W-1:16], 16'h7FFF};
    c_bo   = flush ? c_set : sc;
  end

  mq_byteout u_byteout_b1 (
    .c      (c_bo),
    .m      (ct_q),
    .b      (b_q),
    .b_fin  (b1_fin),
    .b_new  (b1_new),
    .c_out  (c1_out),
    .ct_out (ct1_out),
    .seven  (seven1)
  );

  mq_byteout u_byteout_b0 (
    .c      (c1_out),
    .m      (ct1_out),
    .b      (b1_new),
    .b_fin  (b0_fin),
    .b_new  (b0_new),
    .c_out  (c0_out),
    .ct_out (ct0_out),
    .seven  (seven0)
  );

  always_comb begin
    r1       = 5'(shift) - 5'(ct_q);
    r2       = r1 - 5'(ct1_out);
    bo1_fire = advance & (flush | (coding & (shift >= ct_q)));
    bo0_fire = advance & (flush | (coding & (shift >= ct_q) & (r1 >= 5'(ct1_out))));
    if (flush) begin
      c_next  = c0_out;
      ct_next = ct0_out;
    end else if (shift < ct_q) begin
      c_next  = sc << shift;
      ct_next = ct_q - CT_W'(shift);
    end else if (r1 < 5'(ct1_out)) begin
      c_next  = c1_out << r1;
      ct_next = ct1_out - CT_W'(r1);
    end else begin
      c_next  = c0_out << r2;
      ct_next = ct0_out - CT_W'(r2);
    end
    carry_evt = (bo1_fire & (b1_fin != b_q)) | (bo0_fire & (b0_fin != b1_new));
    stuff_evt = (bo1_fire & seven1) | (bo0_fire & seven0);
  end

  // FIFO writes: bytes finalised by B1 and B0, or the last pending byte.
  always_comb begin
    wr0 = 1'b0; wd0 = b1_fin;
    wr1 = 1'b0; wd1 = b0_fin;
    b_next = b_q;
    if (final_push & advance) begin
      wr0 = (b_q != 8'hFF) & ~first_q;
      wd0 = b_q;
    end else begin
      wr0 = bo1_fire & ~first_q;
      wr1 = bo0_fire;
      if (bo0_fire)      b_next = b0_new;
      else if (bo1_fire) b_next = b1_new;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_q     <= '0;
      first_q <= 1'b1;
    end else if (init) begin
      b_q     <= '0;
      first_q <= 1'b1;
    end else begin
      b_q <= b_next;
      if (bo1_fire) first_q <= 1'b0;
    end
  end

  // Two byte-out circuits suffice: after the cycle CT is never left at 0.
  a_ct_nonzero: assert property (@(posedge clk) disable iff (!rst_n)
    (advance & coding) |-> (ct_next != '0))
    else $error("mq_data_formation: a third byte-out would be needed");

  mq_fifo #(.DEPTH(FIFO_DEPTH), .W(B_W)) u_fifo (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (init),
    .wr0      (wr0),
    .wd0      (wd0),
    .wr1      (wr1),
    .wd1      (wd1),
    .rd_valid (out_valid),
    .rd_ready (out_ready),
    .rd_data  (out_byte),
    .free     (fifo_free)
  );

endmodule
