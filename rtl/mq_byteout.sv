// mq_byteout: one BYTEOUT step of the MQ encoder, done in a single cycle.
//
// The code register value c is first shifted left by m (the bits left to
// the byte boundary, i.e. the bit counter CT). The pending byte b is then
// finalised and a new byte is taken from the top of the shifted C:
//   * carry   = C[27] & (b != 0xFF): the carry is added to b, b_fin = b + carry
//     (the incremented test "B = B + 1 if C >= 0x8000000" of the byte-out
//     flow is folded into B + C27).
//   * seven-bit case when b == 0xFF, or b == 0xFE and a carry makes it 0xFF:
//     the next byte carries only 7 code bits (bit stuffing), b_new =
//     C[27:20], C keeps bits 19..0, ct_out = 7. The byte's MSB is the stuffed
//     bit: it is cleared when the carry was just absorbed by the 0xFE byte,
//     and after a 0xFF byte it takes a late carry (C[27]), giving 0x80..0x8F.
//   * otherwise b_new = C[26:19], C keeps bits 18..0, ct_out = 8.
// The single test (b == 0xFE & C27) replaces the second "B == 0xFF" test of
// the sequential flow, so all decisions are taken in parallel.
// Combinational; b_fin is the byte handed to the output, b_new the new
// pending byte, c_out the masked code register.
module mq_byteout
  import mq_pkg::*;
(
  input  logic [C_W-1:0]  c,
  input  logic [CT_W-1:0] m,
  input  logic [B_W-1:0]  b,
  output logic [B_W-1:0]  b_fin,
  output logic [B_W-1:0]  b_new,
  output logic [C_W-1:0]  c_out,
  output logic [CT_W-1:0] ct_out,
  output logic            seven
);

  logic [C_W-1:0] cs;
  logic           bff, carry;

  always_comb begin
    cs     = c << m;
    bff    = (b == 8'hFF);
    carry  = cs[C_W-1] & ~bff;
    b_fin  = b + B_W'(carry);
    seven  = bff | ((b == 8'hFE) & cs[C_W-1]);
    if (seven) begin
      b_new  = {cs[C_W-1] & bff, cs[26:20]};
      c_out  = {8'h00, cs[19:0]};
      ct_out = 4'd7;
    end else begin
      b_new  = cs[26:19];
      c_out  = {9'h000, cs[18:0]};
      ct_out = 4'd8;
    end
  end

endmodule
