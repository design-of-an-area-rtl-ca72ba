// mq_csel_add: carry-select adder that adds the interval increment to C.
//
// Computes sum = c + addend, with c the 28-bit code register and addend the
// 16-bit Qe (or 0). The low 16 bits are added by a ripple adder; the upper
// 12 bits are precomputed both as c_hi and c_hi + 1 and the low carry
// selects between them, so the upper increment is off the carry chain.
// The split point at the addend width is this design's choice. The result
// is truncated to 28 bits. Combinational.
module mq_csel_add #(
  parameter int unsigned W  = 28,
  parameter int unsigned LO = 16
) (
  input  logic [W-1:0]  c,
  input  logic [LO-1:0] addend,
  output logic [W-1:0]  sum
);

  logic [LO:0]     lo_sum;
  logic [W-LO-1:0] hi0, hi1;

  always_comb begin
    lo_sum = {1'b0, c[LO-1:0]} + {1'b0, addend};
    hi0    = c[W-1:LO];
    hi1    = c[W-1:LO] + 1'b1;
    sum    = {lo_sum[LO] ? hi1 : hi0, lo_sum[LO-1:0]};
  end

endmodule
