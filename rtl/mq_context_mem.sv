// mq_context_mem: the context-model memories RAM_I and RAM_MPS.
//
// NCTX entries, one per coding context CX, each holding the context's
// probability-state index I (RAM_I) and MPS sense (RAM_MPS). One
// asynchronous read port (rd_cx -> rd_st in the same cycle) and one write
// port written at the rising clock edge. A write and a read of the same
// entry in one cycle return the old contents; the caller forwards.
// Reset, and the synchronous init input, load every entry with its
// JPEG2000 starting state (mq_pkg::ctx_reset_state); init wins over a
// write in the same cycle. The storage is a register array, so the reset
// of all entries takes one cycle.
module mq_context_mem
  import mq_pkg::*;
#(
  parameter int unsigned N = NCTX
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  cx_t         rd_cx,
  output ctx_state_t  rd_st,
  input  logic        we,
  input  cx_t         wr_cx,
  input  ctx_state_t  wr_st
);

  ctx_state_t mem [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) mem[k] <= ctx_reset_state(cx_t'(k));
    end else if (init) begin
      for (int k = 0; k < N; k++) mem[k] <= ctx_reset_state(cx_t'(k));
    end else if (we && (int'(wr_cx) < N)) begin
      mem[wr_cx] <= wr_st;
    end
  end

  always_comb begin
    if (int'(rd_cx) < N) rd_st = mem[rd_cx];
    else                 rd_st = '0;
  end

endmodule
