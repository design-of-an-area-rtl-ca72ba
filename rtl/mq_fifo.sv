// mq_fifo: small FIFO for the compressed bytes, two write ports, one read.
//
// DEPTH entries of W bits (4 x 8 by default). Up to two bytes are written
// per cycle: wr0 is stored ahead of wr1, and wr1 alone is allowed. The read
// side is a valid/ready handshake: rd_data is the oldest entry while
// rd_valid is high, and it is removed at a clock edge with rd_ready high.
// free counts the empty entries at the start of the cycle (a read in the
// same cycle is not credited); writers must not write more than free.
// Writing into a full FIFO is a protocol error, caught by an assertion.
module mq_fifo #(
  parameter int unsigned DEPTH = 4,
  parameter int unsigned W     = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clear,
  input  logic                   wr0,
  input  logic [W-1:0]           wd0,
  input  logic                   wr1,
  input  logic [W-1:0]           wd1,
  output logic                   rd_valid,
  input  logic                   rd_ready,
  output logic [W-1:0]           rd_data,
  output logic [$clog2(DEPTH+1)-1:0] free
);

  localparam int unsigned PW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [W-1:0]  mem [DEPTH];
  logic [PW-1:0] rp, wp;
  logic [CW-1:0] cnt;
  logic          rd;
  logic [1:0]    nwr;

  always_comb begin
    rd_valid = (cnt != '0);
    rd       = rd_valid & rd_ready;
    nwr      = 2'(wr0) + 2'(wr1);
    rd_data  = mem[rp];
    free     = CW'(DEPTH) - cnt;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp  <= '0;
      wp  <= '0;
      cnt <= '0;
    end else if (clear) begin
      rp  <= '0;
      wp  <= '0;
      cnt <= '0;
    end else begin
      wp  <= PW'(wp + nwr);
      rp  <= PW'(rp + rd);
      cnt <= CW'(cnt + nwr - CW'(rd));
    end
  end

  // Storage: written only, never reset (an entry is read only after it
  // has been written).
  always_ff @(posedge clk) begin
    if (!clear) begin
      if (wr0) mem[wp] <= wd0;
      if (wr1) mem[wr0 ? PW'(wp + 1'b1) : wp] <= wd1;
    end
  end

  // DEPTH must be a power of two so the pointers wrap by overflow.
  initial assert ((1 << PW) == DEPTH) else $error("mq_fifo: DEPTH must be a power of two");

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    !clear |-> (32'(nwr) <= 32'(free)))
    else $error("mq_fifo: write into a full FIFO");

endmodule
