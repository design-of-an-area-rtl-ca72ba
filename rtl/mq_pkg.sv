// mq_pkg: types and constants shared by the MQ arithmetic encoder.
//
// The encoder follows the context-based binary arithmetic coder of JPEG2000
// Part 1 (the "MQ coder"): a 16-bit interval register A, a 28-bit code
// register C, an 8-bit output byte register B and a bit counter CT.
// The 19 coding contexts and their reset states are those of the JPEG2000
// standard (the probability table itself is in mq_prob_rom); the register
// widths (A 16, C 28, B 8 bits) follow the published architecture.
package mq_pkg;

  localparam int unsigned A_W      = 16;  // interval size register A
  localparam int unsigned C_W      = 28;  // code (interval base) register C
  localparam int unsigned B_W      = 8;   // output byte register B
  localparam int unsigned CT_W     = 4;   // bit counter CT (0..13)
  localparam int unsigned IDX_W    = 6;   // width of a state index I
  localparam int unsigned NCTX     = 19;  // JPEG2000 coding contexts
  localparam int unsigned CX_W     = 5;   // width of a context label CX
  localparam int unsigned SH_W     = 4;   // renormalisation shift count (0..15)

  localparam logic [A_W-1:0]  A_INIT  = 16'h8000;
  localparam logic [CT_W-1:0] CT_INIT = 4'd12;

  typedef logic [IDX_W-1:0] idx_t;
  typedef logic [CX_W-1:0]  cx_t;

  // One row of the probability-estimation table.
  typedef struct packed {
    logic [A_W-1:0] qe;
    idx_t           nmps;
    idx_t           nlps;
    logic           sw;
  } prob_entry_t;

  // State of one context: probability index and MPS sense.
  typedef struct packed {
    idx_t i;
    logic mps;
  } ctx_state_t;

  // What stage 1 hands to stage 2 for one coded decision.
  typedef struct packed {
    logic        valid;
    cx_t         cx;
    logic        lps;    // 1 when D differs from the context's MPS
    ctx_state_t  st;     // context state the decision was coded with
    prob_entry_t pe;     // table row of st.i
  } stage1_t;

  // Context update issued by stage 2 and written by stage 1.
  typedef struct packed {
    logic       we;
    cx_t        cx;
    ctx_state_t st;
  } ctx_update_t;

  // Reset state of each context (JPEG2000 Part 1 Table D.7): context 0
  // starts at index 4, the run-length context (17) at 3, the uniform
  // context (18) at 46, all others at 0; every MPS starts at 0.
  function automatic ctx_state_t ctx_reset_state(input cx_t cx);
    ctx_state_t s;
    s.mps = 1'b0;
    unique case (cx)
      5'd0:    s.i = 6'd4;
      5'd17:   s.i = 6'd3;
      5'd18:   s.i = 6'd46;
      default: s.i = 6'd0;
    endcase
    return s;
  endfunction

endpackage
