// tb_mq_context_update: drives random (CX, D) pairs into stage 1 together
// with random context updates (as stage 2 would issue them) and checks the
// registered stage-1 record: the context state, forwarded when the update
// targets the context being read, the probability-table row of that state
// and the LPS flag. Also checks that advance low holds the register, that
// forwarding occurs, and that init clears the register.
module tb_mq_context_update;
  import mq_pkg::*;
  import mq_ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0, init = 1'b0, advance = 1'b0;
  logic        in_valid = 1'b0, in_d = 1'b0;
  cx_t         in_cx = '0;
  ctx_update_t upd = '0;
  stage1_t     out;
  logic        fwd_hit;
  int unsigned m_i [NCTX];
  bit          m_m [NCTX];
  int checks = 0, failures = 0, n_fwd = 0, n_hold = 0;

  mq_context_update dut (.clk, .rst_n, .init, .advance, .in_valid, .in_cx, .in_d,
                         .upd, .out, .fwd_hit);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    mq_ref_model r = new();
    stage1_t exp_q;
    for (int k = 0; k < NCTX; k++) begin m_i[k] = r.ctx_i[k]; m_m[k] = r.ctx_m[k]; end
    exp_q = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 5000; k++) begin
      int unsigned si; bit sm;
      @(negedge clk);
      advance  = ($urandom_range(4) != 0);
      in_valid = $urandom_range(3) != 0;
      in_cx    = cx_t'($urandom_range(NCTX - 1));
      in_d     = 1'($urandom);
      upd.we   = $urandom_range(1);
      upd.cx   = ($urandom_range(1) == 0) ? in_cx : cx_t'($urandom_range(NCTX - 1));
      upd.st   = '{i: idx_t'($urandom_range(46)), mps: 1'($urandom)};
      si = m_i[in_cx]; sm = m_m[in_cx];
      if (upd.we && upd.cx == in_cx) begin si = upd.st.i; sm = upd.st.mps; n_fwd++; end
      @(posedge clk);
      if (advance) begin
        exp_q.valid = in_valid; exp_q.cx = in_cx; exp_q.lps = in_d ^ sm;
        exp_q.st.i = idx_t'(si); exp_q.st.mps = sm;
        exp_q.pe.qe = 16'(r.qe_t[si]); exp_q.pe.nmps = idx_t'(r.nmps_t[si]);
        exp_q.pe.nlps = idx_t'(r.nlps_t[si]); exp_q.pe.sw = r.sw_t[si];
      end else n_hold++;
      if (upd.we) begin m_i[upd.cx] = upd.st.i; m_m[upd.cx] = upd.st.mps; end
      #1;
      check(out == exp_q, $sformatf("cycle %0d: stage-1 record %h, expected %h", k, out, exp_q));
    end
    check(n_fwd > 0 && n_hold > 0, "forwarding or hold never exercised");
    @(negedge clk); init = 1'b1; upd.we = 1'b0;
    @(negedge clk); init = 1'b0;
    check(out == '0, "init clears the stage-1 register");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
