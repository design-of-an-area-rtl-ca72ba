// tb_mq_interval_subdiv: feeds stage 2 with decisions whose stage-1 records
// are built from the reference model's context states, and checks per
// decision: the renormalisation shift, SC = C + (Qe or 0), the context
// update, and after the clock edge the normalised A. The reference model
// is stepped with its bit counter set out of reach, so that its C holds
// exactly the added amount shifted by the number of renormalisation steps.
// C and CT are loaded from the c_next/ct_next inputs, which the test
// drives with random values and checks. Stall cycles (advance low) and
// idle cycles must change nothing; a flush cycle loads C and CT only.
module tb_mq_interval_subdiv;
  import mq_pkg::*;
  import mq_ref_pkg::*;

  logic            clk = 1'b0, rst_n = 1'b0, init = 1'b0, advance = 1'b0, flush = 1'b0;
  stage1_t         in = '0;
  logic [C_W-1:0]  c_next = '0, sc, c_q;
  logic [CT_W-1:0] ct_next = '0, ct_q;
  logic [A_W-1:0]  a_q;
  logic [SH_W-1:0] shift;
  logic            coding, exchange, renorm;
  ctx_update_t     upd;
  int checks = 0, failures = 0, n_exch = 0, n_lps = 0, n_big = 0;

  mq_interval_subdiv dut (.clk, .rst_n, .init, .advance, .in, .flush, .c_next, .ct_next,
                          .upd, .sc, .shift, .coding, .a_q, .c_q, .ct_q, .exchange, .renorm);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    mq_ref_model r = new();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk); init = 1'b1;
    @(negedge clk); init = 1'b0;
    #1;
    check(a_q == 16'h8000 && c_q == '0 && ct_q == 4'd12, "initial A, C, CT");
    for (int k = 0; k < 20000; k++) begin
      int cx, p;
      bit d;
      int unsigned old_a, old_i, exp_shift, exp_add;
      bit old_m;
      logic [C_W-1:0] c_before;
      logic [CT_W-1:0] ct_before;
      @(negedge clk);
      // Contexts 1..3 skewed, 4 uniform-ish: deep and shallow states.
      cx = $urandom_range(1, 4);
      p  = (cx == 4) ? 500 : (cx == 1) ? 5 : (cx == 2) ? 50 : 200;
      d  = ($urandom_range(999) < p);
      old_i = r.ctx_i[cx]; old_m = r.ctx_m[cx]; old_a = r.a;
      in.valid = ($urandom_range(7) != 0);
      in.cx = cx_t'(cx); in.lps = d ^ old_m;
      in.st = '{i: idx_t'(old_i), mps: old_m};
      in.pe = '{qe: 16'(r.qe_t[old_i]), nmps: idx_t'(r.nmps_t[old_i]),
                nlps: idx_t'(r.nlps_t[old_i]), sw: r.sw_t[old_i]};
      advance = ($urandom_range(5) != 0);
      flush   = (!in.valid && $urandom_range(1));
      c_next  = C_W'($urandom);
      ct_next = CT_W'($urandom_range(1, 12));
      c_before = c_q; ct_before = ct_q;
      #1;
      check(coding == (advance && in.valid), "coding flag");
      if (in.valid) begin
        r.c = 0; r.ct = 100;
        r.encode(cx, d);
        exp_shift = 100 - r.ct;
        exp_add   = r.c >> exp_shift;
        if (in.lps) n_lps++;
        if (exp_shift > 8) n_big++;
        if (exchange) n_exch++;
        check(int'(shift) == exp_shift, $sformatf("shift %0d, expected %0d", shift, exp_shift));
        check(sc == c_q + C_W'(exp_add), $sformatf("SC %h, C %h, expected add %h", sc, c_q, exp_add));
        check(upd.we == (advance && (in.lps || exp_shift != 0)), "context update enable");
        if (upd.we)
          check(int'(upd.st.i) == r.ctx_i[cx] && upd.st.mps == r.ctx_m[cx] && upd.cx == cx,
                $sformatf("context update %0d/%0d, expected %0d/%0d", upd.st.i, upd.st.mps,
                          r.ctx_i[cx], r.ctx_m[cx]));
        if (!advance) begin
          // Not coded: undo the model step.
          r.a = old_a; r.ctx_i[cx] = old_i; r.ctx_m[cx] = old_m;
        end
      end
      @(posedge clk); #1;
      check(int'(a_q) == r.a, $sformatf("A %h, expected %h", a_q, r.a));
      if (advance && (in.valid || flush))
        check(c_q == c_next && ct_q == ct_next, "C and CT load from data formation");
      else
        check(c_q == c_before && ct_q == ct_before, "C and CT hold");
    end
    check(n_exch > 0 && n_lps > 0 && n_big > 0, "exchange, LPS or long shift never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
