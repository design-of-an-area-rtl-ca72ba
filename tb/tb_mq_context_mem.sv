// tb_mq_context_mem: checks the reset contents of all 19 contexts, random
// writes and reads against an array model, read-during-write returning
// the old contents, and the one-cycle re-initialisation.
module tb_mq_context_mem;
  import mq_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0, init = 1'b0, we = 1'b0;
  cx_t        rd_cx = '0, wr_cx = '0;
  ctx_state_t rd_st, wr_st = '0;
  ctx_state_t model [NCTX];
  int checks = 0, failures = 0;

  mq_context_mem dut (.clk, .rst_n, .init, .rd_cx, .rd_st, .we, .wr_cx, .wr_st);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic reset_model();
    for (int k = 0; k < NCTX; k++) begin
      model[k].mps = 1'b0;
      model[k].i   = (k == 0) ? 6'd4 : (k == 17) ? 6'd3 : (k == 18) ? 6'd46 : 6'd0;
    end
  endtask

  task automatic check_all(input string when);
    for (int k = 0; k < NCTX; k++) begin
      rd_cx = cx_t'(k); #1;
      check(rd_st == model[k], $sformatf("%s: context %0d = %0d/%0d", when, k, rd_st.i, rd_st.mps));
    end
  endtask

  initial begin
    reset_model();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check_all("reset");
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      we    = $urandom_range(1);
      wr_cx = cx_t'($urandom_range(NCTX - 1));
      wr_st = '{i: idx_t'($urandom_range(46)), mps: 1'($urandom)};
      rd_cx = ($urandom_range(3) == 0) ? wr_cx : cx_t'($urandom_range(NCTX - 1));
      #1;
      check(rd_st == model[rd_cx], $sformatf("read of context %0d", rd_cx));
      @(posedge clk);
      if (we) model[wr_cx] = wr_st;
    end
    @(negedge clk); we = 1'b0;
    check_all("after writes");
    @(negedge clk); init = 1'b1; we = 1'b1; wr_cx = 5'd0; wr_st = '{i: 6'd9, mps: 1'b1};
    @(negedge clk); init = 1'b0; we = 1'b0;
    reset_model();
    check_all("init");
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
