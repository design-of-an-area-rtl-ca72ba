// tb_mq_data_formation: tests the compressed data formation module with
// the test bench standing in for stage 2 and the control unit. For each
// random decision a reference model stepped with an unreachable bit counter
// gives the increment of C and the renormalisation shift; the test drives
// SC = C + increment, the shift and CT, and keeps C and CT in its own
// registers from c_next/ct_next. A second, complete reference model codes
// the same decisions: after each one its C and CT must equal c_next and
// ct_next, and the bytes read from the FIFO (with a randomly stalling
// reader) must equal its codeword, flush and final byte included.
module tb_mq_data_formation;
  import mq_pkg::*;
  import mq_ref_pkg::*;

  logic            clk = 1'b0, rst_n = 1'b0, init = 1'b0, advance, coding = 1'b0;
  logic            flush = 1'b0, final_push = 1'b0, out_ready = 1'b0;
  logic [C_W-1:0]  sc = '0, c_q = '0, c_next;
  logic [A_W-1:0]  a_q = 16'h8000;
  logic [CT_W-1:0] ct_q = 4'd12, ct_next;
  logic [SH_W-1:0] shift = '0;
  logic            out_valid, bo1_fire, bo0_fire, carry_evt, stuff_evt;
  logic [B_W-1:0]  out_byte;
  logic [2:0]      fifo_free;
  byte unsigned got[$];
  int checks = 0, failures = 0, n_bo0 = 0, n_carry = 0, n_stuff = 0;

  mq_data_formation #(.FIFO_DEPTH(4)) dut (
    .clk, .rst_n, .init, .advance, .coding, .flush, .final_push, .sc, .shift, .c_q, .a_q,
    .ct_q, .c_next, .ct_next, .out_valid, .out_ready, .out_byte, .fifo_free,
    .bo1_fire, .bo0_fire, .carry_evt, .stuff_evt);

  always #5 clk = ~clk;
  assign advance = (fifo_free >= 3'd2);

  always @(posedge clk) begin
    if (out_valid && out_ready) got.push_back(out_byte);
    n_bo0   += int'(bo0_fire && coding);
    n_carry += int'(carry_evt);
    n_stuff += int'(stuff_evt);
  end
  always @(negedge clk) out_ready <= ($urandom_range(2) != 0);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic run_msg(input int n, input bit skewed);
    mq_ref_model rs = new();   // A and contexts only
    mq_ref_model rf = new();   // complete coder
    got.delete();
    @(negedge clk); init = 1'b1;
    @(negedge clk); init = 1'b0;
    c_q = '0; ct_q = 4'd12; a_q = 16'h8000;
    for (int k = 0; k < n; k++) begin
      int cx, p, sh;
      bit d;
      cx = skewed ? 1 : $urandom_range(0, 3);
      p  = (cx == 0) ? 500 : (cx == 1) ? 1 : (cx == 2) ? 30 : 150;
      d  = ($urandom_range(999) < p) && !(cx == 1 && $urandom_range(3) != 0);
      rs.c = 0; rs.ct = 100;
      a_q = 16'(rs.a);
      rs.encode(cx, d);
      sh = 100 - rs.ct;
      rf.encode(cx, d);
      @(negedge clk);
      while (!advance) @(negedge clk);
      coding = 1'b1;
      shift  = SH_W'(sh);
      sc     = c_q + C_W'(rs.c >> sh);
      #1;
      check(c_next == C_W'(rf.c) && int'(ct_next) == rf.ct,
            $sformatf("decision %0d: C/CT %h/%0d, expected %h/%0d", k, c_next, ct_next, rf.c, rf.ct));
      @(posedge clk);
      c_q <= c_next; ct_q <= ct_next; a_q <= 16'(rs.a);
      @(negedge clk); coding = 1'b0;
    end
    rf.flush();
    while (!advance) @(negedge clk);
    flush = 1'b1;
    @(negedge clk); flush = 1'b0;
    while (!advance) @(negedge clk);
    final_push = 1'b1;
    @(negedge clk); final_push = 1'b0;
    while (out_valid) @(negedge clk);
    check(got.size() == rf.out_q.size(), $sformatf("length %0d, expected %0d", got.size(), rf.out_q.size()));
    foreach (rf.out_q[k])
      if (k < got.size()) check(got[k] == rf.out_q[k],
                                $sformatf("byte %0d of %0d = %h, expected %h", k, got.size(), got[k], rf.out_q[k]));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int m = 0; m < 12; m++) run_msg(500 + 300 * m, 1'b0);
    // One highly skewed context: deep states, shifts crossing two bytes.
    for (int m = 0; m < 4; m++) run_msg(4000, 1'b1);
    run_msg(0, 1'b0);
    check(n_bo0 > 0 && n_carry > 0 && n_stuff > 0, $sformatf("double byte-out %0d, carry %0d, stuffing %0d",
                                                             n_bo0, n_carry, n_stuff));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
