// tb_mq_encoder: end-to-end test of the MQ encoder at its default size.
//
// Encodes a series of messages of random (CX, D) pairs with per-message
// statistics ranging from uniform to highly skewed, with a randomly
// throttled consumer so that the FIFO fills and the pipeline stalls. Every
// output byte is compared with the sequential reference model
// (mq_ref_pkg), as is the codeword length. Also checks the throughput of
// one pair per cycle while the consumer is always ready, and counts how
// often each internal mechanism occurred: stall, context forwarding,
// renormalisation, conditional exchange, carry, bit stuffing, one and two
// byte-outs in a cycle, a carry into the stuffed bit after 0xFF (seen in
// the output as 0xFF followed by 0x80..0x8F). A mechanism that never occurred is a failure.
module tb_mq_encoder;
  import mq_ref_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       start = 1'b0, in_valid = 1'b0, in_d = 1'b0, flush_req = 1'b0;
  logic       out_ready = 1'b0;
  logic [4:0] in_cx = '0;
  logic       in_ready, out_valid, busy, done;
  logic [7:0] out_byte;
  logic       ev_stall, ev_fwd_hit, ev_renorm, ev_exchange, ev_carry, ev_stuff;
  logic       ev_byteout, ev_two_byteouts;

  int checks = 0, failures = 0;
  int n_stall = 0, n_fwd = 0, n_renorm = 0, n_exch = 0, n_carry = 0, n_stuff = 0;
  int n_bo = 0, n_bo2 = 0, n_late = 0;
  int ready_pct = 100;
  byte unsigned got_q[$];

  mq_encoder dut (
    .clk, .rst_n, .start, .in_valid, .in_ready, .in_cx, .in_d, .flush_req,
    .out_valid, .out_ready, .out_byte, .busy, .done,
    .ev_stall, .ev_fwd_hit, .ev_renorm, .ev_exchange, .ev_carry, .ev_stuff,
    .ev_byteout, .ev_two_byteouts
  );

  always #5 clk = ~clk;

  // Consumer and event counters.
  always @(posedge clk) begin
    if (out_valid && out_ready) got_q.push_back(out_byte);
    if (rst_n) begin
      n_stall  += int'(ev_stall);
      n_fwd    += int'(ev_fwd_hit);
      n_renorm += int'(ev_renorm && dut.advance);
      n_exch   += int'(ev_exchange && dut.advance);
      n_carry  += int'(ev_carry);
      n_stuff  += int'(ev_stuff);
      n_bo     += int'(ev_byteout);
      n_bo2    += int'(ev_two_byteouts);
    end
  end
  always @(negedge clk) out_ready <= ($urandom_range(99) < ready_pct);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Encode one message of n pairs. p1 is the probability (per mille) of
  // D = 1; ncx limits the contexts used. Returns the cycles spent from the
  // first accepted pair to the last.
  task automatic run_msg(input int n, input int p1, input int ncx, output int cycles);
    mq_ref_model ref_m = new();
    int sent = 0, t0 = 0, t1 = 0, cyc = 0;
    int cx_cur, d_cur;
    got_q.delete();
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    cx_cur = $urandom_range(ncx - 1);
    d_cur  = ($urandom_range(999) < p1);
    in_valid = 1'b1; in_cx = 5'(cx_cur); in_d = d_cur[0];
    while (sent < n) begin
      @(posedge clk);
      cyc++;
      if (in_valid && in_ready) begin
        ref_m.encode(cx_cur, d_cur[0]);
        if (sent == 0) t0 = cyc;
        t1 = cyc;
        sent++;
        @(negedge clk);
        // Contexts 0..ncx-1; context 18 only in uniform messages.
        cx_cur = ($urandom_range(3) == 0 && sent > 0) ? int'(in_cx) : $urandom_range(ncx - 1);
        d_cur  = ($urandom_range(999) < p1);
        in_cx = 5'(cx_cur); in_d = d_cur[0];
        in_valid = (sent < n);
      end else @(negedge clk);
    end
    in_valid = 1'b0;
    flush_req = 1'b1;
    do @(posedge clk); while (!in_ready);
    @(negedge clk); flush_req = 1'b0;
    ref_m.flush();
    do @(posedge clk); while (!done);
    @(negedge clk);
    check(got_q.size() == ref_m.out_q.size(),
          $sformatf("length %0d, expected %0d", got_q.size(), ref_m.out_q.size()));
    for (int k = 1; k < got_q.size(); k++)
      if (got_q[k-1] == 8'hFF && got_q[k] >= 8'h80) n_late++;
    for (int k = 0; k < ref_m.out_q.size() && k < got_q.size(); k++)
      check(got_q[k] == ref_m.out_q[k],
            $sformatf("byte %0d = %02h, expected %02h", k, got_q[k], ref_m.out_q[k]));
    cycles = t1 - t0 + 1;
  endtask

  initial begin
    int cyc;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Throughput: one pair per cycle with an always-ready consumer.
    ready_pct = 100;
    run_msg(400, 500, 19, cyc);
    check(cyc == 400, $sformatf("400 pairs took %0d cycles", cyc));
    // Mixed statistics with a throttled consumer.
    for (int m = 0; m < 400; m++) begin
      int p1s[8] = '{500, 300, 100, 30, 10, 3, 1, 970};
      ready_pct = (m % 3 == 0) ? 100 : 5 + $urandom_range(60);
      run_msg(200 + $urandom_range(4000), p1s[m % 8], 1 + $urandom_range(18), cyc);
    end
    // Long, highly skewed messages: deep probability states, so that an
    // LPS renormalises by up to 15 bits and crosses two byte boundaries.
    for (int m = 0; m < 20; m++) begin
      ready_pct = 100;
      run_msg(4000, 1 + m % 6, 1 + m % 2, cyc);
    end
    // Tiny message: a single pair.
    run_msg(1, 500, 19, cyc);
    $display("events: stall=%0d fwd=%0d renorm=%0d exchange=%0d carry=%0d stuff=%0d byteout=%0d two_byteouts=%0d late_carry=%0d",
             n_stall, n_fwd, n_renorm, n_exch, n_carry, n_stuff, n_bo, n_bo2, n_late);
    check(n_stall  > 0, "no stall occurred");
    check(n_fwd    > 0, "no context forwarding occurred");
    check(n_renorm > 0, "no renormalisation occurred");
    check(n_exch   > 0, "no conditional exchange occurred");
    check(n_carry  > 0, "no carry occurred");
    check(n_stuff  > 0, "no bit stuffing occurred");
    check(n_bo     > 0, "no byte-out occurred");
    check(n_bo2    > 0, "no double byte-out occurred");
    check(n_late   > 0, "no carry into the stuffed bit after 0xFF occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
