// tb_mq_control: walks the control unit through a message: idle, start
// (one-cycle init), accepting pairs, back-pressure when fewer than two FIFO
// entries are free, flush acceptance, the drain, flush and final cycles,
// waiting for the FIFO to empty, and the done pulse. Each output is
// checked against the expected sequence.
module tb_mq_control;
  logic       clk = 1'b0, rst_n = 1'b0, start = 1'b0, flush_req = 1'b0;
  logic [2:0] fifo_free = 3'd4;
  logic       fifo_empty = 1'b1;
  logic       init, advance, in_ready, flush, final_push, busy, done, stall;
  int checks = 0, failures = 0;

  mq_control #(.FREE_W(3)) dut (.clk, .rst_n, .start, .flush_req, .fifo_free, .fifo_empty,
                                .init, .advance, .in_ready, .flush, .final_push,
                                .busy, .done, .stall);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Compare outputs: {init, advance, in_ready, flush, final_push, busy, done, stall}
  task automatic expect_out(input logic [7:0] e, input string what);
    #1;
    check({init, advance, in_ready, flush, final_push, busy, done, stall} == e,
          $sformatf("%s: outputs %b, expected %b", what,
                    {init, advance, in_ready, flush, final_push, busy, done, stall}, e));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk); expect_out(8'b0100_0000, "idle");
    start = 1'b1;   expect_out(8'b1100_0000, "start");
    @(negedge clk); start = 1'b0;
    expect_out(8'b0110_0100, "run");
    fifo_free = 3'd1; expect_out(8'b0000_0101, "run, FIFO almost full");
    flush_req = 1'b1; @(negedge clk);
    expect_out(8'b0000_0101, "flush request held off by back-pressure");
    fifo_free = 3'd2; expect_out(8'b0110_0100, "run, two entries free");
    @(negedge clk); flush_req = 1'b0;
    expect_out(8'b0100_0100, "drain");
    @(negedge clk); expect_out(8'b0101_0100, "flush");
    fifo_free = 3'd0; expect_out(8'b0000_0101, "flush stalled");
    @(negedge clk); expect_out(8'b0000_0101, "flush still stalled");
    fifo_free = 3'd3; expect_out(8'b0101_0100, "flush");
    @(negedge clk); expect_out(8'b0100_1100, "final");
    @(negedge clk); fifo_empty = 1'b0; expect_out(8'b0100_0100, "done, FIFO not empty");
    @(negedge clk); fifo_empty = 1'b1; expect_out(8'b0100_0110, "done");
    @(negedge clk); expect_out(8'b0100_0000, "idle again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
