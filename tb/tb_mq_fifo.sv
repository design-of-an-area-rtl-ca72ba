// tb_mq_fifo: random writes of zero, one or two bytes per cycle (never more
// than the reported free space) and random reads, compared with a queue.
// Checks the free count, the valid flag and the data order, fills the FIFO
// completely and checks that clear empties it.
module tb_mq_fifo;
  logic       clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  logic       wr0 = 1'b0, wr1 = 1'b0, rd_ready = 1'b0;
  logic [7:0] wd0 = '0, wd1 = '0, rd_data;
  logic       rd_valid;
  logic [2:0] free;
  byte unsigned q[$];
  int checks = 0, failures = 0, n_full = 0, n_double = 0;

  mq_fifo #(.DEPTH(4), .W(8)) dut (.clk, .rst_n, .clear, .wr0, .wd0, .wr1, .wd1,
                                   .rd_valid, .rd_ready, .rd_data, .free);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 5000; k++) begin
      @(negedge clk);
      check(int'(free) == 4 - q.size(), $sformatf("free %0d with %0d stored", free, q.size()));
      check(rd_valid == (q.size() != 0), "rd_valid");
      if (q.size() != 0) check(rd_data == q[0], $sformatf("rd_data %h, expected %h", rd_data, q[0]));
      if (q.size() == 4) n_full++;
      rd_ready = ($urandom_range(2) == 0);
      wr0 = 1'b0; wr1 = 1'b0;
      wd0 = 8'($urandom); wd1 = 8'($urandom);
      if (free >= 2 && $urandom_range(1)) begin wr0 = 1'b1; wr1 = 1'b1; end
      else if (free >= 1 && $urandom_range(1)) begin
        if ($urandom_range(1)) wr0 = 1'b1; else wr1 = 1'b1;
      end
      @(posedge clk);
      if (rd_valid && rd_ready) void'(q.pop_front());
      if (wr0) q.push_back(wd0);
      if (wr1) q.push_back(wd1);
      if (wr0 && wr1) n_double++;
    end
    check(n_full > 0 && n_double > 0, "FIFO never full or never written twice");
    @(negedge clk); wr0 = 1'b0; wr1 = 1'b0; rd_ready = 1'b0; clear = 1'b1;
    @(negedge clk); clear = 1'b0;
    check(!rd_valid && free == 3'd4, "clear");
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
