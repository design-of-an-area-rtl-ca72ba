// tb_mq_csel_add: compares the carry-select adder with a plain addition on
// random operands, including low halves that are all ones so the carry
// into the upper part is exercised.
module tb_mq_csel_add;
  logic [27:0] c, sum;
  logic [15:0] addend;
  int checks = 0, failures = 0, ncarry = 0;

  mq_csel_add dut (.c, .addend, .sum);

  initial begin
    for (int k = 0; k < 5000; k++) begin
      c      = 28'($urandom);
      addend = 16'($urandom);
      if (k % 4 == 0) c[15:0] = 16'hFFFF - 16'($urandom_range(3));
      if (k % 7 == 0) c[27:16] = 12'hFFF;
      #1;
      checks++;
      if ({16'h0, c[15:0]} + {16'h0, addend} > 32'hFFFF) ncarry++;
      if (sum !== 28'(c + 28'(addend))) begin
        failures++;
        if (failures < 10) $display("FAIL: %h + %h = %h", c, addend, sum);
      end
    end
    checks++;
    if (ncarry == 0) begin failures++; $display("FAIL: no carry case"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
