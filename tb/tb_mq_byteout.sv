// tb_mq_byteout: checks the single-cycle byte-out circuit against the
// sequential BYTEOUT procedure of the reference model, on random code
// registers, shifts and pending bytes, with 0xFF and 0xFE bytes and the
// carry bit forced often. Every branch of the procedure is counted and
// must occur.
module tb_mq_byteout;
  import mq_ref_pkg::*;

  logic [27:0] c, c_out;
  logic [3:0]  m, ct_out;
  logic [7:0]  b, b_fin, b_new;
  logic        seven;
  int checks = 0, failures = 0;
  int n_ff = 0, n_carry = 0, n_fe_carry = 0, n_plain = 0;

  mq_byteout dut (.c, .m, .b, .b_fin, .b_new, .c_out, .ct_out, .seven);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    mq_ref_model r = new();
    for (int k = 0; k < 20000; k++) begin
      logic [27:0] cs;
      m  = 4'($urandom_range(1, 12));
      cs = 28'($urandom);
      case (k % 4)
        0: b = 8'hFF;
        1: b = 8'hFE;
        default: b = 8'($urandom);
      endcase
      c = cs >> m;
      cs = c << m;
      #1;
      r.init();
      r.have_b = 1; r.b = b; r.c = cs;
      r.byteout();
      if (b == 8'hFF) n_ff++;
      else if (cs[27] && b == 8'hFE) n_fe_carry++;
      else if (cs[27]) n_carry++;
      else n_plain++;
      check(r.out_q.size() == 1 && b_fin == r.out_q[0], $sformatf("b_fin %h (b %h c %h)", b_fin, b, cs));
      check(b_new == 8'(r.b), $sformatf("b_new %h, expected %h (b %h c %h)", b_new, 8'(r.b), b, cs));
      check(c_out == 28'(r.c), $sformatf("c_out %h, expected %h", c_out, r.c));
      check(int'(ct_out) == r.ct, $sformatf("ct_out %0d, expected %0d", ct_out, r.ct));
    end
    check(n_ff > 0 && n_carry > 0 && n_fe_carry > 0 && n_plain > 0, "a byte-out branch never occurred");
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
