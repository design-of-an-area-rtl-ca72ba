// tb_mq_prob_rom: checks all 47 rows of the probability-estimation tables
// against the reference model's own copy of the JPEG2000 table, and checks
// that the unused indices return a valid row.
module tb_mq_prob_rom;
  import mq_pkg::*;
  import mq_ref_pkg::*;

  idx_t        idx;
  prob_entry_t entry;
  int checks = 0, failures = 0;

  mq_prob_rom dut (.idx, .entry);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    mq_ref_model r = new();
    for (int k = 0; k < 64; k++) begin
      idx = idx_t'(k);
      #1;
      if (k < 47) begin
        check(int'(entry.qe)   == r.qe_t[k],   $sformatf("Qe[%0d] = %h", k, entry.qe));
        check(int'(entry.nmps) == r.nmps_t[k], $sformatf("NMPS[%0d] = %0d", k, entry.nmps));
        check(int'(entry.nlps) == r.nlps_t[k], $sformatf("NLPS[%0d] = %0d", k, entry.nlps));
        check(entry.sw         == r.sw_t[k],   $sformatf("SWITCH[%0d] = %0d", k, entry.sw));
      end else begin
        check(entry.nmps < 47 && entry.nlps < 47, $sformatf("row %0d points outside the table", k));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
