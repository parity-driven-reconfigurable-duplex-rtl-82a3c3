// tb_duplex_output_stage: self-checking test of the checked output
// multiplexer. Random local and remote results, with correct or wrong local
// parity, with and without force_other and an emulated checker fault. Expected:
// fail = parity mismatch XOR chk_upset, the other board's result is passed
// when fail or force_other is set, the local one otherwise.
//
// The checker-driven 0/1 selection follows the proposed system; force_other
// and chk_upset are this design's additions.
module tb_duplex_output_stage;
  logic [3:0] loc_out, oth_out, out;
  logic       loc_parity, oth_parity, force_other, chk_upset;
  logic       parity_out, fail, sel;
  int checks = 0, failures = 0;
  int n_local = 0, n_other = 0;

  duplex_output_stage #(.N_OUT(4)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      logic bad, ef, es;
      loc_out     = 4'($urandom);
      oth_out     = 4'($urandom);
      bad         = ($urandom_range(0, 3) == 0);
      loc_parity  = (^loc_out) ^ bad;
      oth_parity  = ^oth_out;
      force_other = ($urandom_range(0, 4) == 0);
      chk_upset   = ($urandom_range(0, 9) == 0);
      #1;
      ef = bad ^ chk_upset;
      es = ef | force_other;
      check(fail == ef, $sformatf("fail=%b exp %b", fail, ef));
      check(sel == es, $sformatf("sel=%b exp %b", sel, es));
      check(out == (es ? oth_out : loc_out), "out");
      check(parity_out == (es ? oth_parity : loc_parity), "parity_out");
      if (es) n_other++; else n_local++;
    end
    check(n_local > 0 && n_other > 0, "both selections seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
