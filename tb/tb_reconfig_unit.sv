// tb_reconfig_unit: self-checking test of the partial-reconfiguration
// controller (4 partitions). Checks: the request rises one clock after a Fail
// is sampled, is one-hot on the lowest failing partition and is held until
// rp_done; one settle cycle follows; a second consecutive request for the
// same partition makes the unit suspect instead; suspect is sticky until
// reset; an upset of one state copy makes it suspect within two cycles.
//
// The consecutive-repair and internal-checker rules follow the proposed
// system; the encoding and timing are this design's.
module tb_reconfig_unit;
  logic       clk = 0, rst_n = 0;
  logic [3:0] rp_fail = '0, rp_req;
  logic       rp_done = 0, upset = 0, busy, suspect;
  int checks = 0, failures = 0;

  reconfig_unit #(.N_RP(4)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t %s (req=%b busy=%b suspect=%b)", $time, what, rp_req, busy, suspect);
    end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // apply a Fail pattern, expect a request for partition exp_rp, repair it
  task automatic repair(logic [3:0] fail, int exp_rp, int wait_cycles);
    @(negedge clk) rp_fail = fail;
    @(negedge clk);
    check(rp_req == 4'(1 << exp_rp), $sformatf("request for RP index %0d", exp_rp));
    check(busy, "busy during repair");
    repeat (wait_cycles) begin
      @(negedge clk);
      check(rp_req == 4'(1 << exp_rp), "request held");
    end
    rp_done = 1; rp_fail = '0;
    @(negedge clk) rp_done = 0;
    check(rp_req == '0 && busy, "settle cycle");
    @(negedge clk);
    check(!busy && rp_req == '0 && !suspect, "back to idle");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(rp_req == '0 && !busy && !suspect, "idle after reset");

    repair(4'b0100, 2, 3);
    repair(4'b1010, 1, 0);
    repair(4'b0100, 2, 5);
    // same partition again: unit suspects itself, no request
    @(negedge clk) rp_fail = 4'b0100;
    @(negedge clk) rp_fail = '0;
    check(suspect && rp_req == '0, "second consecutive request -> suspect");
    repeat (5) @(negedge clk);
    check(suspect && rp_req == '0, "suspect is sticky");
    @(negedge clk) rp_fail = 4'b0001;
    @(negedge clk);
    check(rp_req == '0, "no repair while suspect");

    // reset clears it; a state-copy upset is caught
    rp_fail = '0; rst_n = 0;
    @(negedge clk) rst_n = 1;
    @(negedge clk);
    check(!suspect, "cleared by reset");
    upset = 1;
    @(negedge clk) upset = 0;
    @(negedge clk);
    check(suspect, "state upset detected");
    repeat (3) @(negedge clk);
    check(suspect, "state upset sticky");

    // after reset the history is gone: same partition is repaired again
    rst_n = 0;
    @(negedge clk) rst_n = 1;
    repair(4'b0100, 2, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
