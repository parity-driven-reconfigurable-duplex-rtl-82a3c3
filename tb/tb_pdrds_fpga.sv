// tb_pdrds_fpga: self-checking test of one board of the duplex system. The
// other board is replaced by a stimulus that supplies its result (the
// reference result with correct parity). Checks: fault free the local result
// is passed and is correct; a LUT upset in module RM-2 switches the output to
// the other board in the same cycle, requests repair of RP-2 one clock later,
// and after the repair the local result is passed again; hold forces the
// other board's result.
//
// Switch-over and partial repair follow the proposed system; the timings
// checked are this design's.
module tb_pdrds_fpga;
  import pwtf_pkg::*;

  localparam int N_RM = 3;

  logic clk = 0, rst_n = 0;
  logic [3:0] in, oth_out, chain_out, out;
  logic       parity_in, oth_parity, hold = 0, chk_upset = 0, ru_upset = 0, rp_done = 0;
  logic [N_RM-1:0][EX2_N_LUT-1:0][63:0]         cfg_upset = '0;
  logic [N_RM-1:0][EX2_N_LUT-1:0][LUT_PINS-1:0] pin_flip = '0;
  logic [N_RM:0]    rp_req;
  logic [N_RM-1:0]  rm_fail;
  logic suspect, busy, chain_parity, parity_out, ok_fail, sel;
  int checks = 0, failures = 0;

  pdrds_fpga #(.N_RM(N_RM)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t %s", $time, what);
    end
  endtask

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [3:0] module_ref(logic [3:0] v);
    logic [15:0] t;
    logic i0, i1, i2, i3, l0, l1, l2, l3, l4;
    t = 16'h0145;
    {i3, i2, i1, i0} = v;
    l0 = i0 ^ i1;
    l1 = (i1 & i2) | (i1 & i3) | (i2 & i3);
    l2 = i3 ? l1 : l0;
    l3 = ~l1 | i0;
    l4 = t[{i1, i2, l3, l2}];
    return {l1, l4, l3, l2};
  endfunction

  function automatic logic [3:0] chain_ref(logic [3:0] v);
    return module_ref(module_ref(module_ref(v)));
  endfunction

  // apply input v; the "other board" delivers the inverted reference as a
  // marker, with consistent parity
  task automatic apply(logic [3:0] v);
    in = v; parity_in = ^v;
    oth_out = ~chain_ref(v); oth_parity = ^oth_out;
    #1;
  endtask

  initial begin
    logic [3:0] x;
    int n_req;
    apply(4'd0);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int v = 0; v < 16; v++) begin
      @(negedge clk) apply(4'(v));
      check(!sel && out == chain_ref(4'(v)) && parity_out == ^out && !ok_fail && rm_fail == '0,
            $sformatf("fault free v=%0d out=%b", v, out));
      check(chain_out == chain_ref(4'(v)), "chain_out");
    end

    // upset in RM-2, LUT 0 lower half, at the entry read for input 4'd5
    @(negedge clk) apply(4'd5);
    x = module_ref(4'd5);
    cfg_upset[1][0][{4'b0000, x[1], x[0]}] = 1'b1;
    #1;
    check(sel && out == ~chain_ref(4'd5), "switched to other board in the same cycle");
    check(rm_fail[1] && !rm_fail[0], "RM-2 flags, RM-1 does not");
    @(negedge clk);
    check(rp_req == 4'b0010, $sformatf("repair of RP-2 requested (rp_req=%b)", rp_req));
    n_req = 0;
    while (rp_req != 0 && n_req < 20) begin
      check(sel, "other board passed during repair");
      n_req++;
      if (n_req == 5) begin
        rp_done = 1;
        cfg_upset = '0;
      end
      @(negedge clk) rp_done = 0;
    end
    repeat (2) @(negedge clk);
    apply(4'd9);
    check(!sel && !busy && out == chain_ref(4'd9), "local result passed after repair");

    hold = 1;
    #1;
    check(sel && out == ~chain_ref(4'd9), "hold passes the other board");
    hold = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
