// tb_pdrds_top: end-to-end test of the two-board parity driven reconfigurable
// duplex system at its default size (three PWtf modules per board).
//
// Both boards get the same random input vector (with its parity) every clock.
// A behavioural model of each FPGA's configuration port answers partial
// requests after RECONF_LAT clocks and full requests after FULL_LAT clocks,
// and removes the emulated faults of what it rewrote. Throughout the run both
// boards' outputs must equal a Boolean reference of three chained 4-in/4-out
// modules, and their parity must match: one fault at a time must never reach
// the outputs. Scenarios, one after another:
//   1. fault free operation;
//   2. LUT-content upsets (O5 and O6 halves) in modules of either board;
//   3. a routing (LUT pin) fault;
//   4. a fault in the output-stage checker (false Fail, RP-5 repaired);
//   5. an upset in the reconfiguration unit (suspect, full reconfiguration);
//   6. a fault partial reconfiguration cannot remove (second consecutive
//      repair of the same partition, suspect, full reconfiguration).
// Every mechanism is counted; one that never happened is a failure. The
// partition the system repairs must be the one that was faulted.
//
// The scenarios exercise the mechanisms of the proposed system; the
// configuration-port model and its latencies are this testbench's.
module tb_pdrds_top;
  import pwtf_pkg::*;

  localparam int N_RM       = 3;
  localparam int RECONF_LAT = 8;
  localparam int FULL_LAT   = 20;

  logic clk = 0, rst_n = 0;
  logic [1:0][3:0]                   in;
  logic [1:0]                        parity_in;
  logic [1:0][3:0]                   out;
  logic [1:0]                        parity_out, ok_fail, sel;
  logic [1:0][N_RM-1:0]              rm_fail;
  logic [1:0][N_RM-1:0][EX2_N_LUT-1:0][63:0]        cfg_upset;
  logic [1:0][N_RM-1:0][EX2_N_LUT-1:0][LUT_PINS-1:0] pin_flip;
  logic [1:0]                        chk_upset, ru_upset;
  logic [1:0][N_RM:0]                rp_req;
  logic [1:0]                        rp_done, suspect, full_req, full_done, busy;
  logic                              ext_busy;

  pdrds_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_switch = 0, n_partial = 0, n_rp5 = 0, n_full = 0, n_suspect = 0;
  int n_detect = 0, n_cycles_ok = 0;
  int last_rp [2] = '{-1, -1};
  bit sticky [2][N_RM+1];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t %s", $time, what);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference: three chained modules ----------------
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

  // address read by LUT j of a module whose input is v
  function automatic logic [4:0] lut_addr(logic [3:0] v, int j);
    logic [15:0] t;
    logic i0, i1, i2, i3, l0, l1, l2, l3;
    t = 16'h0145;
    {i3, i2, i1, i0} = v;
    l0 = i0 ^ i1;
    l1 = (i1 & i2) | (i1 & i3) | (i2 & i3);
    l2 = i3 ? l1 : l0;
    l3 = ~l1 | i0;
    case (j)
      0:       return {3'b000, i1, i0};
      1:       return {2'b00, i3, i2, i1};
      2:       return {2'b00, i3, l1, l0};
      3:       return {3'b000, l1, i0};
      default: return {1'b0, i1, i2, l3, l2};
    endcase
  endfunction

  function automatic logic [3:0] system_ref(logic [3:0] v);
    logic [3:0] x;
    x = v;
    for (int m = 0; m < N_RM; m++) x = module_ref(x);
    return x;
  endfunction

  // ---------------- configuration port model, one per board ----------------
  for (genvar b = 0; b < 2; b++) begin : g_cfg
    int cnt = 0;
    always @(posedge clk) begin
      rp_done[b]   <= 1'b0;
      full_done[b] <= 1'b0;
      if (!rst_n) cnt <= 0;
      else if (full_req[b] && !full_done[b]) begin
        if (cnt == FULL_LAT - 1) begin
          cnt <= 0;
          full_done[b] <= 1'b1;
          cfg_upset[b] <= '0;
          pin_flip[b]  <= '0;
          chk_upset[b] <= 1'b0;
          for (int k = 0; k <= N_RM; k++) sticky[b][k] = 1'b0;
          n_full++;
        end else cnt <= cnt + 1;
      end else if (|rp_req[b] && !rp_done[b]) begin
        if (cnt == RECONF_LAT - 1) begin
          cnt <= 0;
          rp_done[b] <= 1'b1;
          for (int k = 0; k <= N_RM; k++)
            if (rp_req[b][k]) begin
              last_rp[b] = k;
              if (!sticky[b][k]) begin
                if (k < N_RM) begin
                  cfg_upset[b][k] <= '0;
                  pin_flip[b][k]  <= '0;
                end else chk_upset[b] <= 1'b0;
              end
              if (k == N_RM) n_rp5++;
            end
          n_partial++;
        end else cnt <= cnt + 1;
      end
    end
  end

  // ---------------- stimulus and output check every cycle ----------------
  always @(negedge clk) begin
    logic [3:0] v, e;
    if (rst_n) begin
      e = system_ref(in[0]);
      for (int b = 0; b < 2; b++) begin
        check(out[b] == e, $sformatf("board %0d out %b exp %b (in %b)", b, out[b], e, in[0]));
        check(parity_out[b] == ^e, $sformatf("board %0d parity", b));
        if (sel[b]) n_switch++;
        if (ok_fail[b] || |rm_fail[b]) n_detect++;
        if (suspect[b]) n_suspect++;
      end
      n_cycles_ok++;
    end
    v = 4'($urandom);
    in        = {v, v};
    parity_in = {^v, ^v};
  end

  // wait until board b is repaired and idle again
  task automatic wait_healthy(int b);
    int n = 0;
    do begin
      @(negedge clk);
      n++;
    end while ((cfg_upset[b] != '0 || pin_flip[b] != '0 || chk_upset[b] || busy[b] ||
                suspect[b] || full_req[b] || ext_busy) && n < 2000);
    check(n < 2000, $sformatf("board %0d not repaired", b));
    repeat (5) @(negedge clk);
  endtask

  initial begin
    cfg_upset = '0; pin_flip = '0; chk_upset = '0; ru_upset = '0;
    rp_done = '0; full_done = '0;
    in = '0; parity_in = '0;
    for (int b = 0; b < 2; b++) for (int k = 0; k <= N_RM; k++) sticky[b][k] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1. fault free
    repeat (40) @(negedge clk);
    check(n_switch == 0 && n_detect == 0, "no switching or detection without faults");

    // 2. LUT-content upsets, O5 (lower) and O6 (upper) halves, both boards
    for (int t = 0; t < 6; t++) begin
      int b, m, j, bit_i;
      b = t % 2;
      m = $urandom_range(0, N_RM - 1);
      j = $urandom_range(0, EX2_N_LUT - 1);
      // flip the entry the LUT reads for the current input, so the fault is
      // not dormant: O6 half (upper) or O5 half (lower)
      @(negedge clk);
      begin
        logic [3:0] x;
        x = in[b];
        for (int k = 0; k < m; k++) x = module_ref(x);
        bit_i = int'(lut_addr(x, j)) + ((t % 3 == 0) ? 32 : 0);
      end
      cfg_upset[b][m][j][bit_i] = 1'b1;
      wait_healthy(b);
      check(last_rp[b] == m, $sformatf("upset in board %0d RM-%0d repaired RP index %0d",
                                       b, m + 1, last_rp[b]));
    end

    // 3. routing fault on one branch (board 1, RM-1, LUT 4, pin 2)
    @(negedge clk) pin_flip[1][0][4][2] = 1'b1;
    wait_healthy(1);
    check(last_rp[1] == 0, "pin fault repaired in RP-1");

    // 4. checker fault in the output stage (board 0) -> RP-5 repaired
    @(negedge clk) chk_upset[0] = 1'b1;
    wait_healthy(0);
    check(last_rp[0] == N_RM, "checker fault repaired in RP-5");

    // 5. upset in the reconfiguration unit of board 1 -> full reconfiguration
    begin
      int nf;
      nf = n_full;
      @(negedge clk) ru_upset[1] = 1'b1;
      @(negedge clk) ru_upset[1] = 1'b0;
      wait_healthy(1);
      check(n_full == nf + 1, "full reconfiguration after unit upset");
    end

    // 6. fault that partial reconfiguration does not remove (board 0, RM-3)
    begin
      int nf, np;
      nf = n_full;
      np = n_partial;
      sticky[0][2] = 1'b1;
      @(negedge clk);
      cfg_upset[0][2][1][{1'b0, lut_addr(module_ref(module_ref(in[0])), 1)}] = 1'b1;
      wait_healthy(0);
      check(n_partial == np + 1, "one partial repair before suspecting the unit");
      check(n_full == nf + 1, "full reconfiguration after second consecutive request");
    end

    repeat (20) @(negedge clk);
    check(n_switch  > 0, "switch to the other board never happened");
    check(n_detect  > 0, "detection never happened");
    check(n_partial > 0, "partial reconfiguration never happened");
    check(n_rp5     > 0, "output-stage repair never happened");
    check(n_suspect > 0, "suspect reconfiguration unit never happened");
    check(n_full   >= 2, "full reconfiguration did not happen twice");
    $display("cycles=%0d switch=%0d detect=%0d partial=%0d rp5=%0d suspect_cycles=%0d full=%0d",
             n_cycles_ok, n_switch, n_detect, n_partial, n_rp5, n_suspect, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
