// pwtf_synth_bench: fault-injection bench for pwtf_block on a given LUT
// netlist, used by tb_pwtf_synthetic. The netlist parameters have the same
// meaning as in pwtf_block.
//
// The reference model evaluates the original netlist directly from the
// parameter arrays (original tables, O5 = f ^ XOR of the pins) and knows
// nothing about waves or routing. For VECS input vectors (all of them when
// 2^N_IN <= VECS) it checks: fault free, correct outputs and consistent
// parity; under single configuration-bit flips (every bit, or every
// FAULT_STRIDE-th bit for large netlists), fail equal to "the flipped entry
// is the one being read"; under every single pin inversion, fail always 1.
// Results come out on checks/failures when done rises.
//
// The detection property checked is the method's claim; the reference model,
// the vector choice and the fault sampling are this bench's.
module pwtf_synth_bench
  import pwtf_pkg::*;
#(
  parameter int          N_IN  = EX1_N_IN,
  parameter int          N_OUT = EX1_N_OUT,
  parameter int          N_LUT = EX1_N_LUT,
  parameter int          LUT_K     [N_LUT]           = EX1_K,
  parameter int          LUT_SRC   [N_LUT][LUT_PINS] = EX1_SRC,
  parameter logic [31:0] LUT_INIT  [N_LUT]           = EX1_INIT,
  parameter int          LUT_CHAIN [N_LUT]           = EX1_CHAIN,
  parameter int          OUT_SRC   [N_OUT]           = EX1_OUT,
  parameter int unsigned SEED         = 1,
  parameter int          VECS         = 16,
  parameter int          FAULT_STRIDE = 1
) (
  output int   checks,
  output int   failures,
  output logic done
);

  localparam int N_NET = N_IN + N_LUT;

  function automatic int unsigned hash(int unsigned a, int unsigned b);
    int unsigned x;
    x = (a * 32'h9E37_79B9) ^ (b * 32'h7F4A_7C15) ^ (SEED * 32'h2545_F491);
    x ^= x >> 16; x *= 32'h85EB_CA6B;
    x ^= x >> 13; x *= 32'hC2B2_AE35;
    x ^= x >> 16;
    return x;
  endfunction

  logic [N_IN-1:0]               in;
  logic                          parity_in;
  logic [N_LUT-1:0][63:0]        cfg_upset;
  logic [N_LUT-1:0][LUT_PINS-1:0] pin_flip;
  logic [N_OUT-1:0]              out;
  logic                          parity_out;

  pwtf_block #(
    .N_IN(N_IN), .N_OUT(N_OUT), .N_LUT(N_LUT), .LUT_K(LUT_K), .LUT_SRC(LUT_SRC),
    .LUT_INIT(LUT_INIT), .LUT_CHAIN(LUT_CHAIN), .OUT_SRC(OUT_SRC)
  ) dut (.in, .parity_in, .cfg_upset, .pin_flip, .out, .parity_out);

  // reference evaluation of the original netlist
  logic [N_NET-1:0] rnet;
  logic [N_LUT-1:0] ro5;
  logic [4:0]       raddr [N_LUT];
  logic [N_OUT-1:0] rout;

  task automatic evaluate(logic [N_IN-1:0] v);
    rnet = '0;
    rnet[N_IN-1:0] = v;
    for (int j = 0; j < N_LUT; j++) begin
      logic [4:0] a;
      logic       f;
      a = '0;
      for (int p = 0; p < LUT_K[j]; p++) a[p] = rnet[LUT_SRC[j][p]];
      if (LUT_CHAIN[j] != NO_NET) a[4] = ro5[LUT_CHAIN[j]];
      f = LUT_INIT[j][(LUT_K[j] == 5) ? a : (a & 5'((1 << LUT_K[j]) - 1))];
      raddr[j]       = a;
      ro5[j]         = f ^ (^a);
      rnet[N_IN + j] = f;
    end
    for (int o = 0; o < N_OUT; o++) rout[o] = rnet[OUT_SRC[o]];
  endtask

  function automatic logic [N_IN-1:0] vec(int i);
    if (N_IN < 31 && (1 << N_IN) <= VECS) return N_IN'(i);
    return N_IN'({hash(i, 70), hash(i, 71)});
  endfunction

  // row by row: one '0 over the whole vector would be a very wide constant
  task automatic clear_faults();
    for (int j = 0; j < N_LUT; j++) begin
      cfg_upset[j] = '0;
      pin_flip[j]  = '0;
    end
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL [seed %0d] %s", SEED, what);
    end
  endtask

  initial begin
    int nv;
    checks = 0; failures = 0; done = 1'b0;
    clear_faults();
    nv = (N_IN < 31 && (1 << N_IN) < VECS) ? (1 << N_IN) : VECS;
    begin : stats
      int lv [N_LUT];
      int fo [N_NET];
      int depth, chained, even, wave_luts;
      depth = 0; chained = 0; even = 0; wave_luts = 0;
      foreach (fo[s]) fo[s] = 0;
      for (int j = 0; j < N_LUT; j++) begin
        lv[j] = 1;
        for (int p = 0; p < LUT_K[j]; p++) begin
          fo[LUT_SRC[j][p]]++;
          if (LUT_SRC[j][p] >= N_IN && lv[LUT_SRC[j][p] - N_IN] >= lv[j]) lv[j] = lv[LUT_SRC[j][p] - N_IN] + 1;
        end
        if (LUT_CHAIN[j] != NO_NET) begin
          chained++;
          if (lv[LUT_CHAIN[j]] >= lv[j]) lv[j] = lv[LUT_CHAIN[j]] + 1;
        end
        if (lv[j] > depth) depth = lv[j];
      end
      for (int o = 0; o < N_OUT; o++) fo[OUT_SRC[o]]++;
      foreach (fo[s]) if (fo[s] % 2 == 0) even++;
      // wave cost estimate: wave l XORs wave l-1 with n_l new terms, which
      // takes ceil(n_l / 4) five-input LUTs
      for (int l = 1; l <= depth; l++) begin
        int n_l;
        n_l = 0;
        for (int j = 0; j < N_LUT; j++) begin
          bit absorbed;
          absorbed = 1'b0;
          for (int a = 0; a < N_LUT; a++) if (LUT_CHAIN[a] == j) absorbed = 1'b1;
          if (lv[j] == l && !absorbed) n_l++;
        end
        foreach (fo[s])
          if (fo[s] % 2 == 0 && ((s < N_IN) ? 1 : lv[s - N_IN]) == l) n_l++;
        wave_luts += (n_l + 3) / 4;
      end
      $display("netlist %0d LUTs: %0d levels, %0d chained O5, %0d nets with even fanout, about %0d wave LUTs (%0d%%)",
               N_LUT, depth, chained, even, wave_luts, wave_luts * 100 / N_LUT);
    end
    for (int i = 0; i < nv; i++) begin
      in = vec(i); parity_in = ^in;
      #1;
      evaluate(in);
      check(out == rout && parity_out == ^rout, $sformatf("fault free vector %0d", i));
    end
    for (int j = 0; j < N_LUT; j++)
      for (int b = (j % FAULT_STRIDE); b < 64; b += FAULT_STRIDE) begin
        clear_faults(); cfg_upset[j][b] = 1'b1;
        for (int i = 0; i < nv; i++) begin
          logic flag;
          in = vec(i); parity_in = ^in;
          #1;
          evaluate(in);
          flag = (^out) ^ parity_out;
          check(flag == (raddr[j] == 5'(b % 32)),
                $sformatf("upset lut%0d bit%0d vector %0d flag=%b", j, b, i, flag));
        end
      end
    clear_faults();
    for (int j = 0; j < N_LUT; j++)
      for (int p = 0; p < LUT_PINS; p++)
        if (p < LUT_K[j] || (p == 4 && LUT_CHAIN[j] != NO_NET)) begin
          clear_faults(); pin_flip[j][p] = 1'b1;
          for (int i = 0; i < nv; i += (nv > 4 ? nv / 4 : 1)) begin
            in = vec(i); parity_in = ^in;
            #1;
            check(((^out) ^ parity_out) == 1'b1, $sformatf("pin lut%0d pin%0d undetected", j, p));
          end
        end
    clear_faults();
    done = 1'b1;
  end
endmodule
