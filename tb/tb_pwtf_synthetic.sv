// tb_pwtf_synthetic: fault-coverage test of the Parity Waterfall block on
// pseudo-random LUT netlists sized like small published benchmark circuits:
// two of 40 LUTs with 8 I/Os (4 in, 4 out) and one of 277 LUTs with 33 I/Os
// (16 in, 17 out).
//
// The netlists are computed here from a hash of (seed, LUT index, field):
//   - LUT j has 1..5 inputs, never more than the N_IN + j nets before it;
//   - each pin reads a distinct earlier net: one time in four any earlier
//     net, otherwise one of the 12 most recent, so the circuits are deep;
//   - the truth table is the hash, cut to 2^K entries;
//   - about one LUT in three with K <= 4 reads on I4 the O5 of an earlier
//     cell c. Which c depends on j mod 3: j-1, j-4 or j-7. These land in
//     different classes mod 3, so no O5 feeds two cells;
//   - the outputs are the last LUTs, and nets nobody reads stay in (zero,
//     i.e. even, fanout).
// The assignment patterns are spelled out with the `ROWS macros because
// each row of a two-dimensional parameter has to be its own constant call.
//
// Each pwtf_synth_bench injects single configuration-bit flips and single
// branch inversions. It checks that every excited fault, and only an
// excited fault, raises the checker.
//
// The netlist sizes are those of two published benchmarks; the netlists
// themselves are generated here.
module tb_pwtf_synthetic;
  import pwtf_pkg::*;

  typedef int row_t [LUT_PINS];

  function automatic int unsigned hash(int unsigned seed, int unsigned a, int unsigned b);
    int unsigned x;
    x = (a * 32'h9E37_79B9) ^ (b * 32'h7F4A_7C15) ^ (seed * 32'h2545_F491);
    x ^= x >> 16; x *= 32'h85EB_CA6B;
    x ^= x >> 13; x *= 32'hC2B2_AE35;
    x ^= x >> 16;
    return x;
  endfunction

  function automatic int k_of(int n_in, int seed, int j);
    int k;
    k = 1 + int'(hash(seed, j, 1) % 5);
    return (k > n_in + j) ? n_in + j : k;
  endfunction

  function automatic row_t src_of(int n_in, int seed, int j);
    row_t s;
    int   avail, pick, k;
    bit   dup;
    k     = k_of(n_in, seed, j);
    avail = n_in + j;
    for (int p = 0; p < LUT_PINS; p++) begin
      s[p] = NO_NET;
      if (p < k) begin
        if (hash(seed, j, 10 + p) % 4 == 0) pick = int'(hash(seed, j, 20 + p) % avail);
        else pick = avail - 1 - int'(hash(seed, j, 30 + p) % ((avail < 12) ? avail : 12));
        for (int t = 0; t < LUT_PINS; t++) begin
          dup = 1'b0;
          for (int q = 0; q < p; q++) if (s[q] == pick) dup = 1'b1;
          if (dup) pick = (pick + 1) % avail;
        end
        s[p] = pick;
      end
    end
    return s;
  endfunction

  function automatic logic [31:0] init_of(int n_in, int seed, int j);
    int k;
    k = k_of(n_in, seed, j);
    return (k == 5) ? hash(seed, j, 40) : hash(seed, j, 40) & ((32'd1 << (1 << k)) - 1);
  endfunction

  function automatic int chain_of(int n_in, int seed, int j);
    int c;
    c = j - ((j % 3 == 1) ? 1 : (j % 3 == 0) ? 4 : 7);
    if (k_of(n_in, seed, j) <= 4 && c >= 0 && hash(seed, j, 50) % 3 == 0) return c;
    return NO_NET;
  endfunction

  // F(n, s, i) for i = B .. B+7, and larger groups built from it
  `define ROWS8(F, N, S, B) F(N, S, (B)), F(N, S, (B)+1), F(N, S, (B)+2), F(N, S, (B)+3), \
                            F(N, S, (B)+4), F(N, S, (B)+5), F(N, S, (B)+6), F(N, S, (B)+7)
  `define ROWS40(F, N, S) `ROWS8(F, N, S, 0), `ROWS8(F, N, S, 8), `ROWS8(F, N, S, 16), \
                          `ROWS8(F, N, S, 24), `ROWS8(F, N, S, 32)
  `define ROWS32(F, N, S, B) `ROWS8(F, N, S, (B)), `ROWS8(F, N, S, (B)+8), \
                             `ROWS8(F, N, S, (B)+16), `ROWS8(F, N, S, (B)+24)
  `define ROWS277(F, N, S) `ROWS32(F, N, S, 0), `ROWS32(F, N, S, 32), `ROWS32(F, N, S, 64), \
                           `ROWS32(F, N, S, 96), `ROWS32(F, N, S, 128), `ROWS32(F, N, S, 160), \
                           `ROWS32(F, N, S, 192), `ROWS32(F, N, S, 224), `ROWS8(F, N, S, 256), \
                           `ROWS8(F, N, S, 264), F(N, S, 272), F(N, S, 273), F(N, S, 274), \
                           F(N, S, 275), F(N, S, 276)

  // netlist A: 4 in, 4 out, 40 LUTs, seed 1
  localparam int          A_K     [40]           = '{`ROWS40(k_of, 4, 1)};
  localparam int          A_SRC   [40][LUT_PINS] = '{`ROWS40(src_of, 4, 1)};
  localparam logic [31:0] A_INIT  [40]           = '{`ROWS40(init_of, 4, 1)};
  localparam int          A_CHAIN [40]           = '{`ROWS40(chain_of, 4, 1)};
  localparam int          A_OUT   [4]            = '{43, 42, 41, 40};

  // netlist B: 4 in, 4 out, 40 LUTs, seed 7
  localparam int          B_K     [40]           = '{`ROWS40(k_of, 4, 7)};
  localparam int          B_SRC   [40][LUT_PINS] = '{`ROWS40(src_of, 4, 7)};
  localparam logic [31:0] B_INIT  [40]           = '{`ROWS40(init_of, 4, 7)};
  localparam int          B_CHAIN [40]           = '{`ROWS40(chain_of, 4, 7)};

  // netlist C: 16 in, 17 out, 277 LUTs, seed 3 (outputs: the last 17 nets)
  localparam int          C_K     [277]           = '{`ROWS277(k_of, 16, 3)};
  localparam int          C_SRC   [277][LUT_PINS] = '{`ROWS277(src_of, 16, 3)};
  localparam logic [31:0] C_INIT  [277]           = '{`ROWS277(init_of, 16, 3)};
  localparam int          C_CHAIN [277]           = '{`ROWS277(chain_of, 16, 3)};
  localparam int          C_OUT   [17]            = '{292, 291, 290, 289, 288, 287, 286, 285,
                                                      284, 283, 282, 281, 280, 279, 278, 277, 276};

  int   c0, f0, c1, f1, c2, f2;
  logic d0, d1, d2;
  int   checks = 0, failures = 0;

  pwtf_synth_bench #(
    .N_IN(4), .N_OUT(4), .N_LUT(40), .LUT_K(A_K), .LUT_SRC(A_SRC), .LUT_INIT(A_INIT),
    .LUT_CHAIN(A_CHAIN), .OUT_SRC(A_OUT), .SEED(1), .VECS(16), .FAULT_STRIDE(1)
  ) b40a (.checks(c0), .failures(f0), .done(d0));

  pwtf_synth_bench #(
    .N_IN(4), .N_OUT(4), .N_LUT(40), .LUT_K(B_K), .LUT_SRC(B_SRC), .LUT_INIT(B_INIT),
    .LUT_CHAIN(B_CHAIN), .OUT_SRC(A_OUT), .SEED(7), .VECS(16), .FAULT_STRIDE(1)
  ) b40b (.checks(c1), .failures(f1), .done(d1));

  pwtf_synth_bench #(
    .N_IN(16), .N_OUT(17), .N_LUT(277), .LUT_K(C_K), .LUT_SRC(C_SRC), .LUT_INIT(C_INIT),
    .LUT_CHAIN(C_CHAIN), .OUT_SRC(C_OUT), .SEED(3), .VECS(24), .FAULT_STRIDE(3)
  ) b277 (.checks(c2), .failures(f2), .done(d2));

  initial begin : watchdog
    #100ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end

  initial begin
    wait (d0 && d1 && d2);
    checks   = c0 + c1 + c2;
    failures = f0 + f1 + f2;
    $display("40-LUT netlists: %0d + %0d checks, 277-LUT netlist: %0d checks", c0, c1, c2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
