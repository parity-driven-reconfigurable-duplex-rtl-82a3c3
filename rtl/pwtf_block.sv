// pwtf_block: a combinational circuit protected by the Parity Waterfall method.
//
// The circuit is given as a netlist of LUTs of at most five inputs (see
// pwtf_pkg for the encoding). Each LUT becomes a pwtf_lut cell: O6 carries the
// original function and is routed as in the original circuit, O5 carries the
// function XOR all the cell's inputs. The parity of the block inputs
// (parity_in) then flows through a cascade of parity waves, one per logic
// level l = 1..MAX_LEVEL:
//   wave[0] = parity_in
//   wave[l] = wave[l-1] ^ O5 of every level-l cell ^ extra branches
// and parity_out = wave[MAX_LEVEL]. Summed over the netlist, every net that is
// read an odd number of times (LUT pins plus block outputs) cancels, so
// without faults parity_out equals the XOR of the outputs. Any single change
// of a net branch or of one LUT half then flips parity_out XOR ^out, which a
// pwtf_checker detects.
//
// Routing condition: a net with even fanout would cancel its own error. Such a
// net gets one more branch, straight into a wave: a block input into wave 1,
// the output of a level-l cell into wave l. The set of extra branches, the
// levels and the wave contents are all computed here at elaboration from the
// netlist parameters. A cell with K <= 4 may read the O5 of an earlier cell on
// I4 (LUT_CHAIN); that O5 then leaves the wave XOR. Each LUT's O5 may be
// chained into at most one later LUT.
//
// A wave is written as an XOR over its members; a synthesis tool splits it
// into LUTs of five inputs or fewer. The correction of physically shared
// branch segments after place and route is outside RTL.
//
// Fault-emulation inputs (tie to 0 in normal use): cfg_upset flips bits of a
// LUT's configuration word, pin_flip inverts one branch of a net where it
// enters a LUT pin. Combinational, zero latency.
module pwtf_block
  import pwtf_pkg::*;
#(
  parameter int          N_IN  = EX1_N_IN,
  parameter int          N_OUT = EX1_N_OUT,
  parameter int          N_LUT = EX1_N_LUT,
  parameter int          LUT_K     [N_LUT]           = EX1_K,
  parameter int          LUT_SRC   [N_LUT][LUT_PINS] = EX1_SRC,
  parameter logic [31:0] LUT_INIT  [N_LUT]           = EX1_INIT,
  parameter int          LUT_CHAIN [N_LUT]           = EX1_CHAIN,
  parameter int          OUT_SRC   [N_OUT]           = EX1_OUT
) (
  input  logic [N_IN-1:0]              in,
  input  logic                         parity_in,   // XOR of in (delivered with it)
  input  logic [N_LUT-1:0][63:0]       cfg_upset,
  input  logic [N_LUT-1:0][LUT_PINS-1:0] pin_flip,
  output logic [N_OUT-1:0]             out,
  output logic                         parity_out   // XOR of out when fault free
);
  localparam int N_NET = N_IN + N_LUT;

  // ---------------- elaboration-time netlist analysis ----------------
  // Each property is computed once for the whole netlist, so elaboration
  // stays roughly linear in the netlist size.
  typedef int lut_int_t [N_LUT];

  // logic level of every cell: 1 + the deepest cell it reads (O6 or O5)
  function automatic lut_int_t all_levels();
    lut_int_t lv;
    for (int a = 0; a < N_LUT; a++) begin
      lv[a] = 1;
      for (int p = 0; p < LUT_K[a]; p++)
        if (LUT_SRC[a][p] >= N_IN && LUT_SRC[a][p] < N_IN + a &&
            lv[LUT_SRC[a][p] - N_IN] + 1 > lv[a])
          lv[a] = lv[LUT_SRC[a][p] - N_IN] + 1;
      if (LUT_CHAIN[a] != NO_NET && LUT_CHAIN[a] < a && lv[LUT_CHAIN[a]] + 1 > lv[a])
        lv[a] = lv[LUT_CHAIN[a]] + 1;
    end
    return lv;
  endfunction

  localparam lut_int_t LEVEL = all_levels();

  function automatic int max_level();
    int m = 1;
    for (int j = 0; j < N_LUT; j++)
      if (LEVEL[j] > m) m = LEVEL[j];
    return m;
  endfunction

  // nets with an even number of branches (LUT pins plus block outputs)
  function automatic logic [N_NET-1:0] even_fanout();
    logic [N_NET-1:0] odd = '0;
    for (int a = 0; a < N_LUT; a++)
      for (int p = 0; p < LUT_K[a]; p++)
        if (LUT_SRC[a][p] >= 0 && LUT_SRC[a][p] < N_NET) odd[LUT_SRC[a][p]] ^= 1'b1;
    for (int o = 0; o < N_OUT; o++)
      if (OUT_SRC[o] >= 0 && OUT_SRC[o] < N_NET) odd[OUT_SRC[o]] ^= 1'b1;
    return ~odd;
  endfunction

  // cells whose O5 is chained into a later cell instead of a wave
  function automatic logic [N_LUT-1:0] absorbed_cells();
    logic [N_LUT-1:0] m = '0;
    for (int a = 0; a < N_LUT; a++)
      if (LUT_CHAIN[a] >= 0 && LUT_CHAIN[a] < N_LUT) m[LUT_CHAIN[a]] = 1'b1;
    return m;
  endfunction

  localparam logic [N_NET-1:0] EVEN     = even_fanout();
  localparam logic [N_LUT-1:0] ABSORBED = absorbed_cells();

  // cells whose O5 enters wave l directly
  function automatic logic [N_LUT-1:0] o5_mask(int l);
    logic [N_LUT-1:0] m = '0;
    for (int j = 0; j < N_LUT; j++)
      m[j] = (LEVEL[j] == l) && !ABSORBED[j];
    return m;
  endfunction

  // nets with even fanout, whose extra branch enters wave l
  // (block inputs go to wave 1, a level-l cell's output to wave l)
  function automatic logic [N_NET-1:0] branch_mask(int l);
    logic [N_NET-1:0] m = '0;
    for (int s = 0; s < N_NET; s++)
      m[s] = EVEN[s] && (((s < N_IN) ? 1 : LEVEL[s - N_IN]) == l);
    return m;
  endfunction

  localparam int MAX_LEVEL = max_level();

  // ---------------- original function on O6, inner parity on O5 ----------------
  // Each cell reads the nets visible before it (block inputs and the outputs
  // of lower-numbered cells) and adds its own O6 and O5 for the cells after.
  logic [N_LUT-1:0] o5;
  logic [N_NET-1:0] net;

  for (genvar j = 0; j < N_LUT; j++) begin : g_lut
    logic [N_NET-1:0]    prev_net, vis_net;
    logic [N_LUT-1:0]    prev_o5, vis_o5;
    logic [LUT_PINS-1:0] pin;
    logic                o6_j, o5_j;

    if (j == 0) begin : g_first
      assign prev_net = N_NET'(in);
      assign prev_o5  = '0;
    end else begin : g_next
      assign prev_net = g_lut[j-1].vis_net;
      assign prev_o5  = g_lut[j-1].vis_o5;
    end

    for (genvar p = 0; p < LUT_PINS; p++) begin : g_pin
      if (p < LUT_K[j]) begin : g_used
        assign pin[p] = prev_net[LUT_SRC[j][p]] ^ pin_flip[j][p];
      end else if (p == LUT_PINS - 1 && LUT_CHAIN[j] != NO_NET) begin : g_chain
        assign pin[p] = prev_o5[LUT_CHAIN[j]] ^ pin_flip[j][p];
      end else begin : g_tie
        assign pin[p] = 1'b0;
      end
    end

    pwtf_lut #(.K(LUT_K[j]), .ORIG_INIT(LUT_INIT[j])) u_cell (
      .i         (pin),
      .cfg_upset (cfg_upset[j]),
      .o6        (o6_j),
      .o5        (o5_j)
    );

    assign vis_net = prev_net | (N_NET'(o6_j) << (N_IN + j));
    assign vis_o5  = prev_o5  | (N_LUT'(o5_j) << j);
  end

  assign net = g_lut[N_LUT-1].vis_net;
  assign o5  = g_lut[N_LUT-1].vis_o5;

  for (genvar o = 0; o < N_OUT; o++) begin : g_out
    assign out[o] = net[OUT_SRC[o]];
  end

  // ---------------- parity waves ----------------
  logic [MAX_LEVEL:0] wave;
  assign wave[0] = parity_in;

  for (genvar l = 1; l <= MAX_LEVEL; l++) begin : g_wave
    localparam logic [N_LUT-1:0] O5M = o5_mask(l);
    localparam logic [N_NET-1:0] BRM = branch_mask(l);
    assign wave[l] = wave[l-1] ^ (^(o5 & O5M)) ^ (^(net & BRM));
  end

  assign parity_out = wave[MAX_LEVEL];

  // netlist sanity (elaboration)
  function automatic bit netlist_ok();
    for (int j = 0; j < N_LUT; j++) begin
      for (int p = 0; p < LUT_K[j]; p++)
        if (LUT_SRC[j][p] < 0 || LUT_SRC[j][p] >= N_IN + j) return 1'b0;
      if (LUT_CHAIN[j] != NO_NET && (LUT_K[j] > 4 || LUT_CHAIN[j] >= j)) return 1'b0;
    end
    for (int o = 0; o < N_OUT; o++)
      if (OUT_SRC[o] < 0 || OUT_SRC[o] >= N_NET) return 1'b0;
    return 1'b1;
  endfunction

  if (!netlist_ok()) begin : g_bad_netlist
    $error("pwtf_block: netlist parameters are inconsistent");
  end
endmodule
