// pwtf_pkg: shared constants and example netlists for the Parity Waterfall
// (PWtf) fault-detection scheme.
//
// A PWtf cell is a six-input, two-output LUT (LUT6_2) whose upper LUT5 holds
// the original logic function (read on O6, with I5 tied to 1) and whose lower
// LUT5 holds the same function XORed with the XOR of all five LUT inputs (read
// on O5). The lower half's content is derived from the upper half alone:
//   1. a k-input INIT is widened to 5 inputs by repeating it, so the value does
//      not depend on the unused inputs;
//   2. the 5-input XOR table 32'h96696996 is XORed into it bit by bit.
// For the worked example 16'h0145 this gives O6 half 32'h01450145 and O5 half
// 32'h972C68D3.
//
// Bit order follows the LUT6_2 structure: INIT[63:32] is the LUT5 that feeds
// O6 when I5 = 1, INIT[31:0] is the LUT5 that always drives O5. The 64-bit word
// is therefore {O6 half, O5 half}; this structural reading is used throughout.
//
// Netlist encoding used by pwtf_block: net indices 0..N_IN-1 are the block
// inputs, N_IN+j is the O6 output of LUT j. LUTs are listed in topological
// order (a LUT reads only inputs or lower-numbered LUTs). NO_NET (-1) marks an
// unused pin or "no chained O5". The two example netlists below are this
// design's own: the first one reproduces the connectivity of the two-level,
// four-LUT2 parity-waterfall example (inputs A..D, outputs X, Y); the second
// is a 4-in/4-out circuit used for each reconfigurable module of the duplex
// system, and contains the 4-input LUT INIT 16'h0145 of the worked example.
package pwtf_pkg;

  localparam int          NO_NET   = -1;
  localparam int          LUT_PINS = 5;            // I0..I4 of a LUT6_2 used by PWtf
  localparam logic [31:0] XOR5_INIT = 32'h9669_6996; // parity of the 5-bit address

  // ---- Example netlist 1: two-level, four-LUT2 circuit (A,B,C,D -> X,Y) ----
  // nets: 0=A 1=B 2=C 3=D 4=L0 5=L1 6=L2 7=L3
  // L0 = A AND B, L1 = B XOR C, X = L2 = L0 OR L1, Y = L3 = NAND(L1, D).
  // B and L1 have fanout 2 and receive an extra branch into the first wave.
  localparam int          EX1_N_IN  = 4;
  localparam int          EX1_N_OUT = 2;
  localparam int          EX1_N_LUT = 4;
  localparam int          EX1_K     [EX1_N_LUT] = '{2, 2, 2, 2};
  localparam int          EX1_SRC   [EX1_N_LUT][LUT_PINS] = '{
    '{1, 0, NO_NET, NO_NET, NO_NET},   // L0: I0=B,  I1=A
    '{2, 1, NO_NET, NO_NET, NO_NET},   // L1: I0=C,  I1=B
    '{5, 4, NO_NET, NO_NET, NO_NET},   // L2: I0=L1, I1=L0
    '{3, 5, NO_NET, NO_NET, NO_NET}    // L3: I0=D,  I1=L1
  };
  localparam logic [31:0] EX1_INIT  [EX1_N_LUT] = '{32'h8, 32'h6, 32'hE, 32'h7};
  localparam int          EX1_CHAIN [EX1_N_LUT] = '{NO_NET, NO_NET, NO_NET, NO_NET};
  localparam int          EX1_OUT   [EX1_N_OUT] = '{6, 7};

  // ---- Example netlist 2: 4-in / 4-out module used in each RM ----
  // nets: 0..3 = in0..in3, 4=L0 5=L1 6=L2 7=L3 8=L4
  // L0 = in0 ^ in1, L1 = maj(in1,in2,in3), L2 = in3 ? L1 : L0,
  // L3 = f(in0, L1) with I4 fed by the O5 of L0 (parity-wave reduction),
  // L4 = INIT 16'h0145 over (L2, L3, in2, in1). out = {L1, L4, L3, L2}.
  localparam int          EX2_N_IN  = 4;
  localparam int          EX2_N_OUT = 4;
  localparam int          EX2_N_LUT = 5;
  localparam int          EX2_K     [EX2_N_LUT] = '{2, 3, 3, 2, 4};
  localparam int          EX2_SRC   [EX2_N_LUT][LUT_PINS] = '{
    '{0, 1, NO_NET, NO_NET, NO_NET},   // L0
    '{1, 2, 3,      NO_NET, NO_NET},   // L1
    '{4, 5, 3,      NO_NET, NO_NET},   // L2: I2 selects I1 (L1) over I0 (L0)
    '{0, 5, NO_NET, NO_NET, NO_NET},   // L3 (I4 = O5 of L0)
    '{6, 7, 2,      1,      NO_NET}    // L4
  };
  localparam logic [31:0] EX2_INIT  [EX2_N_LUT] = '{32'h6, 32'hE8, 32'hCA, 32'hB, 32'h0145};
  localparam int          EX2_CHAIN [EX2_N_LUT] = '{NO_NET, NO_NET, NO_NET, 0, NO_NET};
  localparam int          EX2_OUT   [EX2_N_OUT] = '{6, 7, 8, 5};

endpackage
