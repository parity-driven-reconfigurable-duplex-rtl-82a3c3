// pwtf_init_calc: computes the LUT6_2 configuration word of a Parity Waterfall
// cell from the INIT of the original k-input function (k = 1..5).
//
// Three steps, all plain bit operations: repeat the k-input table to 32
// entries (the O6 half), XOR it with the 5-input XOR table 32'h96696996 (the
// O5 half), and concatenate {O6 half, O5 half}. The original function need not
// be known, only its table. For 16'h0145 (k = 4): O6 half 32'h01450145, O5 half
// 32'h972C68D3. Combinational; each pwtf_lut feeds it constants, so it folds
// to a constant word there, while k and the table may as well be run-time
// inputs of a configuration generator.
//
// The XOR table, the doubled 4-input table and the word layout follow the
// method (O6 table in the upper half, as its text on the LUT6_2 halves
// requires); repeating tables of fewer than four inputs is this design's
// generalisation.
module pwtf_init_calc
  import pwtf_pkg::*;
(
  input  logic [31:0] orig_init,   // original table, entries 0..2^k-1 used
  input  logic [2:0]  k,           // number of inputs of the original function
  output logic [31:0] o6_half,     // widened original function
  output logic [31:0] o5_half,     // function XOR parity of I0..I4
  output logic [63:0] lut6_init    // {o6_half, o5_half}
);
  always_comb begin
    o6_half = '0;
    for (int a = 0; a < 32; a++) begin
      // entry a of the widened table is entry (a mod 2^k) of the original
      o6_half[a] = orig_init[a & ((32'd1 << k) - 32'd1)];
    end
  end

  assign o5_half   = o6_half ^ XOR5_INIT;
  assign lut6_init = {o6_half, o5_half};
endmodule
