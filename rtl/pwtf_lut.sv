// pwtf_lut: one LUT of the original circuit implemented as a Parity Waterfall
// cell on a LUT6_2.
//
// O6 gives the original k-input function of I0..I(k-1). O5 gives that function
// XOR I0 ^ I1 ^ I2 ^ I3 ^ I4: the "inner parity" of the cell. The XOR costs no
// logic, it is folded into the lower LUT5's content, which pwtf_init_calc
// derives from ORIG_INIT (constant inputs: it reduces to a constant word).
// I5 is tied to 1 so that O6 reads the upper LUT5; if it were 0 the O5 function
// would appear on O6. When k <= 4, I4 is free: it may carry the O5 output of
// an earlier cell, which then enters the parity through this cell instead of
// through a parity-wave LUT. Unused pins must be driven 0 by the instantiating
// block. cfg_upset is XORed into the configuration word to emulate upsets of
// configuration memory; tie it to 0 in normal use. Combinational.
//
// The cell structure, the O5 content and I5 = 1 follow the method; the
// cfg_upset port is this design's. Only the whole word of pwtf_init_calc is
// used here, so its two half-word outputs are left unconnected on purpose.
module pwtf_lut
  import pwtf_pkg::*;
#(
  parameter int          K         = 4,          // inputs of the original function
  parameter logic [31:0] ORIG_INIT = 32'h0145    // original table (2^K entries)
) (
  input  logic [4:0]  i,          // I4..I0
  input  logic [63:0] cfg_upset,  // configuration-memory bit flips
  output logic        o6,         // original function
  output logic        o5          // inner parity
);
  logic [63:0] init_word;

  pwtf_init_calc u_init (
    .orig_init (ORIG_INIT),
    .k         (3'(K)),
    .o6_half   (),
    .o5_half   (),
    .lut6_init (init_word)
  );

  lut6_2 u_lut (
    .init (init_word ^ cfg_upset),
    .i    ({1'b1, i}),
    .o6   (o6),
    .o5   (o5)
  );

  initial begin
    assert (K >= 1 && K <= LUT_PINS) else $error("pwtf_lut: K must be 1..5");
  end
endmodule
