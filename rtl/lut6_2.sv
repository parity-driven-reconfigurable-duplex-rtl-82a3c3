// lut6_2: six-input, two-output look-up table with its configuration memory
// as an input.
//
// Two 5-input LUTs share I0..I4. The lower one (init[31:0]) always drives O5;
// O6 is the upper one (init[63:32]) when I5 = 1 and the lower one when I5 = 0.
// This is the structure of the LUT6_2 primitive of Virtex-5-class FPGAs. The
// configuration word is a port rather than a parameter so that a bit-flip
// (single event upset) in configuration memory can be applied to it.
// Purely combinational; no clock.
//
// The two-half structure and the INIT layout follow the FPGA primitive the
// method is built on; the configuration port is this design's, for fault
// emulation.
module lut6_2 (
  input  logic [63:0] init,   // configuration memory: {upper LUT5, lower LUT5}
  input  logic [5:0]  i,      // I5..I0
  output logic        o6,
  output logic        o5
);
  logic [31:0] upper, lower;

  assign upper = init[63:32];
  assign lower = init[31:0];
  assign o5    = lower[i[4:0]];
  assign o6    = i[5] ? upper[i[4:0]] : lower[i[4:0]];
endmodule
