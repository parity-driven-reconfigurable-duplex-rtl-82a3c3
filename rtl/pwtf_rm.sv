// pwtf_rm: reconfigurable module of the duplex system, a Parity Waterfall
// block together with its own output checker.
//
// The module passes its outputs and their parity on to the next module and
// raises fail when the XOR of the outputs does not match the parity. Because
// a parity error at a block's inputs carries through the waves, an error made
// upstream also shows at every later module; the reconfiguration unit uses
// the lowest-numbered failing module to locate it. The netlist parameters are
// those of pwtf_block (defaults: the 4-in/4-out example netlist of pwtf_pkg).
// Combinational, zero latency.
//
// A checker per module follows the proposed system; the example netlist
// used by default is this design's.
module pwtf_rm
  import pwtf_pkg::*;
#(
  parameter int          N_IN  = EX2_N_IN,
  parameter int          N_OUT = EX2_N_OUT,
  parameter int          N_LUT = EX2_N_LUT,
  parameter int          LUT_K     [N_LUT]           = EX2_K,
  parameter int          LUT_SRC   [N_LUT][LUT_PINS] = EX2_SRC,
  parameter logic [31:0] LUT_INIT  [N_LUT]           = EX2_INIT,
  parameter int          LUT_CHAIN [N_LUT]           = EX2_CHAIN,
  parameter int          OUT_SRC   [N_OUT]           = EX2_OUT
) (
  input  logic [N_IN-1:0]                in,
  input  logic                           parity_in,
  input  logic [N_LUT-1:0][63:0]         cfg_upset,
  input  logic [N_LUT-1:0][LUT_PINS-1:0] pin_flip,
  output logic [N_OUT-1:0]               out,
  output logic                           parity_out,
  output logic                           fail        // OK/Fail of this module
);
  pwtf_block #(
    .N_IN(N_IN), .N_OUT(N_OUT), .N_LUT(N_LUT),
    .LUT_K(LUT_K), .LUT_SRC(LUT_SRC), .LUT_INIT(LUT_INIT),
    .LUT_CHAIN(LUT_CHAIN), .OUT_SRC(OUT_SRC)
  ) u_block (
    .in, .parity_in, .cfg_upset, .pin_flip, .out, .parity_out
  );

  pwtf_checker #(.N_OUT(N_OUT)) u_checker (
    .data   (out),
    .parity (parity_out),
    .fail   (fail)
  );
endmodule
