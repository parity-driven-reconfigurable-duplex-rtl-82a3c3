// pwtf_checker: parity checker at the outputs of a Parity Waterfall block.
//
// A PWtf block delivers its outputs together with a parity bit that, in the
// fault-free case, equals the XOR of the outputs. The checker computes
// fail = (XOR of outputs) XOR parity: 0 means OK, 1 means Fail. The same
// checker placed at the inputs of the next block checks the previous block's
// outputs. A single OK/Fail wire is this design's choice; the checker is not
// doubled into a two-rail form. Combinational.
module pwtf_checker #(
  parameter int N_OUT = 2
) (
  input  logic [N_OUT-1:0] data,     // block outputs
  input  logic             parity,   // parity of outputs delivered by the block
  output logic             fail      // 1 = parity mismatch
);
  assign fail = (^data) ^ parity;
endmodule
