// duplex_output_stage: checked output multiplexer of one board of the duplex
// system (the checker and 2:1 multiplexer of each FPGA; partition RP-5 in the
// reconfigurable version).
//
// A parity checker watches the local result. Multiplexer input 0 is the local
// outputs with their parity, input 1 is the other board's. The local result is
// passed while the checker reports OK; on Fail, or while force_other is high
// (this board is being repaired or has seen a fault elsewhere), the other
// board's result is passed instead. A fault in the checker itself gives a
// false Fail, which only switches to the other, healthy, board. Selecting on
// the local Fail and the force_other input is this design's reading of the
// scheme. chk_upset inverts the checker result to emulate a fault inside it;
// tie it to 0 in normal use. Combinational.
module duplex_output_stage #(
  parameter int N_OUT = 4
) (
  input  logic [N_OUT-1:0] loc_out,
  input  logic             loc_parity,
  input  logic [N_OUT-1:0] oth_out,
  input  logic             oth_parity,
  input  logic             force_other,
  input  logic             chk_upset,
  output logic [N_OUT-1:0] out,
  output logic             parity_out,
  output logic             fail,        // OK/Fail of the local result
  output logic             sel          // 1 = other board's result is passed
);
  logic chk_fail;

  pwtf_checker #(.N_OUT(N_OUT)) u_checker (
    .data   (loc_out),
    .parity (loc_parity),
    .fail   (chk_fail)
  );

  assign fail       = chk_fail ^ chk_upset;
  assign sel        = fail | force_other;
  assign out        = sel ? oth_out    : loc_out;
  assign parity_out = sel ? oth_parity : loc_parity;
endmodule
