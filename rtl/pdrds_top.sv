// pdrds_top: parity driven reconfigurable duplex system, two boards and the
// external unit.
//
// Both boards run the same design on their own copy of the inputs (with its
// parity). Each board's output stage passes its own result while its checkers
// are quiet and the other board's result otherwise, so a single fault on
// either board is both detected and located, and the system keeps delivering
// correct outputs while the faulty partition is repaired by partial
// reconfiguration. If a board's reconfiguration unit becomes suspect, the
// external unit reconfigures that whole board, holding it in reset meanwhile.
//
// The configuration port of each FPGA is outside this RTL: per board,
// rp_req[b] (one-hot over partitions RP-1..RP-N_RM and the output stage) and
// full_req[b] are held until a one-cycle rp_done[b] / full_done[b]. The
// fault-emulation inputs (cfg_upset, pin_flip, chk_upset, ru_upset) are tied
// to 0 in normal use. Array index 0 is board I, index 1 board II. Data path
// combinational; control registered on clk, synchronous active-low reset.
//
// Two boards, the cross-connected outputs and the external unit follow the
// proposed system; holding a board in reset during its full reconfiguration
// and the request/done ports are this design's.
module pdrds_top
  import pwtf_pkg::*;
#(
  parameter int N_RM = 3
) (
  input  logic                                             clk,
  input  logic                                             rst_n,
  input  logic [1:0][EX2_N_IN-1:0]                         in,
  input  logic [1:0]                                       parity_in,
  output logic [1:0][EX2_N_OUT-1:0]                        out,
  output logic [1:0]                                       parity_out,
  output logic [1:0]                                       ok_fail,
  output logic [1:0]                                       sel,
  output logic [1:0][N_RM-1:0]                             rm_fail,
  input  logic [1:0][N_RM-1:0][EX2_N_LUT-1:0][63:0]        cfg_upset,
  input  logic [1:0][N_RM-1:0][EX2_N_LUT-1:0][LUT_PINS-1:0] pin_flip,
  input  logic [1:0]                                       chk_upset,
  input  logic [1:0]                                       ru_upset,
  output logic [1:0][N_RM:0]                               rp_req,
  input  logic [1:0]                                       rp_done,
  output logic [1:0]                                       suspect,
  output logic [1:0]                                       full_req,
  input  logic [1:0]                                       full_done,
  output logic [1:0]                                       busy,      // partial repair running
  output logic                                             ext_busy   // full repair running
);
  logic [1:0][EX2_N_OUT-1:0] chain_out;
  logic [1:0]                chain_parity;

  for (genvar b = 0; b < 2; b++) begin : g_board
    pdrds_fpga #(.N_RM(N_RM)) u_fpga (
      .clk          (clk),
      .rst_n        (rst_n & ~full_req[b]),
      .in           (in[b]),
      .parity_in    (parity_in[b]),
      .oth_out      (chain_out[1-b]),
      .oth_parity   (chain_parity[1-b]),
      .hold         (full_req[b]),
      .cfg_upset    (cfg_upset[b]),
      .pin_flip     (pin_flip[b]),
      .chk_upset    (chk_upset[b]),
      .ru_upset     (ru_upset[b]),
      .rp_done      (rp_done[b]),
      .rp_req       (rp_req[b]),
      .suspect      (suspect[b]),
      .busy         (busy[b]),
      .rm_fail      (rm_fail[b]),
      .chain_out    (chain_out[b]),
      .chain_parity (chain_parity[b]),
      .out          (out[b]),
      .parity_out   (parity_out[b]),
      .ok_fail      (ok_fail[b]),
      .sel          (sel[b])
    );
  end

  external_unit #(.N_BOARD(2)) u_ext (
    .clk       (clk),
    .rst_n     (rst_n),
    .suspect   (suspect),
    .full_done (full_done),
    .full_req  (full_req),
    .busy      (ext_busy)
  );
endmodule
