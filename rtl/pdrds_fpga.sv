// pdrds_fpga: one board (FPGA) of the parity driven reconfigurable duplex
// system.
//
// Partitions:
//   RP-1..RP-N_RM  PWtf reconfigurable modules in a chain: each module's
//                  outputs and parity are the next module's inputs; each has
//                  its own checker and OK/Fail signal.
//   RP-4           reconfig_unit, collecting the Fail signals and requesting
//                  partial reconfiguration of the failing partition.
//   RP-5           duplex_output_stage: checker on the last module's result
//                  and the 2:1 multiplexer choosing between it and the other
//                  board's result.
// The last module's outputs and parity also leave the board (chain_out,
// chain_parity) to feed the other board's output stage.
//
// The output stage switches to the other board while the local checker
// fails, while any module of this board fails, while a partition is being
// repaired, once the reconfiguration unit is suspect, and while the whole
// board is held for full reconfiguration (hold). Partition numbering of
// rp_req: bit k < N_RM is module RP-(k+1), bit N_RM is the output stage.
// Reconfiguration itself happens outside (configuration port): rp_req is held
// until a one-cycle rp_done. The modules all use the same netlist, so N_IN must
// equal N_OUT. cfg_upset, pin_flip, chk_upset and ru_upset emulate faults and
// are tied to 0 in normal use. Data path combinational; control registered on
// clk with synchronous active-low reset.
//
// The partitions, the chain of three modules, the checker and the 0/1
// multiplexer follow the proposed system; the extra switch-over conditions,
// the partition numbering and the handshake are this design's.
module pdrds_fpga
  import pwtf_pkg::*;
#(
  parameter int          N_RM  = 3,
  parameter int          N_IN  = EX2_N_IN,
  parameter int          N_OUT = EX2_N_OUT,
  parameter int          N_LUT = EX2_N_LUT,
  parameter int          LUT_K     [N_LUT]           = EX2_K,
  parameter int          LUT_SRC   [N_LUT][LUT_PINS] = EX2_SRC,
  parameter logic [31:0] LUT_INIT  [N_LUT]           = EX2_INIT,
  parameter int          LUT_CHAIN [N_LUT]           = EX2_CHAIN,
  parameter int          OUT_SRC   [N_OUT]           = EX2_OUT
) (
  input  logic                                     clk,
  input  logic                                     rst_n,
  input  logic [N_IN-1:0]                          in,
  input  logic                                     parity_in,
  input  logic [N_OUT-1:0]                         oth_out,
  input  logic                                     oth_parity,
  input  logic                                     hold,
  input  logic [N_RM-1:0][N_LUT-1:0][63:0]         cfg_upset,
  input  logic [N_RM-1:0][N_LUT-1:0][LUT_PINS-1:0] pin_flip,
  input  logic                                     chk_upset,
  input  logic                                     ru_upset,
  input  logic                                     rp_done,
  output logic [N_RM:0]                            rp_req,
  output logic                                     suspect,
  output logic                                     busy,
  output logic [N_RM-1:0]                          rm_fail,
  output logic [N_OUT-1:0]                         chain_out,
  output logic                                     chain_parity,
  output logic [N_OUT-1:0]                         out,
  output logic                                     parity_out,
  output logic                                     ok_fail,   // 1 = Fail
  output logic                                     sel        // 1 = other board passed
);
  logic [N_RM:0][N_OUT-1:0] stage_data;
  logic [N_RM:0]            stage_parity;
  logic                     out_fail;

  assign stage_data[0]   = in;
  assign stage_parity[0] = parity_in;

  for (genvar m = 0; m < N_RM; m++) begin : g_rm
    pwtf_rm #(
      .N_IN(N_IN), .N_OUT(N_OUT), .N_LUT(N_LUT),
      .LUT_K(LUT_K), .LUT_SRC(LUT_SRC), .LUT_INIT(LUT_INIT),
      .LUT_CHAIN(LUT_CHAIN), .OUT_SRC(OUT_SRC)
    ) u_rm (
      .in         (stage_data[m]),
      .parity_in  (stage_parity[m]),
      .cfg_upset  (cfg_upset[m]),
      .pin_flip   (pin_flip[m]),
      .out        (stage_data[m+1]),
      .parity_out (stage_parity[m+1]),
      .fail       (rm_fail[m])
    );
  end

  assign chain_out    = stage_data[N_RM];
  assign chain_parity = stage_parity[N_RM];

  reconfig_unit #(.N_RP(N_RM + 1)) u_ru (
    .clk     (clk),
    .rst_n   (rst_n),
    .rp_fail ({out_fail, rm_fail}),
    .rp_done (rp_done),
    .upset   (ru_upset),
    .rp_req  (rp_req),
    .busy    (busy),
    .suspect (suspect)
  );

  duplex_output_stage #(.N_OUT(N_OUT)) u_out (
    .loc_out     (chain_out),
    .loc_parity  (chain_parity),
    .oth_out     (oth_out),
    .oth_parity  (oth_parity),
    .force_other (hold | busy | suspect | (|rm_fail)),
    .chk_upset   (chk_upset),
    .out         (out),
    .parity_out  (parity_out),
    .fail        (out_fail),
    .sel         (sel)
  );

  assign ok_fail = out_fail;

  if (N_IN != N_OUT) begin : g_bad_width
    $error("pdrds_fpga: chained modules need N_IN == N_OUT");
  end
endmodule
