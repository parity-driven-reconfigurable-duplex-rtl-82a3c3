// external_unit: board-level repair controller outside both FPGAs.
//
// When a board's reconfiguration unit reports itself suspect, the external
// unit reconfigures that whole board: full_req[b] rises and stays high until
// the configuration port answers with a one-cycle full_done[b]; one settle
// cycle follows, during which the repaired board leaves reset. While full_req
// is high the board is held in reset and its outputs are not used. Boards are
// served one at a time, board 0 first, so that one board always stays in
// service. Synchronous active-low reset.
module external_unit #(
  parameter int N_BOARD = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [N_BOARD-1:0] suspect,
  input  logic [N_BOARD-1:0] full_done,
  output logic [N_BOARD-1:0] full_req,
  output logic               busy
);
  localparam int BW = (N_BOARD > 1) ? $clog2(N_BOARD) : 1;

  typedef enum logic [1:0] {EU_IDLE, EU_FULL, EU_SETTLE} eu_state_e;

  eu_state_e     state;
  logic [BW-1:0] board;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= EU_IDLE;
      board <= '0;
    end else begin
      unique case (state)
        EU_IDLE:
          if (|suspect) begin
            state <= EU_FULL;
            for (int b = N_BOARD - 1; b >= 0; b--)
              if (suspect[b]) board <= BW'(b);
          end
        EU_FULL:   if (full_done[board]) state <= EU_SETTLE;
        EU_SETTLE: state <= EU_IDLE;
        default:   state <= EU_IDLE;
      endcase
    end
  end

  assign full_req = (state == EU_FULL) ? (N_BOARD'(1) << board) : '0;
  assign busy     = (state != EU_IDLE);

  a_one_board: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(full_req));
endmodule
