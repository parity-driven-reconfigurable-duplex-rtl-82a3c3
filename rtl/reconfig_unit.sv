// reconfig_unit: partial-reconfiguration controller of one board (partition
// RP-4 of the reconfigurable duplex system).
//
// Inputs are the Fail signals of the board's reconfigurable partitions
// (rp_fail[k]; in pdrds_fpga index 0..N_RP-2 are the PWtf modules RP-1.., the
// last index is the output stage). When any is high and the unit is idle, it
// requests reconfiguration of the lowest-numbered failing partition only:
// rp_req is one-hot and stays high until the configuration port answers with
// a one-cycle rp_done, followed by one settle cycle. Errors travel downstream
// through the parity waves, so the first failing partition is the one at
// fault; choosing it is this design's reading.
//
// The unit suspects itself, raises suspect and stops, when
//  * the same partition would be reconfigured twice in a row (a repaired
//    partition that "fails" again points at a false Fail report), or
//  * its internal checker fires: the state register is kept in two copies,
//    each advanced by its own next-state logic, and compared every cycle.
// suspect is sticky; only a reset (the board's full reconfiguration by the
// external unit) clears it. Synchronous active-low reset. upset flips one bit
// of the first state copy to emulate a register upset; tie to 0 in normal use.
module reconfig_unit #(
  parameter int N_RP = 4                     // partitions under control
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [N_RP-1:0] rp_fail,
  input  logic            rp_done,           // configuration port finished
  input  logic            upset,
  output logic [N_RP-1:0] rp_req,            // one-hot reconfiguration request
  output logic            busy,              // a partition is being repaired
  output logic            suspect            // this unit needs repair
);
  localparam int RPW = (N_RP > 1) ? $clog2(N_RP) : 1;

  typedef enum logic [1:0] {RU_IDLE, RU_RECONF, RU_SETTLE, RU_SUSPECT} ru_state_e;

  typedef struct packed {
    ru_state_e        st;
    logic [RPW-1:0]   cur_rp;       // partition being repaired
    logic [RPW-1:0]   last_rp;      // previous repaired partition
    logic             last_valid;
  } ru_t;

  localparam ru_t RU_RESET = '{st: RU_IDLE, cur_rp: '0, last_rp: '0, last_valid: 1'b0};

  function automatic ru_t step(ru_t s, logic [N_RP-1:0] fail, logic done);
    ru_t n;
    logic [RPW-1:0] k;
    n = s;
    k = '0;
    for (int i = N_RP - 1; i >= 0; i--)
      if (fail[i]) k = RPW'(i);
    unique case (s.st)
      RU_IDLE:
        if (|fail) begin
          if (s.last_valid && s.last_rp == k) begin
            n.st = RU_SUSPECT;
          end else begin
            n.st         = RU_RECONF;
            n.cur_rp     = k;
            n.last_rp    = k;
            n.last_valid = 1'b1;
          end
        end
      RU_RECONF:  if (done) n.st = RU_SETTLE;
      RU_SETTLE:  n.st = RU_IDLE;
      RU_SUSPECT: n.st = RU_SUSPECT;
      default:    n.st = RU_SUSPECT;
    endcase
    return n;
  endfunction

  ru_t  copy_a, copy_b;
  logic cmp_err;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      copy_a  <= RU_RESET;
      copy_b  <= RU_RESET;
      cmp_err <= 1'b0;
    end else begin
      copy_a            <= step(copy_a, rp_fail, rp_done);
      copy_a.last_valid <= step(copy_a, rp_fail, rp_done).last_valid ^ upset;
      copy_b            <= step(copy_b, rp_fail, rp_done);
      if (copy_a != copy_b) cmp_err <= 1'b1;
    end
  end

  assign rp_req  = (copy_a.st == RU_RECONF) ? (N_RP'(1) << copy_a.cur_rp) : '0;
  assign busy    = (copy_a.st == RU_RECONF) || (copy_a.st == RU_SETTLE);
  assign suspect = (copy_a.st == RU_SUSPECT) || cmp_err || (copy_a != copy_b);

  // a request is held until the configuration port answers
  a_req_held: assert property (@(posedge clk) disable iff (!rst_n)
    (|rp_req && !rp_done && !upset && copy_a == copy_b) |=> (rp_req == $past(rp_req)));
  a_req_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(rp_req));
endmodule
