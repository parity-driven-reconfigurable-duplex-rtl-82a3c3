// tb_pwtf_block: self-checking fault-injection test of the Parity Waterfall
// block on both example netlists of pwtf_pkg (instance u1: 4-in/2-out
// two-level example with two even-fanout nets; instance u2: 4-in/4-out
// netlist with a chained O5 and the 16'h0145 table).
//
// The reference model evaluates the netlists from their Boolean equations and
// also gives every LUT's 5-bit address. For every input vector:
//  * fault free: outputs equal the reference and parity_out equals their XOR;
//  * each single configuration-bit flip of each LUT: the checker result
//    (XOR of outputs and parity_out) must be 1 exactly when the flipped entry
//    is the one being read, and a wrong output must never pass unflagged;
//  * each single branch (LUT pin) inversion, each block input inversion and
//    an inverted parity_in must always be flagged.
//
// The exact detection rule checked is the method's claim; the example netlist
// is this design's.
module tb_pwtf_block;
  import pwtf_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- instance 1: two-level example ----------------
  logic [3:0]                 in1;
  logic                       pin1;
  logic [EX1_N_LUT-1:0][63:0] up1;
  logic [EX1_N_LUT-1:0][4:0]  pf1;
  logic [1:0]                 out1;
  logic                       pout1;

  pwtf_block u1 (.in(in1), .parity_in(pin1), .cfg_upset(up1), .pin_flip(pf1),
                 .out(out1), .parity_out(pout1));

  typedef struct { logic [3:0] out; logic [4:0] addr [5]; } ref_t;

  function automatic ref_t ref1(logic [3:0] v);
    ref_t r;
    logic a, b, c, d, l0, l1, l2, l3;
    {d, c, b, a} = v;
    l0 = a & b;  l1 = b ^ c;  l2 = l0 | l1;  l3 = ~(l1 & d);
    r.out     = {2'b00, l3, l2};
    r.addr[0] = {3'b000, a, b};
    r.addr[1] = {3'b000, b, c};
    r.addr[2] = {3'b000, l0, l1};
    r.addr[3] = {3'b000, l1, d};
    r.addr[4] = '0;
    return r;
  endfunction

  // ---------------- instance 2: 4-in/4-out netlist ----------------
  logic [3:0]                 in2;
  logic                       pin2;
  logic [EX2_N_LUT-1:0][63:0] up2;
  logic [EX2_N_LUT-1:0][4:0]  pf2;
  logic [3:0]                 out2;
  logic                       pout2;

  pwtf_block #(
    .N_IN(EX2_N_IN), .N_OUT(EX2_N_OUT), .N_LUT(EX2_N_LUT), .LUT_K(EX2_K),
    .LUT_SRC(EX2_SRC), .LUT_INIT(EX2_INIT), .LUT_CHAIN(EX2_CHAIN), .OUT_SRC(EX2_OUT)
  ) u2 (.in(in2), .parity_in(pin2), .cfg_upset(up2), .pin_flip(pf2),
        .out(out2), .parity_out(pout2));

  function automatic ref_t ref2(logic [3:0] v);
    ref_t r;
    logic [15:0] t;
    logic i0, i1, i2, i3, l0, l1, l2, l3, l4;
    t = 16'h0145;
    {i3, i2, i1, i0} = v;
    l0 = i0 ^ i1;
    l1 = (i1 & i2) | (i1 & i3) | (i2 & i3);
    l2 = i3 ? l1 : l0;
    l3 = ~l1 | i0;
    l4 = t[{i1, i2, l3, l2}];
    r.out     = {l1, l4, l3, l2};
    r.addr[0] = {3'b000, i1, i0};
    r.addr[1] = {2'b00, i3, i2, i1};
    r.addr[2] = {2'b00, i3, l1, l0};
    r.addr[3] = {1'b0, 2'b00, l1, i0};       // I4 = O5 of L0 = 0 for an XOR LUT
    r.addr[4] = {1'b0, i1, i2, l3, l2};
    return r;
  endfunction

  // ---------------- stimulus ----------------
  initial begin
    ref_t r;
    int det1, det2;
    det1 = 0; det2 = 0;
    up1 = '0; pf1 = '0; up2 = '0; pf2 = '0;

    // fault free
    for (int v = 0; v < 16; v++) begin
      in1 = 4'(v); pin1 = ^in1; in2 = 4'(v); pin2 = ^in2;
      #1;
      r = ref1(4'(v));
      check(out1 == r.out[1:0], $sformatf("u1 out v=%0d got %b exp %b", v, out1, r.out[1:0]));
      check(pout1 == ^r.out[1:0], $sformatf("u1 parity v=%0d", v));
      r = ref2(4'(v));
      check(out2 == r.out, $sformatf("u2 out v=%0d got %b exp %b", v, out2, r.out));
      check(pout2 == ^r.out, $sformatf("u2 parity v=%0d", v));
    end

    // configuration upsets, u1
    for (int j = 0; j < EX1_N_LUT; j++)
      for (int b = 0; b < 64; b++) begin
        up1 = '0; up1[j][b] = 1'b1;
        for (int v = 0; v < 16; v++) begin
          logic exc, flag;
          in1 = 4'(v); pin1 = ^in1;
          #1;
          r = ref1(4'(v));
          exc  = (b < 32) ? (r.addr[j] == 5'(b)) : (r.addr[j] == 5'(b - 32));
          flag = (^out1) ^ pout1;
          det1 += flag;
          check(flag == exc, $sformatf("u1 upset lut%0d bit%0d v=%0d flag=%b exc=%b", j, b, v, flag, exc));
          check(flag || out1 == r.out[1:0], $sformatf("u1 silent error lut%0d bit%0d v=%0d", j, b, v));
        end
      end
    up1 = '0;

    // configuration upsets, u2
    for (int j = 0; j < EX2_N_LUT; j++)
      for (int b = 0; b < 64; b++) begin
        up2 = '0; up2[j][b] = 1'b1;
        for (int v = 0; v < 16; v++) begin
          logic exc, flag;
          in2 = 4'(v); pin2 = ^in2;
          #1;
          r = ref2(4'(v));
          exc  = (b < 32) ? (r.addr[j] == 5'(b)) : (r.addr[j] == 5'(b - 32));
          flag = (^out2) ^ pout2;
          det2 += flag;
          check(flag == exc, $sformatf("u2 upset lut%0d bit%0d v=%0d flag=%b exc=%b", j, b, v, flag, exc));
          check(flag || out2 == r.out, $sformatf("u2 silent error lut%0d bit%0d v=%0d", j, b, v));
        end
      end
    up2 = '0;

    // branch (pin) inversions
    for (int j = 0; j < EX1_N_LUT; j++)
      for (int p = 0; p < EX1_K[j]; p++) begin
        pf1 = '0; pf1[j][p] = 1'b1;
        for (int v = 0; v < 16; v++) begin
          in1 = 4'(v); pin1 = ^in1;
          #1;
          check(((^out1) ^ pout1) == 1'b1, $sformatf("u1 pin lut%0d pin%0d v=%0d undetected", j, p, v));
        end
      end
    pf1 = '0;
    for (int j = 0; j < EX2_N_LUT; j++)
      for (int p = 0; p < 5; p++) begin
        if (p < EX2_K[j] || (p == 4 && EX2_CHAIN[j] != NO_NET)) begin
          pf2 = '0; pf2[j][p] = 1'b1;
          for (int v = 0; v < 16; v++) begin
            in2 = 4'(v); pin2 = ^in2;
            #1;
            check(((^out2) ^ pout2) == 1'b1, $sformatf("u2 pin lut%0d pin%0d v=%0d undetected", j, p, v));
          end
        end
      end
    pf2 = '0;

    // block input and input-parity faults
    for (int v = 0; v < 16; v++)
      for (int f = 0; f < 5; f++) begin
        in1 = 4'(v); pin1 = ^in1; in2 = 4'(v); pin2 = ^in2;
        if (f < 4) begin in1[f] = ~in1[f]; in2[f] = ~in2[f]; end
        else begin pin1 = ~pin1; pin2 = ~pin2; end
        #1;
        check(((^out1) ^ pout1) == 1'b1, $sformatf("u1 input fault %0d v=%0d undetected", f, v));
        check(((^out2) ^ pout2) == 1'b1, $sformatf("u2 input fault %0d v=%0d undetected", f, v));
      end

    check(det1 > 0 && det2 > 0, "no upset was ever detected");
    $display("upset detections: u1=%0d u2=%0d", det1, det2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
