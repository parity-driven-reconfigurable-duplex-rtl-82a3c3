// tb_pwtf_rm: self-checking test of a reconfigurable module (PWtf block plus
// its checker) with the default 4-in/4-out netlist. Fault free, outputs must
// match a Boolean reference and fail must stay 0. With any single
// configuration-bit flip, fail must be 1 exactly when the flipped LUT entry is
// read; with any single LUT-pin inversion, fail must always be 1.
//
// The module-with-checker arrangement follows the proposed system; the
// netlist is this design's example.
module tb_pwtf_rm;
  import pwtf_pkg::*;

  logic [3:0]                 in;
  logic                       parity_in;
  logic [EX2_N_LUT-1:0][63:0] cfg_upset;
  logic [EX2_N_LUT-1:0][4:0]  pin_flip;
  logic [3:0]                 out;
  logic                       parity_out, fail;
  int checks = 0, failures = 0;

  pwtf_rm dut (.in, .parity_in, .cfg_upset, .pin_flip, .out, .parity_out, .fail);

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

  // reference: outputs and the 5-bit address of each LUT
  function automatic logic [28:0] ref_model(logic [3:0] v);
    logic [15:0] t;
    logic i0, i1, i2, i3, l0, l1, l2, l3, l4;
    t = 16'h0145;
    {i3, i2, i1, i0} = v;
    l0 = i0 ^ i1;
    l1 = (i1 & i2) | (i1 & i3) | (i2 & i3);
    l2 = i3 ? l1 : l0;
    l3 = ~l1 | i0;
    l4 = t[{i1, i2, l3, l2}];
    // {addr4, addr3, addr2, addr1, addr0, out}
    return {{1'b0, i1, i2, l3, l2}, {3'b000, l1, i0}, {2'b00, i3, l1, l0},
            {2'b00, i3, i2, i1}, {3'b000, i1, i0}, {l1, l4, l3, l2}};
  endfunction

  initial begin
    logic [28:0] r;
    cfg_upset = '0;
    pin_flip  = '0;
    for (int v = 0; v < 16; v++) begin
      in = 4'(v); parity_in = ^in;
      #1;
      r = ref_model(4'(v));
      check(out == r[3:0], $sformatf("out v=%0d got %b exp %b", v, out, r[3:0]));
      check(fail == 1'b0, $sformatf("false fail v=%0d", v));
    end
    for (int j = 0; j < EX2_N_LUT; j++)
      for (int b = 0; b < 64; b++) begin
        cfg_upset = '0; cfg_upset[j][b] = 1'b1;
        for (int v = 0; v < 16; v++) begin
          logic [4:0] addr;
          in = 4'(v); parity_in = ^in;
          #1;
          r = ref_model(4'(v));
          addr = r[4 + 5*j +: 5];
          check(fail == (addr == 5'(b % 32)),
                $sformatf("upset lut%0d bit%0d v=%0d fail=%b", j, b, v, fail));
        end
      end
    cfg_upset = '0;
    for (int j = 0; j < EX2_N_LUT; j++)
      for (int p = 0; p < 5; p++)
        if (p < EX2_K[j] || (p == 4 && EX2_CHAIN[j] != NO_NET)) begin
          pin_flip = '0; pin_flip[j][p] = 1'b1;
          for (int v = 0; v < 16; v++) begin
            in = 4'(v); parity_in = ^in;
            #1;
            check(fail == 1'b1, $sformatf("pin lut%0d pin%0d v=%0d undetected", j, p, v));
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
