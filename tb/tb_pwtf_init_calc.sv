// tb_pwtf_init_calc: self-checking test of the PWtf LUT-content calculation.
// First the worked example (16'h0145, 4 inputs: 01450145 / 972C68D3), then
// random tables for k = 1..5, compared with a reference that builds the O5
// half entry by entry as table[a mod 2^k] XOR parity(a).
//
// The worked example is the method's; the k < 4 cases check this design's
// generalisation.
module tb_pwtf_init_calc;
  logic [31:0] orig_init, o6_half, o5_half;
  logic [2:0]  k;
  logic [63:0] lut6_init;
  int checks = 0, failures = 0;

  pwtf_init_calc dut (.orig_init, .k, .o6_half, .o5_half, .lut6_init);

  task automatic check64(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: k=%0d init=%h got %h exp %h", what, k, orig_init, got, exp);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    orig_init = 32'h0145;
    k = 3'd4;
    #1;
    check64(64'(o6_half), 64'h01450145, "example O6 half");
    check64(64'(o5_half), 64'h972C68D3, "example O5 half");
    check64(lut6_init, 64'h01450145_972C68D3, "example INIT");
    for (int t = 0; t < 200; t++) begin
      logic [31:0] e6, e5;
      k = 3'(1 + $urandom_range(0, 4));
      orig_init = $urandom & ((32'd1 << (1 << k)) - 1 | ((k == 5) ? 32'hFFFF_FFFF : 32'h0));
      #1;
      for (int a = 0; a < 32; a++) begin
        e6[a] = orig_init[a % (1 << k)];
        e5[a] = e6[a] ^ ($countones(a) % 2 == 1);
      end
      check64(64'(o6_half), 64'(e6), "O6 half");
      check64(64'(o5_half), 64'(e5), "O5 half");
      check64(lut6_init, {e6, e5}, "INIT");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
