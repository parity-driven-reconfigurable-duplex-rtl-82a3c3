// tb_lut6_2: self-checking test of the LUT6_2 model.
// Random configuration words and all 64 input combinations; the expected
// outputs are taken by shifting the configuration word (O5: lower half at the
// 5-bit address; O6: upper half when I5 = 1, lower half when I5 = 0). Also
// checks the PWtf content of the worked example (16'h0145) with I5 = 1.
//
// The expected behaviour is that of the LUT6_2 primitive the method uses.
module tb_lut6_2;
  logic [63:0] init;
  logic [5:0]  i;
  logic        o6, o5;
  int checks = 0, failures = 0;

  lut6_2 dut (.init, .i, .o6, .o5);

  task automatic check(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: init=%h i=%b got %b exp %b", what, init, i, got, exp);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20; t++) begin
      init = {$urandom, $urandom};
      for (int a = 0; a < 64; a++) begin
        logic [63:0] sh;
        i = 6'(a);
        #1;
        sh = init >> (a % 32);
        check(o5, sh[0], "o5");
        sh = init >> ((a >= 32) ? (a % 32) + 32 : a % 32);
        check(o6, sh[0], "o6");
      end
    end
    // PWtf cell of 16'h0145: O6 half 01450145, O5 half 972C68D3
    init = 64'h01450145_972C68D3;
    for (int a = 0; a < 32; a++) begin
      logic [15:0] f;
      f = 16'h0145;
      i = {1'b1, 5'(a)};
      #1;
      check(o6, f[a % 16], "example o6");
      check(o5, f[a % 16] ^ ($countones(a) % 2 == 1), "example o5");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
