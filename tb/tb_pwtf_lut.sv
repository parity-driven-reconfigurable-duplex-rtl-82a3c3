// tb_pwtf_lut: self-checking test of one PWtf cell (K = 4, table 16'h0145).
// For all 32 input combinations O6 must be the table entry and O5 the entry
// XOR the parity of I0..I4. Then every single configuration bit is flipped:
// a flip in the upper half may change only O6, a flip in the lower half only
// O5, and each exactly when the flipped entry is the one addressed.
//
// O6/O5 contents and I5 = 1 follow the method.
module tb_pwtf_lut;
  logic [4:0]  i;
  logic [63:0] cfg_upset;
  logic        o6, o5;
  int checks = 0, failures = 0;
  localparam logic [15:0] F = 16'h0145;

  pwtf_lut #(.K(4), .ORIG_INIT(32'h0145)) dut (.i, .cfg_upset, .o6, .o5);

  task automatic check(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: i=%b upset=%h got %b exp %b", what, i, cfg_upset, got, exp);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_upset = '0;
    for (int a = 0; a < 32; a++) begin
      i = 5'(a);
      #1;
      check(o6, F[a % 16], "o6");
      check(o5, F[a % 16] ^ ($countones(a) % 2 == 1), "o5");
    end
    for (int b = 0; b < 64; b++) begin
      cfg_upset = 64'd1 << b;
      for (int a = 0; a < 32; a++) begin
        logic e6, e5;
        i = 5'(a);
        #1;
        e6 = F[a % 16] ^ (b >= 32 && b - 32 == a);
        e5 = F[a % 16] ^ ($countones(a) % 2 == 1) ^ (b < 32 && b == a);
        check(o6, e6, "o6 upset");
        check(o5, e5, "o5 upset");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
