// tb_pwtf_checker: self-checking test of the parity checker: fail must be 1
// exactly when the number of ones in {outputs, parity} is odd.
//
// The checker equation is the method's.
module tb_pwtf_checker;
  logic [5:0] data;
  logic       parity, fail;
  int checks = 0, failures = 0;

  pwtf_checker #(.N_OUT(6)) dut (.data, .parity, .fail);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 128; a++) begin
      {parity, data} = 7'(a);
      #1;
      checks++;
      if (fail !== ($countones(a) % 2 == 1)) begin
        failures++;
        $display("FAIL data=%b parity=%b fail=%b", data, parity, fail);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
