// tb_external_unit: self-checking test of the board-level repair controller.
// A suspect board gets full_req one clock later, held until full_done, then a
// settle cycle. With both boards suspect, board 0 is served first and board 1
// afterwards; the two requests never overlap.
//
// Full reconfiguration of a board with a faulty repair controller follows the
// proposed system; the ordering, handshake and settle cycle are this design's.
module tb_external_unit;
  logic       clk = 0, rst_n = 0;
  logic [1:0] suspect = '0, full_done = '0, full_req;
  logic       busy;
  int checks = 0, failures = 0;

  external_unit #(.N_BOARD(2)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t %s (full_req=%b busy=%b)", $time, what, full_req, busy);
    end
  endtask

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n) begin
    checks++;
    if (full_req == 2'b11) begin
      failures++;
      $display("FAIL both boards under full reconfiguration");
    end
  end

  // the suspect flag of a board drops when its full reconfiguration ends
  task automatic serve(int b, int wait_cycles);
    check(full_req == 2'(1 << b), $sformatf("request for board %0d", b));
    repeat (wait_cycles) begin
      @(negedge clk);
      check(full_req == 2'(1 << b), "request held");
    end
    full_done[b] = 1;
    @(negedge clk) begin full_done = '0; suspect[b] = 0; end
    check(full_req == '0 && busy, "settle cycle");
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(full_req == '0 && !busy, "idle");
    suspect = 2'b10;
    @(negedge clk);
    serve(1, 4);
    check(full_req == '0 && !busy, "idle again");
    suspect = 2'b11;
    @(negedge clk);
    serve(0, 2);
    check(full_req == '0, "idle for one cycle after settle");
    @(negedge clk);
    check(full_req == 2'b10, "board 1 next");
    serve(1, 0);
    check(full_req == '0 && !busy, "done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
