// Self-checking testbench of test_scheduler.
//
// With a short period of 20 cycles it checks that test_req rises exactly
// TEST_PERIOD cycles after enable goes high, stays high until test_done
// pulses, then falls and rises again one period later, and that dropping
// enable clears the request and restarts the count.
module tb_test_scheduler;
  localparam int unsigned P = 20;

  logic test_clk = 1'b0, rst = 1'b1, enable = 1'b0, test_done = 1'b0, test_req;
  int checks = 0, failures = 0;

  test_scheduler #(.TEST_PERIOD(P)) dut (.*);

  always #5 test_clk = ~test_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // Cycles from now until test_req is high.
  task automatic wait_req(output int n);
    n = 0;
    while (!test_req && n < 1000) begin
      @(negedge test_clk);
      n++;
    end
  endtask

  initial begin
    repeat (2000) @(posedge test_clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    repeat (3) @(negedge test_clk);
    rst = 1'b0;
    repeat (50) @(negedge test_clk);
    check(!test_req, "no request while disabled");
    enable = 1'b1;
    wait_req(n);
    check(n == P, $sformatf("first request after %0d cycles", n));
    repeat (37) @(negedge test_clk);
    check(test_req, "request held until done");
    test_done = 1'b1;
    @(negedge test_clk);
    test_done = 1'b0;
    check(!test_req, "request dropped on done");
    wait_req(n);
    check(n == P, $sformatf("next request %0d cycles after the drop", n));
    test_done = 1'b1;
    @(negedge test_clk);
    test_done = 1'b0;
    repeat (5) @(negedge test_clk);
    enable = 1'b0;
    @(negedge test_clk);
    check(!test_req, "disabled");
    enable = 1'b1;
    wait_req(n);
    check(n == P, $sformatf("count restarts after disable: %0d", n));
    enable = 1'b0;
    @(negedge test_clk);
    check(!test_req, "enable low drops a pending request");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
