// Throughput testbench of noc_fifo_top at its default sizes.
//
// The channel offers a word and the router asks for one in every cycle.
// Without testing, the buffer must move exactly one word per cycle once
// primed. With the scheduler on, tests of 6*256 cycles run every period;
// during a test the engine takes the read port one cycle in two, so at most
// one word in two cycles can leave, and a little less when the read pointer
// catches up with the row under test. The testbench measures words per cycle
// in and out of tests, checks them against those bounds, and prints them.
module tb_throughput;
  import noc_fifo_pkg::*;
  localparam int unsigned DATA_W = DATA_W_DEF, ADDR_W = ADDR_W_DEF;
  localparam int unsigned FAULT_SLOTS = FAULT_SLOTS_DEF, NINJ = NINJ_DEF;
  localparam int unsigned TEST_CYCLES = 6 * (2 ** ADDR_W);

  logic test_clk = 1'b0, rst = 1'b1;
  logic wr_en = 1'b0, rd_en = 1'b0, test_ctrl = 1'b0, sched_en = 1'b0;
  logic [DATA_W-1:0] data_in, data_out;
  logic full, empty, data_valid, test_active, test_full, fault, fault_overflow;
  logic [ADDR_W:0] count;
  logic [DATA_W-1:0] result;
  logic [ADDR_W-1:0] wr_pointer, rd_pointer;
  logic [FAULT_SLOTS-1:0][ADDR_W-1:0] faulty_address;
  logic [FAULT_SLOTS-1:0] faulty_valid;
  logic [NINJ-1:0] flt_en = '0;
  logic [NINJ-1:0][ADDR_W-1:0] flt_addr = '0;
  logic [NINJ-1:0][DATA_W-1:0] flt_mask = '0, flt_val = '0;
  flt_kind_e [NINJ-1:0] flt_kind = {NINJ{FLT_STUCK_AT}};

  noc_fifo_top dut (.*);

  always #5 test_clk = ~test_clk;

  int checks = 0, failures = 0;
  int cyc_idle = 0, out_idle = 0, cyc_test = 0, out_test = 0, tests = 0;
  logic [DATA_W-1:0] next_in = '0, next_out = '0;
  bit measure = 1'b0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // counting words in and out; the data are a running count so order is checked too
  always @(posedge test_clk) begin
    if (!rst) begin
      if (wr_en && !full) next_in <= next_in + 1'b1;
      if (data_valid) begin
        if (data_out != next_out) begin
          failures++; $display("FAIL word %h expected %h", data_out, next_out);
        end
        next_out <= next_out + 1'b1;
      end
      if (measure) begin
        if (test_active) begin
          cyc_test++;
          if (data_valid) out_test++;
        end else begin
          cyc_idle++;
          if (data_valid) out_idle++;
        end
        if (test_full) tests++;
      end
    end
  end
  assign data_in = next_in;

  initial begin
    repeat (100000) @(posedge test_clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real r_idle, r_test, r_all;
    repeat (3) @(negedge test_clk);
    rst = 1'b0;
    // prime the buffer with 64 words, then saturate both sides
    @(negedge test_clk);
    wr_en = 1'b1;
    repeat (64) @(negedge test_clk);
    rd_en = 1'b1;
    repeat (4) @(negedge test_clk);
    // no testing
    measure = 1'b1;
    repeat (5000) @(negedge test_clk);
    measure = 1'b0;
    check(out_idle == cyc_idle, $sformatf("without tests: %0d words in %0d cycles", out_idle, cyc_idle));
    // periodic testing
    cyc_idle = 0; out_idle = 0;
    sched_en = 1'b1;
    measure = 1'b1;
    repeat (4 * (TEST_PERIOD_DEF + TEST_CYCLES)) @(negedge test_clk);
    measure = 1'b0;
    sched_en = 1'b0;
    r_idle = real'(out_idle) / real'(cyc_idle);
    r_test = real'(out_test) / real'(cyc_test);
    r_all  = real'(out_idle + out_test) / real'(cyc_idle + cyc_test);
    $display("between tests %0.3f, during tests %0.3f, overall %0.3f words/cycle (%0d tests)",
             r_idle, r_test, r_all, tests);
    check(tests >= 3, $sformatf("%0d periodic tests", tests));
    check(cyc_test >= tests * TEST_CYCLES, "test cycles counted");
    check(r_idle > 0.99, "one word per cycle between tests");
    check(r_test <= 0.5 + 1e-6 && r_test > 0.3, "at most one word in two cycles during a test");
    check(fault == 1'b0 && faulty_valid == '0, "no fault in a clean RAM");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
