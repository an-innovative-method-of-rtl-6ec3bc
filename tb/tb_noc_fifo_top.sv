// End-to-end testbench of noc_fifo_top at its default parameters.
//
// Random channel traffic flows through the buffer for the whole run while a
// scoreboard checks every word out. The testbench keeps its own model of the
// write pointer, which steps over the rows the design reports as faulty, so
// it knows the row of each word and can predict what an injected stuck-at
// cell does to it. The run goes through:
//   1. plain traffic, no faults;
//   2. two stuck-at cells injected (row 0x00 bit 0 stuck at 0, row 0x0a bit 7
//      stuck at 1) and a test started on test_ctrl, which must enter both
//      rows in the fault table;
//   3. periodic tests from the scheduler under traffic: every test must take
//      6 cycles per row plus at most 3 per word written during it (a row
//      written while under test is tested again), and writes must step over
//      the faulty rows;
//   4. a fill to full, which must hold two words fewer than the 256 rows;
//   5. a test stopped by dropping test_ctrl, which must end on a row boundary
//      without test_full;
//   6. a third faulty row, which first corrupts the words that pass through it
//      (it is not yet known) and then overflows the two-entry table.
// Traffic must keep flowing while tests run, sharing the RAM with the test
// engine. Each mechanism is counted, and one that never happened counts as a failure.
module tb_noc_fifo_top;
  import noc_fifo_pkg::*;
  localparam int unsigned DATA_W = DATA_W_DEF, ADDR_W = ADDR_W_DEF;
  localparam int unsigned FAULT_SLOTS = FAULT_SLOTS_DEF, NINJ = NINJ_DEF;
  localparam int unsigned DEPTH = 2 ** ADDR_W;
  localparam int unsigned ROW_CYCLES = 6;

  logic test_clk = 1'b0, rst = 1'b1;
  logic wr_en = 1'b0, rd_en = 1'b0, test_ctrl = 1'b0, sched_en = 1'b0;
  logic [DATA_W-1:0] data_in = '0, data_out;
  logic full, empty, data_valid, test_active, test_full, fault, fault_overflow;
  logic [ADDR_W:0] count;
  logic [DATA_W-1:0] result;
  logic [ADDR_W-1:0] wr_pointer, rd_pointer;
  logic [FAULT_SLOTS-1:0][ADDR_W-1:0] faulty_address;
  logic [FAULT_SLOTS-1:0] faulty_valid;
  logic [NINJ-1:0] flt_en = '0;
  logic [NINJ-1:0][ADDR_W-1:0] flt_addr = '0;
  logic [NINJ-1:0][DATA_W-1:0] flt_mask = '0, flt_val = '0;
  noc_fifo_pkg::flt_kind_e [NINJ-1:0] flt_kind = {NINJ{noc_fifo_pkg::FLT_STUCK_AT}};

  noc_fifo_top dut (.*);

  always #5 test_clk = ~test_clk;

  int checks = 0, failures = 0;
  logic [DATA_W-1:0] sb_data[$];
  logic [ADDR_W-1:0] sb_row[$];
  logic [ADDR_W-1:0] ref_wr_ptr = '0;
  bit [DEPTH-1:0]    ref_occ = '0;
  logic [ADDR_W-1:0] pend_row;
  bit                pend = 1'b0;

  // mechanism counters
  int n_words = 0, n_bypass = 0, n_stall = 0, n_full = 0, n_tests_done = 0;
  int n_sched_tests = 0, n_ext_tests = 0, n_stopped = 0, n_fault = 0, n_overflow = 0;
  int n_corrupt = 0, n_words_in_test = 0, n_writes_in_test = 0;
  int active_run = 0, bad_lengths = 0, writes_run = 0;
  bit ext_phase = 1'b0, prev_active = 1'b0, prev_fault = 1'b0, prev_ovf = 1'b0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  function automatic bit in_table(input logic [ADDR_W-1:0] r);
    for (int s = 0; s < FAULT_SLOTS; s++)
      if (faulty_valid[s] && faulty_address[s] == r) return 1'b1;
    return 1'b0;
  endfunction

  // what the cells of a row return for a stored word
  function automatic logic [DATA_W-1:0] cells(input logic [ADDR_W-1:0] r, input logic [DATA_W-1:0] d);
    logic [DATA_W-1:0] q = d;
    for (int k = 0; k < NINJ; k++)
      if (flt_en[k] && flt_addr[k] == r) q = (q & ~flt_mask[k]) | (flt_val[k] & flt_mask[k]);
    return q;
  endfunction

  always @(posedge test_clk) begin
    if (!rst) begin
      // output side: the word read in the previous cycle
      if (data_valid) begin
        checks++;
        if (!pend || sb_data.size() == 0) begin
          failures++; $display("FAIL word out of an empty buffer (t=%0t)", $time);
        end else begin
          logic [DATA_W-1:0] exp;
          exp = cells(pend_row, sb_data[0]);
          if (exp != sb_data[0]) n_corrupt++;
          if (data_out !== exp) begin
            failures++;
            $display("FAIL data_out %h expected %h (row %h) t=%0t", data_out, exp, pend_row, $time);
          end
          void'(sb_data.pop_front());
          void'(sb_row.pop_front());
          n_words++;
          if (test_active) n_words_in_test++;
        end
      end
      pend = 1'b0;
      if (rd_en && !empty) begin
        pend     = 1'b1;
        pend_row = sb_row[0];
        ref_occ[sb_row[0]] = 1'b0;
      end
      // input side: model of the write pointer with bypass
      if (wr_en && full) n_stall += test_active ? 1 : 0;
      if (wr_en && full && !test_active) n_full++;
      if (wr_en && !full) begin
        logic [ADDR_W-1:0] r;
        r = ref_wr_ptr;
        while (in_table(r)) r++;
        if (r != ref_wr_ptr) n_bypass++;
        checks++;
        if (wr_pointer != r) begin
          failures++; $display("FAIL wr_pointer %h, model row %h", wr_pointer, r);
        end
        checks++;
        if (ref_occ[r]) begin
          failures++; $display("FAIL write row %h still holds a word", r);
        end
        ref_occ[r] = 1'b1;
        if (test_active) begin
          n_writes_in_test++;
          writes_run++;
        end
        sb_data.push_back(data_in);
        sb_row.push_back(r);
        ref_wr_ptr = r + 1'b1;
      end
      // test runs
      if (test_active) active_run++;
      if (prev_active && !test_active) begin
        if (test_full) begin
          n_tests_done++;
          if (ext_phase) n_ext_tests++; else n_sched_tests++;
          if (active_run < ROW_CYCLES * DEPTH || active_run > ROW_CYCLES * DEPTH + 3 * writes_run) begin
            bad_lengths++;
            $display("FAIL test took %0d cycles", active_run);
          end
        end else begin
          n_stopped++;
          // the test_ctrl stop comes 150 cycles after the start
          if (ext_phase && active_run > 150 + ROW_CYCLES + 3 * writes_run) begin
            bad_lengths++;
            $display("FAIL stopped test took %0d cycles", active_run);
          end
        end
        active_run = 0;
        writes_run = 0;
      end
      if (fault && !prev_fault) n_fault++;
      if (fault_overflow && !prev_ovf) n_overflow++;
      prev_active = test_active;
      prev_fault  = fault;
      prev_ovf    = fault_overflow;
    end
  end

  task automatic traffic(input int cycles, input int wr_pct, input int rd_pct);
    repeat (cycles) begin
      @(negedge test_clk);
      wr_en   = ($urandom_range(99, 0) < wr_pct);
      data_in = DATA_W'($urandom);
      rd_en   = ($urandom_range(99, 0) < rd_pct);
    end
    @(negedge test_clk);
    wr_en = 1'b0; rd_en = 1'b0;
  endtask

  task automatic drain();
    @(negedge test_clk);
    while (!empty || test_active) begin
      rd_en = 1'b1;
      @(negedge test_clk);
    end
    rd_en = 1'b0;
    repeat (2) @(negedge test_clk);
  endtask

  initial begin
    repeat (200000) @(posedge test_clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    repeat (3) @(negedge test_clk);
    rst = 1'b0;
    @(negedge test_clk);
    check(empty && !full && !test_active && faulty_valid == '0, "reset state");

    // 1: plain traffic
    traffic(1500, 50, 45);

    // 2: inject two stuck-at cells, run a test from test_ctrl under traffic
    flt_en = 2'b11;
    flt_addr[0] = 8'h00; flt_mask[0] = 8'h01; flt_val[0] = 8'h00;
    flt_addr[1] = 8'h0a; flt_mask[1] = 8'h80; flt_val[1] = 8'h80;
    ext_phase = 1'b1;
    @(negedge test_clk);
    test_ctrl = 1'b1;
    fork
      traffic(ROW_CYCLES * DEPTH + 200, 50, 45);
      begin
        @(posedge test_full);
        @(negedge test_clk);
        test_ctrl = 1'b0;
      end
    join
    ext_phase = 1'b0;
    check(fault, "faults found");
    check(faulty_valid == 2'b11 && faulty_address[0] == 8'h00 && faulty_address[1] == 8'h0a,
          $sformatf("fault table %b %h %h", faulty_valid, faulty_address[0], faulty_address[1]));

    // 3: periodic tests under traffic
    sched_en = 1'b1;
    traffic(3 * (TEST_PERIOD_DEF + ROW_CYCLES * DEPTH), 50, 48);
    sched_en = 1'b0;
    check(n_sched_tests >= 2, $sformatf("%0d periodic tests", n_sched_tests));
    drain();

    // 4: fill to full
    n = 0;
    @(negedge test_clk);
    while (!full) begin
      wr_en = 1'b1; data_in = DATA_W'($urandom);
      @(negedge test_clk);
      n++;
    end
    wr_en = 1'b1;
    @(negedge test_clk);
    wr_en = 1'b0;
    check(n == DEPTH - 2, $sformatf("capacity with two faulty rows: %0d", n));
    drain();

    // 5: test stopped by a falling test_ctrl
    ext_phase = 1'b1;
    @(negedge test_clk);
    test_ctrl = 1'b1;
    fork
      traffic(300, 50, 50);
      begin
        repeat (150) @(negedge test_clk);
        test_ctrl = 1'b0;
      end
    join
    ext_phase = 1'b0;
    check(!test_active, "stopped test is idle");

    // 6: a third faulty row overflows the table
    // words pass through the new stuck cell before any test has seen it
    flt_addr[1] = 8'h77; flt_mask[1] = 8'h10; flt_val[1] = 8'h10;
    traffic(1200, 50, 48);
    ext_phase = 1'b1;
    @(negedge test_clk);
    test_ctrl = 1'b1;
    fork
      traffic(ROW_CYCLES * DEPTH + 100, 50, 50);
      begin
        @(posedge test_full);
        @(negedge test_clk);
        test_ctrl = 1'b0;
      end
    join
    ext_phase = 1'b0;
    check(fault_overflow, "table overflow flagged");
    drain();
    check(sb_data.size() == 0 && count == 0, "all words delivered");

    // every mechanism happened
    check(bad_lengths == 0, "test lengths");
    check(n_words > 1000, $sformatf("%0d words delivered", n_words));
    check(n_ext_tests >= 2, $sformatf("%0d tests started on test_ctrl", n_ext_tests));
    check(n_sched_tests >= 2, $sformatf("%0d periodic tests", n_sched_tests));
    check(n_stopped >= 1, $sformatf("%0d stopped tests", n_stopped));
    check(n_fault >= 1, $sformatf("%0d runs with a fault", n_fault));
    check(n_bypass >= 1, $sformatf("%0d writes stepped over a faulty row", n_bypass));
    check(n_stall >= 1, $sformatf("%0d writes stalled by a test", n_stall));
    check(n_full >= 1, $sformatf("%0d writes refused by a full buffer", n_full));
    check(n_overflow >= 1, $sformatf("%0d table overflows", n_overflow));
    check(n_words_in_test >= 1, $sformatf("%0d words read while a test ran", n_words_in_test));
    check(n_writes_in_test >= 1, $sformatf("%0d words written while a test ran", n_writes_in_test));
    check(n_corrupt >= 1, $sformatf("%0d words read from stuck cells", n_corrupt));
    $display("words during tests: %0d in, %0d out", n_writes_in_test, n_words_in_test);
    $display("words %0d, bypasses %0d, stalls %0d, full %0d, tests ext %0d sched %0d stopped %0d, corrupted %0d",
             n_words, n_bypass, n_stall, n_full, n_ext_tests, n_sched_tests, n_stopped, n_corrupt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
