// Self-checking testbench of soa_matt.
//
// The engine is connected to a dp_ram; the testbench owns the RAM ports while
// the engine is idle, to load and read back contents. It checks that:
//   - a test of a fault-free RAM lasts exactly 6 cycles per row, pulses
//     test_full once, finds nothing and leaves every word as it was;
//   - a stuck-at-1 and a stuck-at-0 cell are both found and their rows
//     entered in the fault table, once each, while the other rows keep
//     their words;
//   - the compare word of the restore run of a faulty row shows the stuck bit
//     as 0 against an otherwise all-ones word;
//   - a third faulty row finds the table full and raises fault_overflow;
//   - a falling test_ctrl stops the test at a row boundary;
//   - a word written into the row under test before its restore makes the
//     engine test the row again (3 cycles more) and survives;
//   - a cell that cannot make a 0-to-1 transition passes the restore compare
//     and is caught by the third, read-only run;
//   - a read-disturb cell and a stuck-open cell are found.
module tb_soa_matt;
  localparam int unsigned DATA_W = 8, ADDR_W = 8, FAULT_SLOTS = 2, NINJ = 2;
  localparam int unsigned DEPTH  = 2 ** ADDR_W;

  logic test_clk = 1'b0, rst = 1'b1, test_ctrl = 1'b0;
  logic test_active, t_re, t_we, fault, fault_overflow, test_full;
  logic [ADDR_W-1:0] address_rd, address_wr;
  logic [DATA_W-1:0] data_in, test_data_out, result;
  logic [FAULT_SLOTS-1:0][ADDR_W-1:0] faulty_address;
  logic [FAULT_SLOTS-1:0] faulty_valid;

  // testbench access to the RAM
  logic              h_we = 1'b0, h_re = 1'b0, row_written = 1'b0, row_inverted;
  logic [ADDR_W-1:0] h_aw = '0, h_ar = '0;
  logic [DATA_W-1:0] h_d = '0;
  logic [NINJ-1:0] flt_en = '0;
  logic [NINJ-1:0][ADDR_W-1:0] flt_addr = '0;
  logic [NINJ-1:0][DATA_W-1:0] flt_mask = '0, flt_val = '0;
  noc_fifo_pkg::flt_kind_e [NINJ-1:0] flt_kind = {NINJ{noc_fifo_pkg::FLT_STUCK_AT}};

  logic [DATA_W-1:0] image [DEPTH];
  int checks = 0, failures = 0;
  int active_cycles = 0, full_pulses = 0;
  logic [DATA_W-1:0] restore_cmp, orig_w;
  bit seen_inv = 1'b0;
  logic [ADDR_W-1:0] watch_row = 8'h0a;

  soa_matt #(.DATA_W(DATA_W), .ADDR_W(ADDR_W), .FAULT_SLOTS(FAULT_SLOTS)) dut (.*);

  dp_ram #(.DATA_W(DATA_W), .ADDR_W(ADDR_W), .NINJ(NINJ)) ram (
    .test_clk  (test_clk),
    .we        (t_we ? t_we : h_we),
    .address_wr(t_we ? address_wr : h_aw),
    .data_wr   (t_we ? test_data_out : h_d),
    .re        (t_re ? t_re : h_re),
    .address_rd(t_re ? address_rd : h_ar),
    .data_rd   (data_in),
    .flt_en    (flt_en),
    .flt_addr  (flt_addr),
    .flt_mask  (flt_mask),
    .flt_val   (flt_val),
    .flt_kind  (flt_kind)
  );

  always #5 test_clk = ~test_clk;

  always @(posedge test_clk) begin
    if (test_active) active_cycles++;
    if (test_full) full_pulses++;
    // watched row: the first write back is the invert run, the second the restore run
    if (test_active && t_we && address_wr == watch_row) begin
      if (!seen_inv) begin
        orig_w     = data_in;
        seen_inv = 1'b1;
      end else begin
        restore_cmp = data_in ^ orig_w;
        seen_inv    = 1'b0;
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  task automatic run_test();
    active_cycles = 0; full_pulses = 0;
    @(negedge test_clk);
    test_ctrl = 1'b1;
    @(negedge test_clk);
    while (test_active) @(negedge test_clk);
    test_ctrl = 1'b0;
    @(negedge test_clk);
  endtask

  // Compare the RAM with the image, skipping rows with an injected fault.
  task automatic check_image(input string what);
    int bad = 0;
    for (int a = 0; a < DEPTH; a++) begin
      logic skip = 1'b0;
      for (int k = 0; k < NINJ; k++) if (flt_en[k] && flt_addr[k] == ADDR_W'(a)) skip = 1'b1;
      @(negedge test_clk);
      h_re = 1'b1; h_ar = ADDR_W'(a);
      @(negedge test_clk);
      h_re = 1'b0;
      if (!skip && data_in != image[a]) bad++;
    end
    check(bad == 0, $sformatf("%s: %0d words changed", what, bad));
  endtask

  initial begin
    repeat (40000) @(posedge test_clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ac, reads_44;
    logic [ADDR_W-1:0] restore_rows [3] = '{8'h0a, 8'h00, 8'h77};
    repeat (3) @(negedge test_clk);
    rst = 1'b0;
    // load the RAM with traffic-like contents
    for (int a = 0; a < DEPTH; a++) begin
      image[a] = DATA_W'($urandom);
      @(negedge test_clk);
      h_we = 1'b1; h_aw = ADDR_W'(a); h_d = image[a];
    end
    @(negedge test_clk);
    h_we = 1'b0;

    // 1: fault-free test
    run_test();
    check(active_cycles == 6 * DEPTH, $sformatf("test length %0d cycles", active_cycles));
    check(full_pulses == 1, "one test_full pulse");
    check(!fault && faulty_valid == '0 && !fault_overflow, "no fault found");
    check_image("transparent test");

    // 2: stuck-at-1 on bit 7 of row 0x0a, stuck-at-0 on bit 0 of row 0x00
    image[8'h0a] = 8'h5a;  // bit 7 of the word is 0, so the stuck cell matters now
    @(negedge test_clk);
    h_we = 1'b1; h_aw = 8'h0a; h_d = 8'h5a;
    @(negedge test_clk);
    h_we = 1'b0;
    flt_en = 2'b11;
    flt_addr[0] = 8'h0a; flt_mask[0] = 8'h80; flt_val[0] = 8'h80;
    flt_addr[1] = 8'h00; flt_mask[1] = 8'h01; flt_val[1] = 8'h00;
    run_test();
    check(fault, "fault raised");
    check(faulty_valid == 2'b11, "two table entries");
    check(faulty_address[0] == 8'h00 && faulty_address[1] == 8'h0a,
          $sformatf("table holds %h %h", faulty_address[0], faulty_address[1]));
    check(restore_cmp == 8'h7f, $sformatf("restore compare of row 0a = %h", restore_cmp));
    check(!fault_overflow, "no overflow yet");
    check_image("other rows intact");

    // 3: same faults again: no duplicate entries, no overflow
    run_test();
    check(fault && faulty_valid == 2'b11 && !fault_overflow, "known rows not entered twice");

    // 4: a third faulty row overflows the table
    flt_addr[1] = 8'h77; flt_mask[1] = 8'h10; flt_val[1] = 8'h10;
    run_test();
    check(fault_overflow, "overflow on a third faulty row");
    check(faulty_address[0] == 8'h00 && faulty_address[1] == 8'h0a, "table unchanged by overflow");

    // 5: a falling test_ctrl stops at a row boundary
    // the stuck cells held other words than they returned: put the image back
    flt_en = '0;
    foreach (restore_rows[r]) begin
      @(negedge test_clk);
      h_we = 1'b1; h_aw = restore_rows[r]; h_d = image[restore_rows[r]];
    end
    @(negedge test_clk);
    h_we = 1'b0;
    active_cycles = 0;
    @(negedge test_clk);
    test_ctrl = 1'b1;
    repeat (100) @(negedge test_clk);
    test_ctrl = 1'b0;
    while (test_active) @(negedge test_clk);
    ac = active_cycles;
    check(ac % 6 == 0 && ac >= 100 && ac < 110, $sformatf("stopped after %0d cycles", ac));
    check(!test_full, "no test_full for a stopped test");
    check_image("contents after a stopped test");

    // 6: a word written into the row under test between runs 0 and 1
    // restarts the row: the word survives and the test is 3 cycles longer
    image[8'h44] = 8'h99;
    active_cycles = 0; full_pulses = 0;
    @(negedge test_clk);
    test_ctrl = 1'b1;
    reads_44 = 0;
    @(negedge test_clk);
    while (test_active) begin
      if (t_re && address_rd == 8'h44) begin
        reads_44++;
        if (reads_44 == 2) begin
          check(row_inverted, "row inverted during run 1");
          h_we = 1'b1; h_aw = 8'h44; h_d = image[8'h44]; row_written = 1'b1;
        end
      end
      @(negedge test_clk);
      h_we = 1'b0; row_written = 1'b0;
    end
    test_ctrl = 1'b0;
    check(reads_44 == 5, $sformatf("row 44 read %0d times", reads_44));
    check(active_cycles == 6 * DEPTH + 3, $sformatf("test with a restart took %0d cycles", active_cycles));
    check(!fault, "no fault from a restarted row");
    check_image("word written during the test kept");

    // 7: a cell of row 0x30 that cannot rise on bit 5 passes the restore
    // compare and is caught only by the verify read
    @(negedge test_clk);
    rst = 1'b1;
    @(negedge test_clk);
    rst = 1'b0;
    image[8'h30] = 8'h2c;  // bit 5 set: the invert run clears it, the restore run fails to set it
    @(negedge test_clk);
    h_we = 1'b1; h_aw = 8'h30; h_d = image[8'h30];
    @(negedge test_clk);
    h_we = 1'b0;
    watch_row = 8'h30;
    flt_en = 2'b01;
    flt_kind[0] = noc_fifo_pkg::FLT_TRANSITION; flt_addr[0] = 8'h30; flt_mask[0] = 8'h20; flt_val[0] = 8'h20;
    run_test();
    check(restore_cmp == 8'hff, $sformatf("restore compare of row 30 = %h (passes)", restore_cmp));
    check(fault && faulty_valid == 2'b01 && faulty_address[0] == 8'h30, "transition fault found by the verify read");
    check(!fault_overflow, "overflow cleared by reset");

    // 8: a read-disturb cell in row 0x60 and a stuck-open cell in row 0x61
    @(negedge test_clk);
    rst = 1'b1;
    @(negedge test_clk);
    rst = 1'b0;
    flt_en = 2'b11;
    flt_kind[0] = noc_fifo_pkg::FLT_READ_DISTURB; flt_addr[0] = 8'h60; flt_mask[0] = 8'h04;
    flt_kind[1] = noc_fifo_pkg::FLT_STUCK_OPEN;   flt_addr[1] = 8'h61; flt_mask[1] = 8'h80;
    run_test();
    check(fault && faulty_valid == 2'b11 && faulty_address[0] == 8'h60 && faulty_address[1] == 8'h61,
          $sformatf("read-disturb and stuck-open rows found: %b %h %h",
                    faulty_valid, faulty_address[0], faulty_address[1]));
    flt_en = '0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
