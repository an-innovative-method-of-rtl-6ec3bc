// Self-checking testbench that replays the worked example of the test engine
// on a 4-bit word.
//
// soa_matt tests a dp_ram of four 4-bit rows. Row 1 holds 1010 and has a
// stuck-at-1 cell at its most significant bit; the other rows are fault-free.
// The example follows the method's own illustration of the invert and
// restore runs: the invert run reads 1010 into temp and original and writes
// 0101 back, which the faulty cell turns into 1101; the restore run reads
// 1101 and its compare, temp ^ original, is 0111, whose 0 marks the faulty
// bit. The testbench checks each of these words at the RAM ports and on the
// engine's result output, that row 1 enters the fault table, and that the
// test takes 6 cycles per row and leaves the fault-free rows as they were.
// The row count and the row holding the example word are this testbench's
// choice.
module tb_fig1_example;
  localparam int unsigned DATA_W = 4, ADDR_W = 2, FAULT_SLOTS = 2, NINJ = 2;
  localparam int unsigned DEPTH  = 2 ** ADDR_W;
  localparam logic [ADDR_W-1:0] ROW = 2'd1;

  logic test_clk = 1'b0, rst = 1'b1, test_ctrl = 1'b0;
  logic test_active, t_re, t_we, fault, fault_overflow, test_full;
  logic [ADDR_W-1:0] address_rd, address_wr;
  logic [DATA_W-1:0] data_in, test_data_out, result;
  logic [FAULT_SLOTS-1:0][ADDR_W-1:0] faulty_address;
  logic [FAULT_SLOTS-1:0] faulty_valid;
  logic row_written = 1'b0, row_inverted;

  logic              h_we = 1'b0, h_re = 1'b0;
  logic [ADDR_W-1:0] h_aw = '0, h_ar = '0;
  logic [DATA_W-1:0] h_d = '0;
  logic [NINJ-1:0] flt_en = '0;
  logic [NINJ-1:0][ADDR_W-1:0] flt_addr = '0;
  logic [NINJ-1:0][DATA_W-1:0] flt_mask = '0, flt_val = '0;
  noc_fifo_pkg::flt_kind_e [NINJ-1:0] flt_kind = {NINJ{noc_fifo_pkg::FLT_STUCK_AT}};

  logic [DATA_W-1:0] image [DEPTH] = '{4'b0110, 4'b1010, 4'b0011, 4'b1100};
  int checks = 0, failures = 0, active_cycles = 0, wb = 0;
  logic [DATA_W-1:0] wb_temp [2], wb_data [2], result_after_restore;
  bit grab_result = 1'b0;

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

  // the write-backs to the example row: temp as read, and the word written
  always @(posedge test_clk) begin
    if (grab_result) begin
      result_after_restore = result;
      grab_result          = 1'b0;
    end
    if (test_active) active_cycles++;
    if (test_active && t_we && address_wr == ROW && wb < 2) begin
      wb_temp[wb] = data_in;
      wb_data[wb] = test_data_out;
      if (wb == 1) grab_result = 1'b1;
      wb++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
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
    repeat (3) @(negedge test_clk);
    rst = 1'b0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge test_clk);
      h_we = 1'b1; h_aw = ADDR_W'(a); h_d = image[a];
    end
    @(negedge test_clk);
    h_we = 1'b0;
    // stuck-at-1 at the most significant bit of the example row
    flt_en[0] = 1'b1; flt_addr[0] = ROW; flt_mask[0] = 4'b1000; flt_val[0] = 4'b1000;
    flt_kind[0] = noc_fifo_pkg::FLT_STUCK_AT;

    @(negedge test_clk);
    active_cycles = 0;
    test_ctrl = 1'b1;
    @(negedge test_clk);
    while (test_active) @(negedge test_clk);
    test_ctrl = 1'b0;
    @(negedge test_clk);

    check(wb == 2, $sformatf("two write-backs to the example row (saw %0d)", wb));
    check(wb_temp[0] == 4'b1010, $sformatf("invert run reads 1010 (got %b)", wb_temp[0]));
    check(wb_data[0] == 4'b0101, $sformatf("invert run writes 0101 (got %b)", wb_data[0]));
    check(wb_temp[1] == 4'b1101, $sformatf("restore run reads 1101 (got %b)", wb_temp[1]));
    check(result_after_restore == 4'b0111,
          $sformatf("restore compare is 0111 (got %b)", result_after_restore));
    check(fault && faulty_valid == 2'b01 && faulty_address[0] == ROW,
          $sformatf("example row entered in the fault table (%b, %0d)", faulty_valid, faulty_address[0]));
    check(!fault_overflow, "no overflow");
    check(active_cycles == 6 * DEPTH, $sformatf("test took %0d cycles", active_cycles));
    // the fault-free rows keep their words
    for (int a = 0; a < DEPTH; a++) begin
      if (ADDR_W'(a) == ROW) continue;
      @(negedge test_clk);
      h_re = 1'b1; h_ar = ADDR_W'(a);
      @(negedge test_clk);
      h_re = 1'b0;
      check(data_in == image[a], $sformatf("row %0d restored (%b, expected %b)", a, data_in, image[a]));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
