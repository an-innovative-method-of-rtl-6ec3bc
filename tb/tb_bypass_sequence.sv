// Workload testbench: the write and read sequence of the published
// simulation waveforms, run through noc_fifo_top at its default sizes.
//
// Rows 0x00 and 0x0a hold stuck-at cells. A test started on test_ctrl must
// enter them in the fault table as the first and second entries. Then the
// thirteen words 4f, 3a..3f, 4a..4f are written back to back: they must land
// in rows 01..09 and 0b..0e, stepping over both faulty rows, and read back
// in order, each one cycle after its read, from the same rows.
module tb_bypass_sequence;
  import noc_fifo_pkg::*;
  localparam int unsigned DATA_W = DATA_W_DEF, ADDR_W = ADDR_W_DEF;
  localparam int unsigned FAULT_SLOTS = FAULT_SLOTS_DEF, NINJ = NINJ_DEF;

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

  localparam logic [DATA_W-1:0] WORDS [13] = '{8'h4f, 8'h3a, 8'h3b, 8'h3c, 8'h3d, 8'h3e, 8'h3f,
                                               8'h4a, 8'h4b, 8'h4c, 8'h4d, 8'h4e, 8'h4f};
  localparam logic [ADDR_W-1:0] ROWS [13]  = '{8'h01, 8'h02, 8'h03, 8'h04, 8'h05, 8'h06, 8'h07,
                                               8'h08, 8'h09, 8'h0b, 8'h0c, 8'h0d, 8'h0e};

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  initial begin
    repeat (5000) @(posedge test_clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    repeat (3) @(negedge test_clk);
    rst = 1'b0;
    // stuck cells: row 0x00 bit 3 stuck at 1, row 0x0a bit 6 stuck at 0
    flt_en = 2'b11;
    flt_addr[0] = 8'h00; flt_mask[0] = 8'h08; flt_val[0] = 8'h08;
    flt_addr[1] = 8'h0a; flt_mask[1] = 8'h40; flt_val[1] = 8'h00;
    @(negedge test_clk);
    test_ctrl = 1'b1;
    cyc = 0;
    @(negedge test_clk);
    while (test_active) begin
      @(negedge test_clk);
      cyc++;
    end
    test_ctrl = 1'b0;
    check(cyc == 6 * 256, $sformatf("test of 256 rows took %0d cycles", cyc));
    check(fault && faulty_valid == 2'b11, "two faulty rows found");
    check(faulty_address[0] == 8'h00, $sformatf("faulty_address1 = %h", faulty_address[0]));
    check(faulty_address[1] == 8'h0a, $sformatf("faulty_address2 = %h", faulty_address[1]));
    check(result == 8'h00, $sformatf("last verify compare (row ff) = %h", result));

    // writes, one per cycle
    for (int k = 0; k < 13; k++) begin
      @(negedge test_clk);
      check(!full && wr_pointer == ROWS[k], $sformatf("word %0d goes to row %h", k, wr_pointer));
      wr_en = 1'b1; data_in = WORDS[k];
    end
    @(negedge test_clk);
    wr_en = 1'b0;
    check(count == 13, "13 words held");

    // reads, one per cycle
    for (int k = 0; k < 13; k++) begin
      check(!empty && rd_pointer == ROWS[k], $sformatf("read %0d from row %h", k, rd_pointer));
      rd_en = 1'b1;
      @(negedge test_clk);
      check(data_valid && data_out == WORDS[k], $sformatf("word %0d read back %h", k, data_out));
    end
    rd_en = 1'b0;
    @(negedge test_clk);
    check(empty && !data_valid, "empty after the sequence");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
