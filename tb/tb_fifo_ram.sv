// Self-checking testbench of fifo_ram.
//
// A scoreboard queue follows every accepted write and checks every word that
// comes out (data_valid one cycle after an accepted read) for order and value.
// The testbench drives the fault table itself and checks that:
//   - with no faulty rows the buffer takes exactly 2**ADDR_W words;
//   - with two faulty rows it takes two fewer and never writes either row;
//   - a row that becomes faulty while it holds a word still delivers it;
//   - random traffic keeps order and count;
//   - while a test runs the engine's t_* ports reach the RAM, traffic uses
//     the port the engine leaves free, the row under test is not read while
//     inverted, and a write to it is reported;
//   - the stuck-at injection reaches the RAM.
module tb_fifo_ram;
  localparam int unsigned DATA_W = 8, ADDR_W = 8, FAULT_SLOTS = 2, NINJ = 2;
  localparam int unsigned DEPTH  = 2 ** ADDR_W;

  logic test_clk = 1'b0, rst = 1'b1;
  logic wr_en = 1'b0, rd_en = 1'b0;
  logic [DATA_W-1:0] data_in = '0, data_out;
  logic full, empty, data_valid;
  logic [ADDR_W:0] count;
  logic [ADDR_W-1:0] wr_pointer, rd_pointer;
  logic test_ctrl = 1'b0, t_we = 1'b0, t_re = 1'b0;
  logic [ADDR_W-1:0] t_address_wr = '0, t_address_rd = '0;
  logic t_row_inverted = 1'b0, t_row_written;
  logic [DATA_W-1:0] t_data_wr = '0, ram_data_rd;
  logic [FAULT_SLOTS-1:0][ADDR_W-1:0] faulty_address = '0;
  logic [FAULT_SLOTS-1:0] faulty_valid = '0;
  logic [NINJ-1:0] flt_en = '0;
  logic [NINJ-1:0][ADDR_W-1:0] flt_addr = '0;
  logic [NINJ-1:0][DATA_W-1:0] flt_mask = '0, flt_val = '0;
  noc_fifo_pkg::flt_kind_e [NINJ-1:0] flt_kind = {NINJ{noc_fifo_pkg::FLT_STUCK_AT}};

  int checks = 0, failures = 0;
  logic [DATA_W-1:0] sb[$];
  logic [ADDR_W-1:0] row_of[$];   // row each queued word went to
  int accepted_wr = 0, delivered = 0, bad_row_writes = 0;

  fifo_ram #(.DATA_W(DATA_W), .ADDR_W(ADDR_W), .FAULT_SLOTS(FAULT_SLOTS), .NINJ(NINJ)) dut (.*);

  always #5 test_clk = ~test_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // scoreboard
  always @(posedge test_clk) begin
    if (!rst) begin
      if (data_valid) begin
        checks++;
        if (sb.size() == 0) begin
          failures++; $display("FAIL word out of an empty buffer");
        end else begin
          logic [DATA_W-1:0] exp;
          exp = sb.pop_front();
          void'(row_of.pop_front());
          if (data_out !== exp) begin
            failures++; $display("FAIL data_out %h expected %h", data_out, exp);
          end
          delivered++;
        end
      end
      if (wr_en && !full) begin
        sb.push_back(data_in);
        row_of.push_back(wr_pointer);
        accepted_wr++;
        for (int s = 0; s < FAULT_SLOTS; s++)
          if (faulty_valid[s] && faulty_address[s] == wr_pointer) bad_row_writes++;
      end
    end
  end

  initial begin
    repeat (60000) @(posedge test_clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Write until full, return the number of words taken.
  task automatic fill(output int n);
    n = 0;
    @(negedge test_clk);
    while (!full) begin
      wr_en = 1'b1; data_in = DATA_W'($urandom);
      @(negedge test_clk);
      n++;
    end
    wr_en = 1'b0;
  endtask

  task automatic drain_some(input int k);
    @(negedge test_clk);
    repeat (k) begin
      rd_en = 1'b1;
      @(negedge test_clk);
    end
    rd_en = 1'b0;
    @(negedge test_clk);
  endtask

  task automatic drain();
    @(negedge test_clk);
    while (!empty) begin
      rd_en = 1'b1;
      @(negedge test_clk);
    end
    rd_en = 1'b0;
    @(negedge test_clk);
  endtask

  initial begin
    int n;
    logic [ADDR_W-1:0] tr;
    repeat (3) @(negedge test_clk);
    rst = 1'b0;
    @(negedge test_clk);
    check(empty && !full && count == 0, "reset state");

    // A: no faults
    fill(n);
    check(n == DEPTH, $sformatf("capacity without faults %0d", n));
    check(count == (ADDR_W+1)'(DEPTH), "count at full");
    drain();
    check(sb.size() == 0 && count == 0, "drained A");

    // B: two faulty rows, buffer empty
    faulty_address[0] = 8'h0a; faulty_address[1] = 8'h03; faulty_valid = 2'b11;
    fill(n);
    check(n == DEPTH - 2, $sformatf("capacity with two faulty rows %0d", n));
    drain();
    check(sb.size() == 0, "drained B");
    check(bad_row_writes == 0, "no write to a faulty row");

    // C: random traffic
    for (int c = 0; c < 3000; c++) begin
      @(negedge test_clk);
      wr_en = ($urandom_range(99, 0) < 55); data_in = DATA_W'($urandom);
      rd_en = ($urandom_range(99, 0) < 50);
    end
    wr_en = 1'b0; rd_en = 1'b0;
    drain();
    check(sb.size() == 0 && count == 0, "drained C");
    check(bad_row_writes == 0, "no write to a faulty row in traffic");

    // D: a row becomes faulty while it holds a word
    faulty_valid = 2'b01;   // keep only 0x0a
    for (int k = 0; k < 20; k++) begin
      @(negedge test_clk);
      wr_en = 1'b1; data_in = DATA_W'(k + 8'h40);
    end
    @(negedge test_clk);
    wr_en = 1'b0;
    faulty_address[1] = row_of[5]; faulty_valid = 2'b11;
    @(negedge test_clk);
    check(count == 20, "count before drain D");
    n = delivered;
    drain();
    check(delivered - n == 20, "word in a newly faulty row still delivered");
    fill(n);
    check(n == DEPTH - 2, $sformatf("capacity after the occupied row emptied %0d", n));
    drain();

    // E: test running, ports shared with the engine
    fill(n);  // words to read during the test
    drain_some(40);
    tr = rd_pointer - 1'b1;  // a row that holds no word now
    @(negedge test_clk);
    test_ctrl = 1'b1;
    t_address_rd = tr;       // row under test
    t_address_wr = tr;
    t_we = 1'b1; t_data_wr = 8'hc3;
    wr_en = 1'b1; rd_en = 1'b1; data_in = 8'h11;
    #1;
    check(full && !empty, "engine write cycle: full, reads go on");
    n = count;
    @(negedge test_clk);
    check(count == n - 1, "read served in an engine write cycle");
    t_we = 1'b0; t_re = 1'b1;
    #1;
    check(empty && !full, "engine read cycle: empty, writes go on");
    @(negedge test_clk);
    check(ram_data_rd == 8'hc3, "engine write then read of its row");
    check(count == n, "write served in an engine read cycle");
    t_re = 1'b0;
    wr_en = 1'b0; rd_en = 1'b0;
    // the row under test: no read while inverted, a write is reported
    t_address_rd = rd_pointer;
    t_row_inverted = 1'b1;
    #1;
    check(empty, "read pointer on the inverted row under test");
    t_row_inverted = 1'b0;
    #1;
    check(!empty, "read pointer on the restored row under test");
    t_address_rd = wr_pointer;
    wr_en = 1'b1;
    #1;
    check(!full && t_row_written, "write to the row under test reported");
    wr_en = 1'b0;
    #1;
    check(!t_row_written, "no report without a write");
    t_address_rd = tr;
    test_ctrl = 1'b0;
    drain();

    // F: injected stuck-at fault on the next row to be written
    @(negedge test_clk);
    flt_en = 2'b01; flt_addr[0] = wr_pointer; flt_mask[0] = 8'h01; flt_val[0] = 8'h00;
    wr_en = 1'b1; data_in = 8'hff;
    @(negedge test_clk);
    wr_en = 1'b0;
    void'(sb.pop_back()); sb.push_back(8'hfe);
    drain();
    flt_en = '0;
    check(sb.size() == 0, "stuck bit seen at the output");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
