// Self-checking testbench of dp_ram.
//
// Writes random words to random addresses while a reference array in the
// testbench records them, then reads addresses back and compares, one cycle
// after the read is issued. It also checks that a read of the address being
// written in the same cycle returns the old word, that data_rd holds while re
// is low, and that each stuck-at injection site forces the selected bits of
// its address and no other address, that a transition-fault site blocks
// only the one transition of the selected bits, that a read-disturb site
// flips its bits on each read, and that a stuck-open site repeats the bits
// of the previous read.
module tb_dp_ram;
  localparam int unsigned DATA_W = 8;
  localparam int unsigned ADDR_W = 8;
  localparam int unsigned NINJ   = 2;
  localparam int unsigned DEPTH  = 2 ** ADDR_W;

  logic                        test_clk = 1'b0;
  logic                        we = 1'b0, re = 1'b0;
  logic [ADDR_W-1:0]           address_wr = '0, address_rd = '0;
  logic [DATA_W-1:0]           data_wr = '0, data_rd;
  logic [NINJ-1:0]             flt_en = '0;
  logic [NINJ-1:0][ADDR_W-1:0] flt_addr = '0;
  logic [NINJ-1:0][DATA_W-1:0] flt_mask = '0, flt_val = '0;
  noc_fifo_pkg::flt_kind_e [NINJ-1:0] flt_kind = {NINJ{noc_fifo_pkg::FLT_STUCK_AT}};

  logic [DATA_W-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  dp_ram #(.DATA_W(DATA_W), .ADDR_W(ADDR_W), .NINJ(NINJ)) dut (.*);

  always #5 test_clk = ~test_clk;

  task automatic check(input logic [DATA_W-1:0] got, input logic [DATA_W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic write(input logic [ADDR_W-1:0] a, input logic [DATA_W-1:0] d);
    @(negedge test_clk);
    we = 1'b1; address_wr = a; data_wr = d;
    @(negedge test_clk);
    we = 1'b0;
    ref_mem[a] = d;
  endtask

  task automatic read_check(input logic [ADDR_W-1:0] a, input logic [DATA_W-1:0] exp, input string what);
    @(negedge test_clk);
    re = 1'b1; address_rd = a;
    @(negedge test_clk);
    re = 1'b0;
    check(data_rd, exp, what);
  endtask

  initial begin
    repeat (20000) @(posedge test_clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [ADDR_W-1:0] a;
    logic [DATA_W-1:0] old;
    // fill every address
    for (int i = 0; i < DEPTH; i++) write(ADDR_W'(i), DATA_W'($urandom));
    for (int i = 0; i < DEPTH; i++) read_check(ADDR_W'(i), ref_mem[i], "fill readback");
    // random mix
    for (int n = 0; n < 300; n++) begin
      a = ADDR_W'($urandom);
      if ($urandom_range(1, 0) == 1) write(a, DATA_W'($urandom));
      else read_check(a, ref_mem[a], "random read");
    end
    // read during write of the same address returns the old word
    a = 8'h33;
    old = ref_mem[a];
    @(negedge test_clk);
    we = 1'b1; address_wr = a; data_wr = ~old; re = 1'b1; address_rd = a;
    @(negedge test_clk);
    we = 1'b0; re = 1'b0;
    check(data_rd, old, "read during write");
    ref_mem[a] = ~old;
    // data_rd holds while re is low
    address_rd = 8'h34;
    repeat (3) @(negedge test_clk);
    check(data_rd, old, "hold");
    read_check(a, ref_mem[a], "after write");
    // stuck-at sites: site 0 makes bit 7 of address 0x0a read 1, site 1 makes
    // bits 1:0 of address 0x20 read 00
    flt_en = 2'b11;
    flt_addr[0] = 8'h0a; flt_mask[0] = 8'h80; flt_val[0] = 8'hff;
    flt_addr[1] = 8'h20; flt_mask[1] = 8'h03; flt_val[1] = 8'h00;
    write(8'h0a, 8'h5a);
    read_check(8'h0a, 8'hda, "stuck-at-1 site 0");
    write(8'h0a, 8'hda);
    read_check(8'h0a, 8'hda, "stuck-at-1 site 0 agrees");
    write(8'h20, 8'hf7);
    read_check(8'h20, 8'hf4, "stuck-at-0 site 1");
    read_check(8'h21, ref_mem[8'h21], "neighbour unaffected");
    flt_en = 2'b00;
    read_check(8'h0a, 8'hda, "site 0 off");
    read_check(8'h20, 8'hf7, "site 1 off");
    // transition faults: bit 2 of address 0x40 cannot rise, bit 6 of 0x41 cannot fall
    write(8'h40, 8'h00);
    write(8'h41, 8'hff);
    flt_en = 2'b11;
    flt_kind[0] = noc_fifo_pkg::FLT_TRANSITION; flt_addr[0] = 8'h40; flt_mask[0] = 8'h04; flt_val[0] = 8'h04;
    flt_kind[1] = noc_fifo_pkg::FLT_TRANSITION; flt_addr[1] = 8'h41; flt_mask[1] = 8'h40; flt_val[1] = 8'h00;
    write(8'h40, 8'hff);
    read_check(8'h40, 8'hfb, "rising transition blocked");
    write(8'h41, 8'h00);
    read_check(8'h41, 8'h40, "falling transition blocked");
    write(8'h42, 8'h5a);
    read_check(8'h42, 8'h5a, "neighbour of a transition fault");
    flt_en = 2'b00;
    read_check(8'h40, 8'hfb, "transition-faulty cell kept its value");
    write(8'h40, 8'h04);
    flt_en = 2'b01;
    write(8'h40, 8'h00);
    read_check(8'h40, 8'h00, "falling transition allowed on a rise-faulty cell");
    flt_en = 2'b00;
    // read disturb on bit 0 of 0x50, stuck-open on bits 3:0 of 0x51
    write(8'h50, 8'h10);
    write(8'h51, 8'hab);
    write(8'h52, 8'h0c);
    flt_en = 2'b11;
    flt_kind[0] = noc_fifo_pkg::FLT_READ_DISTURB; flt_addr[0] = 8'h50; flt_mask[0] = 8'h01;
    flt_kind[1] = noc_fifo_pkg::FLT_STUCK_OPEN;   flt_addr[1] = 8'h51; flt_mask[1] = 8'h0f;
    read_check(8'h50, 8'h11, "read disturb flips on the first read");
    read_check(8'h50, 8'h10, "read disturb flips back on the second read");
    read_check(8'h52, 8'h0c, "read before the open cell");
    read_check(8'h51, 8'hac, "stuck-open bits repeat the previous read");
    write(8'h50, 8'h20);
    read_check(8'h50, 8'h21, "write clears the disturbed value, read flips again");
    flt_en = 2'b00;
    read_check(8'h50, 8'h21, "disturbed value stays in the cell");
    read_check(8'h51, 8'hab, "stuck-open cell kept its word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
