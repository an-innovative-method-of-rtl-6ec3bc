// Self-testing FIFO buffer for the router-channel interface of a
// network-on-chip router.
//
// fifo_ram (instance FIFO_RAM) is the buffer: the router's channel writes
// flits with wr_en/data_in and the router reads them with rd_en/data_out.
// soa_matt (instance SOA_MATT) tests the buffer's RAM on line with the
// transparent SOA-MATS++ march test and records the rows that fail; FIFO_RAM
// then steps over those rows, so a stuck-at cell costs one row of capacity
// instead of corrupting traffic. test_scheduler starts a test every
// TEST_PERIOD cycles while sched_en is high; test_ctrl starts one at any
// time. A test request is the OR of the two.
//
// While a test runs (test_active high, 6*2**ADDR_W cycles for the whole
// buffer, plus up to 3 for each row the traffic writes while it is being tested)
// traffic keeps flowing: the engine takes the RAM read port one cycle in two
// and the write port two cycles in six, and the row under test cannot be
// read while it holds its complement; in those cycles the buffer shows empty
// or full and the router simply waits. The words in the buffer survive the test.
//
// The flt_* inputs reach the fault injection sites of the RAM model
// (stuck-at or transition faults, see dp_ram) and exist to exercise the
// test; tie flt_en low in use. The hierarchy names
// NOC_FIFO_TOP, FIFO_RAM, DP_RAM and SOA_MATT are those of the published
// waveforms; the scheduler's period and the OR of the two requests are this
// design's choices.
module noc_fifo_top #(
  parameter int unsigned DATA_W      = noc_fifo_pkg::DATA_W_DEF,
  parameter int unsigned ADDR_W      = noc_fifo_pkg::ADDR_W_DEF,
  parameter int unsigned FAULT_SLOTS = noc_fifo_pkg::FAULT_SLOTS_DEF,
  parameter int unsigned NINJ        = noc_fifo_pkg::NINJ_DEF,
  parameter int unsigned TEST_PERIOD = noc_fifo_pkg::TEST_PERIOD_DEF
) (
  input  logic                               test_clk,
  input  logic                               rst,
  // channel side
  input  logic                               wr_en,
  input  logic [DATA_W-1:0]                  data_in,
  output logic                               full,
  // router side
  input  logic                               rd_en,
  output logic [DATA_W-1:0]                  data_out,
  output logic                               data_valid,
  output logic                               empty,
  output logic [ADDR_W:0]                    count,
  output logic [ADDR_W-1:0]                  wr_pointer,   // row the next write goes to
  output logic [ADDR_W-1:0]                  rd_pointer,   // row the next read comes from
  // test control and status
  input  logic                               test_ctrl,
  input  logic                               sched_en,
  output logic                               test_active,
  output logic                               test_full,
  output logic                               fault,
  output logic                               fault_overflow,
  output logic [DATA_W-1:0]                  result,       // last compare word of the engine
  output logic [FAULT_SLOTS-1:0][ADDR_W-1:0] faulty_address,
  output logic [FAULT_SLOTS-1:0]             faulty_valid,
  // fault injection into the RAM model
  input  logic [NINJ-1:0]                    flt_en,
  input  logic [NINJ-1:0][ADDR_W-1:0]        flt_addr,
  input  logic [NINJ-1:0][DATA_W-1:0]        flt_mask,
  input  logic [NINJ-1:0][DATA_W-1:0]        flt_val,
  input  noc_fifo_pkg::flt_kind_e [NINJ-1:0] flt_kind
);

  logic              sched_req, test_req;
  logic              t_re, t_we, row_written, row_inverted;
  logic [ADDR_W-1:0] t_address_rd, t_address_wr;
  logic [DATA_W-1:0] t_data_wr, ram_data_rd;

  assign test_req = test_ctrl || sched_req;

  test_scheduler #(.TEST_PERIOD(TEST_PERIOD)) SCHED (
    .test_clk (test_clk),
    .rst      (rst),
    .enable   (sched_en),
    .test_done(test_full),
    .test_req (sched_req)
  );

  soa_matt #(.DATA_W(DATA_W), .ADDR_W(ADDR_W), .FAULT_SLOTS(FAULT_SLOTS)) SOA_MATT (
    .test_clk      (test_clk),
    .rst           (rst),
    .test_ctrl     (test_req),
    .test_active   (test_active),
    .t_re          (t_re),
    .address_rd    (t_address_rd),
    .data_in       (ram_data_rd),
    .row_written   (row_written),
    .row_inverted  (row_inverted),
    .t_we          (t_we),
    .address_wr    (t_address_wr),
    .test_data_out (t_data_wr),
    .fault         (fault),
    .fault_overflow(fault_overflow),
    .test_full     (test_full),
    .result        (result),
    .faulty_address(faulty_address),
    .faulty_valid  (faulty_valid)
  );

  fifo_ram #(.DATA_W(DATA_W), .ADDR_W(ADDR_W), .FAULT_SLOTS(FAULT_SLOTS), .NINJ(NINJ)) FIFO_RAM (
    .test_clk      (test_clk),
    .rst           (rst),
    .wr_en         (wr_en),
    .data_in       (data_in),
    .full          (full),
    .rd_en         (rd_en),
    .data_out      (data_out),
    .data_valid    (data_valid),
    .empty         (empty),
    .count         (count),
    .wr_pointer    (wr_pointer),
    .rd_pointer    (rd_pointer),
    .test_ctrl     (test_active),
    .t_we          (t_we),
    .t_address_wr  (t_address_wr),
    .t_data_wr     (t_data_wr),
    .t_re          (t_re),
    .t_address_rd  (t_address_rd),
    .t_row_inverted(row_inverted),
    .t_row_written (row_written),
    .ram_data_rd   (ram_data_rd),
    .faulty_address(faulty_address),
    .faulty_valid  (faulty_valid),
    .flt_en        (flt_en),
    .flt_addr      (flt_addr),
    .flt_mask      (flt_mask),
    .flt_val       (flt_val),
    .flt_kind      (flt_kind)
  );

endmodule
