// Periodic trigger of the on-line FIFO test.
//
// A cycle counter runs while enable is high. When it reaches TEST_PERIOD-1
// the scheduler raises test_req and holds it until the test engine reports,
// with a pulse on test_done, that the whole buffer has been tested; then it
// drops test_req and counts the next period from zero. Repeating the test
// this way keeps faults from piling up unseen between runs. Clearing enable
// drops test_req at once, which stops a running test at the next row
// boundary, and holds the counter at zero.
//
// That the test repeats periodically, started by a counter, is the method's;
// the period (4096 cycles by default) and the request/done handshake are this
// design's choices. test_req rises at the end of cycle TEST_PERIOD-1 after the
// counter last started from zero.
module test_scheduler #(
  parameter int unsigned TEST_PERIOD = noc_fifo_pkg::TEST_PERIOD_DEF
) (
  input  logic test_clk,
  input  logic rst,        // synchronous, active high
  input  logic enable,
  input  logic test_done,  // one-cycle pulse from the test engine
  output logic test_req
);

  localparam int unsigned CW = (TEST_PERIOD > 1) ? $clog2(TEST_PERIOD) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge test_clk) begin
    if (rst || !enable) begin
      cnt      <= '0;
      test_req <= 1'b0;
    end else if (test_req) begin
      if (test_done) test_req <= 1'b0;
    end else if (cnt == CW'(TEST_PERIOD - 1)) begin
      cnt      <= '0;
      test_req <= 1'b1;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

endmodule
