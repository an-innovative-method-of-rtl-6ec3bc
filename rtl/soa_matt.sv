// On-line transparent SOA-MATS++ test engine for an SRAM-type FIFO.
//
// A rising edge of test_ctrl starts a test of every row, 0 to 2**ADDR_W-1,
// in single address order. Each row gets three address runs:
//   run 0 (invert):  temp <- read(i); original <- temp; write(i, ~temp)
//   run 1 (restore): temp <- read(i); result <- temp ^ original, which must be
//                    all ones; write(i, ~temp), putting the word back
//   run 2 (verify):  temp <- read(i); result <- temp ^ original, which must be
//                    all zeros
// The FIFO's own words serve as the data background, so nothing is lost and
// nothing has to be loaded first. A row that fails either compare is entered
// in the fault table (faulty_address/faulty_valid) unless it is there
// already; the table keeps its entries until reset, and the FIFO bypasses the
// rows it names. fault goes high at the first failing row of a run and stays
// high until the next run starts; fault_overflow goes high when a failing row
// finds the table full.
//
// Timing: every run takes two cycles (issue the read, then use the word,
// which the RAM returns one cycle later), so a row takes 6 cycles and the
// whole test 6*2**ADDR_W cycles when no row is restarted (see below);
// test_active is high for exactly that long,
// from the cycle after the rising edge of test_ctrl is seen. test_full pulses
// for one cycle when the last row is done. A falling edge of test_ctrl during
// a test stops it after the row in progress, so a row is never left
// inverted. While test_active is high the engine reads with t_re/address_rd
// (in T_READ cycles) and writes with t_we/address_wr/test_data_out (in the
// T_EXEC cycles of runs 0 and 1); each port is free for traffic in every
// other cycle. address_rd names the row under test for the whole row.
// row_inverted tells the FIFO not to read that row while it holds the
// complement of its word. The FIFO may write the row under test, since it
// writes only rows that hold no word; it reports that on row_written, and
// if that happens before the restore the engine starts the row again at
// run 0 instead of writing the old word over the new one. A restart costs 1
// cycle in run 0 and 3 in run 1.
//
// The three runs, the compares and the names temp, original_reg, result,
// fault, test_full, test_data_out, faulty_address and the edge detectors
// test_ctrl_ext_d/test_ctrl_pos/test_ctrl_neg follow the method and its
// published waveforms. The two-cycle run, the stop at a row boundary, the
// table of FAULT_SLOTS entries, fault_overflow and the sharing of the RAM
// with the traffic (row_written, row_inverted) are this design's choices.
module soa_matt
  import noc_fifo_pkg::*;
#(
  parameter int unsigned DATA_W      = noc_fifo_pkg::DATA_W_DEF,
  parameter int unsigned ADDR_W      = noc_fifo_pkg::ADDR_W_DEF,
  parameter int unsigned FAULT_SLOTS = noc_fifo_pkg::FAULT_SLOTS_DEF
) (
  input  logic                               test_clk,
  input  logic                               rst,            // synchronous, active high
  input  logic                               test_ctrl,      // test request (level)
  // RAM access
  output logic                               test_active,    // engine owns the RAM ports
  output logic                               t_re,
  output logic [ADDR_W-1:0]                  address_rd,
  input  logic [DATA_W-1:0]                  data_in,        // RAM read data
  input  logic                               row_written,    // traffic wrote the row under test
  output logic                               row_inverted,   // row under test holds its complement
  output logic                               t_we,
  output logic [ADDR_W-1:0]                  address_wr,
  output logic [DATA_W-1:0]                  test_data_out,  // RAM write data
  // results
  output logic                               fault,
  output logic                               fault_overflow,
  output logic                               test_full,      // one-cycle pulse: all rows tested
  output logic [DATA_W-1:0]                  result,         // last compare, temp ^ original
  output logic [FAULT_SLOTS-1:0][ADDR_W-1:0] faulty_address,
  output logic [FAULT_SLOTS-1:0]             faulty_valid
);

  localparam logic [ADDR_W-1:0] LAST_ROW = '1;

  tstate_e           state;
  run_e              run;
  logic [ADDR_W-1:0] row;            // loop index i
  logic [DATA_W-1:0] temp;           // word read in this run
  logic [DATA_W-1:0] original_reg;   // word read in run 0
  logic              row_bad;        // a compare of this row has failed
  logic              stop_req;
  logic              test_ctrl_ext_d, test_ctrl_pos, test_ctrl_neg;

  // compare of the current run, valid in T_EXEC
  logic [DATA_W-1:0] cmp;
  logic              cmp_fail, row_fails, known, have_free;
  localparam int unsigned SW = (FAULT_SLOTS > 1) ? $clog2(FAULT_SLOTS) : 1;
  logic [SW-1:0]     free_slot;

  assign test_ctrl_pos = test_ctrl && !test_ctrl_ext_d;
  assign test_ctrl_neg = !test_ctrl && test_ctrl_ext_d;

  assign temp = data_in;
  assign cmp  = temp ^ original_reg;

  always_comb begin
    unique case (run)
      RUN_RESTORE: cmp_fail = (cmp != '1);
      RUN_VERIFY:  cmp_fail = (cmp != '0);
      default:     cmp_fail = 1'b0;
    endcase
  end

  assign row_fails = row_bad || cmp_fail;

  always_comb begin
    known     = 1'b0;
    have_free = 1'b0;
    free_slot = '0;
    for (int unsigned s = 0; s < FAULT_SLOTS; s++) begin
      if (faulty_valid[s] && faulty_address[s] == row) known = 1'b1;
      if (!faulty_valid[s] && !have_free) begin
        have_free = 1'b1;
        free_slot = SW'(s);
      end
    end
  end

  // RAM port drive
  assign test_active   = (state != T_IDLE);
  assign t_re          = (state == T_READ);
  assign address_rd    = row;
  assign t_we          = (state == T_EXEC) && (run != RUN_VERIFY);
  assign address_wr    = row;
  assign test_data_out = ~temp;
  // between the write back of run 0 and that of run 1
  assign row_inverted  = test_active && (run == RUN_RESTORE);

  always_ff @(posedge test_clk) begin
    if (rst) begin
      state           <= T_IDLE;
      run             <= RUN_INVERT;
      row             <= '0;
      original_reg    <= '0;
      result          <= '0;
      row_bad         <= 1'b0;
      stop_req        <= 1'b0;
      fault           <= 1'b0;
      fault_overflow  <= 1'b0;
      test_full       <= 1'b0;
      test_ctrl_ext_d <= 1'b0;
      faulty_address  <= '0;
      faulty_valid    <= '0;
    end else begin
      test_ctrl_ext_d <= test_ctrl;
      test_full       <= 1'b0;
      unique case (state)
        T_IDLE: begin
          if (test_ctrl_pos) begin
            state    <= T_READ;
            run      <= RUN_INVERT;
            row      <= '0;
            row_bad  <= 1'b0;
            stop_req <= 1'b0;
            fault    <= 1'b0;
          end
        end
        T_READ: begin
          if (test_ctrl_neg) stop_req <= 1'b1;
          if (row_written && run != RUN_VERIFY) begin
            // A new word now sits in the row: a write back would destroy
            // it, so the row is tested again from run 0.
            run     <= RUN_INVERT;
            row_bad <= 1'b0;
            state   <= T_READ;
          end else begin
            state <= T_EXEC;
          end
        end
        T_EXEC: begin
          if (test_ctrl_neg) stop_req <= 1'b1;
          unique case (run)
            RUN_INVERT: begin
              original_reg <= temp;
              run          <= RUN_RESTORE;
              state        <= T_READ;
            end
            RUN_RESTORE: begin
              result  <= cmp;
              row_bad <= row_fails;
              run     <= RUN_VERIFY;
              state   <= T_READ;
            end
            default: begin  // RUN_VERIFY: row finished
              result  <= cmp;
              row_bad <= 1'b0;
              run     <= RUN_INVERT;
              if (row_fails) begin
                fault <= 1'b1;
                if (!known) begin
                  if (have_free) begin
                    faulty_address[free_slot] <= row;
                    faulty_valid[free_slot]   <= 1'b1;
                  end else begin
                    fault_overflow <= 1'b1;
                  end
                end
              end
              row <= row + 1'b1;
              if (row == LAST_ROW) begin
                test_full <= 1'b1;
                state     <= T_IDLE;
              end else if (stop_req || test_ctrl_neg) begin
                state     <= T_IDLE;
              end else begin
                state     <= T_READ;
              end
            end
          endcase
        end
        default: state <= T_IDLE;
      endcase
    end
  end

  // The engine writes only the row it is testing, and only after reading it.
  a_write_own_row: assert property (@(posedge test_clk) disable iff (rst)
    t_we |-> (address_wr == address_rd) && (state == T_EXEC));

endmodule
