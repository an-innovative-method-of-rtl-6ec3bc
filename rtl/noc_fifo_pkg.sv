// Shared types and default sizes of the self-testing NoC FIFO.
//
// The FIFO buffer of a router-channel interface is checked on line by a
// transparent SOA-MATS++ march test: every row is read, inverted, read again
// and restored, read a third time, and the two reads after the first are
// compared with the saved original word. Rows that fail are recorded and the
// FIFO pointers step over them from then on.
//
// The three test runs per row (invert, restore, verify) follow the algorithm
// of the method. The 8-bit word and the 8-bit address are the widths the
// published waveforms print; the number of fault-table entries (two) follows
// the two faulty-address registers those waveforms show. Everything else here
// is this design's own choice.
package noc_fifo_pkg;

  // Default sizes.
  localparam int unsigned DATA_W_DEF      = 8;  // FIFO word width
  localparam int unsigned ADDR_W_DEF      = 8;  // FIFO address width, depth = 2**ADDR_W
  localparam int unsigned FAULT_SLOTS_DEF = 2;  // faulty-address registers
  localparam int unsigned NINJ_DEF        = 2;  // stuck-at injection sites of the RAM model
  localparam int unsigned TEST_PERIOD_DEF = 4096; // cycles between periodic test runs

  // Address run j of the march element applied to one row.
  typedef enum logic [1:0] {
    RUN_INVERT  = 2'd0,  // j = 0: read, save as original, write the complement
    RUN_RESTORE = 2'd1,  // j = 1: read, compare (expect all ones), write the complement back
    RUN_VERIFY  = 2'd2   // j = 2: read, compare (expect all zeros)
  } run_e;

  // Kind of fault an injection site of the RAM model emulates.
  typedef enum logic [1:0] {
    FLT_STUCK_AT     = 2'd0,  // masked bits always read flt_val
    FLT_TRANSITION   = 2'd1,  // masked bits cannot change to flt_val once they differ from it
    FLT_READ_DISTURB = 2'd2,  // a read flips the masked bits and returns the flipped value
    FLT_STUCK_OPEN   = 2'd3   // masked bits are not driven: a read returns the last value read
  } flt_kind_e;

  // Test engine control state.
  typedef enum logic [1:0] {
    T_IDLE = 2'd0,  // normal FIFO operation, RAM ports belong to the FIFO
    T_READ = 2'd1,  // read of the current row is issued
    T_EXEC = 2'd2   // read word arrives: compare and, for runs 0 and 1, write back
  } tstate_e;

endpackage
