// FIFO buffer of a router-channel interface, built on dp_ram, that steps
// over rows the on-line test has found faulty.
//
// Normal mode (test_ctrl low): a word on data_in is written when wr_en is high
// and full is low; a word is read when rd_en is high and empty is low and
// appears on data_out one cycle later with data_valid high. Both pointers
// advance implicitly by one after each access, as in an SRAM-type FIFO.
//
// Bypass: a row named in the fault table (faulty_address/faulty_valid) is
// skipped by the write pointer. The read pointer skips a faulty row only if
// that row holds no word, so a word written before its row was found faulty
// is still delivered in order. Each row has an occupied bit for this. The
// capacity shrinks by one for every faulty row that holds no word.
//
// Test running (test_ctrl high): the test engine and the traffic share the
// RAM cycle by cycle. The engine has priority on each port: in a cycle where
// it reads (t_re) the FIFO reports empty, in a cycle where it writes (t_we)
// the FIFO reports full. The row under test (t_address_rd) is not read by
// the traffic while t_row_inverted says it holds the complement of its word.
// It may be written, as the FIFO writes only rows that hold no word;
// t_row_written then tells the engine, which tests the row again. So the
// traffic keeps flowing during a test, at reduced rate, and the neighbouring
// router sees only back-pressure.
//
// The ports test_clk, test_ctrl, wr_en, data_in, rd_en and data_out, and
// wr_pointer, are the names in the published waveforms; the bypass of faulty
// rows is what the method describes. The occupied bits, the full/empty
// stalling during a test and the one-cycle read latency are this design's
// own choices, as is the cycle-by-cycle sharing of the RAM during a test.
module fifo_ram #(
  parameter int unsigned DATA_W      = noc_fifo_pkg::DATA_W_DEF,
  parameter int unsigned ADDR_W      = noc_fifo_pkg::ADDR_W_DEF,
  parameter int unsigned FAULT_SLOTS = noc_fifo_pkg::FAULT_SLOTS_DEF,
  parameter int unsigned NINJ        = noc_fifo_pkg::NINJ_DEF
) (
  input  logic                               test_clk,
  input  logic                               rst,        // synchronous, active high
  // write side
  input  logic                               wr_en,
  input  logic [DATA_W-1:0]                  data_in,
  output logic                               full,
  // read side
  input  logic                               rd_en,
  output logic [DATA_W-1:0]                  data_out,
  output logic                               data_valid,
  output logic                               empty,
  output logic [ADDR_W:0]                    count,      // words held
  output logic [ADDR_W-1:0]                  wr_pointer,
  output logic [ADDR_W-1:0]                  rd_pointer,
  // test access
  input  logic                               test_ctrl,  // a test is running
  input  logic                               t_we,
  input  logic [ADDR_W-1:0]                  t_address_wr,
  input  logic [DATA_W-1:0]                  t_data_wr,
  input  logic                               t_re,
  input  logic [ADDR_W-1:0]                  t_address_rd,
  input  logic                               t_row_inverted,
  output logic                               t_row_written,
  output logic [DATA_W-1:0]                  ram_data_rd,
  // fault table
  input  logic [FAULT_SLOTS-1:0][ADDR_W-1:0] faulty_address,
  input  logic [FAULT_SLOTS-1:0]             faulty_valid,
  // fault injection, passed to the RAM
  input  logic [NINJ-1:0]                    flt_en,
  input  logic [NINJ-1:0][ADDR_W-1:0]        flt_addr,
  input  logic [NINJ-1:0][DATA_W-1:0]        flt_mask,
  input  logic [NINJ-1:0][DATA_W-1:0]        flt_val,
  input  noc_fifo_pkg::flt_kind_e [NINJ-1:0] flt_kind
);

  localparam int unsigned DEPTH = 2 ** ADDR_W;

  logic [DEPTH-1:0]  occupied;
  logic [ADDR_W-1:0] wr_ptr, rd_ptr;      // next candidate rows
  logic [ADDR_W-1:0] wr_row, rd_row;      // rows actually used, after skipping
  logic [ADDR_W:0]   n_skip;              // faulty rows that hold no word
  logic              wr_go, rd_go;
  logic              wr_block, rd_block;  // port or row taken by the test engine

  // Memory port signals
  logic              we, re;
  logic [ADDR_W-1:0] address_wr, address_rd;
  logic [DATA_W-1:0] data_wr, data_rd;

  function automatic logic is_faulty(input logic [ADDR_W-1:0] row,
                                     input logic [FAULT_SLOTS-1:0][ADDR_W-1:0] fa,
                                     input logic [FAULT_SLOTS-1:0] fv);
    logic hit = 1'b0;
    for (int unsigned s = 0; s < FAULT_SLOTS; s++)
      if (fv[s] && fa[s] == row) hit = 1'b1;
    return hit;
  endfunction

  // With at most FAULT_SLOTS faulty rows, one of FAULT_SLOTS+1 consecutive
  // rows is always usable.
  always_comb begin
    logic found_w, found_r;
    logic [ADDR_W-1:0] cand;
    found_w = 1'b0;
    found_r = 1'b0;
    wr_row  = wr_ptr;
    rd_row  = rd_ptr;
    for (int unsigned k = 0; k <= FAULT_SLOTS; k++) begin
      cand = wr_ptr + ADDR_W'(k);
      if (!found_w && !is_faulty(cand, faulty_address, faulty_valid)) begin
        wr_row  = cand;
        found_w = 1'b1;
      end
      cand = rd_ptr + ADDR_W'(k);
      if (!found_r && (occupied[cand] || !is_faulty(cand, faulty_address, faulty_valid))) begin
        rd_row  = cand;
        found_r = 1'b1;
      end
    end
  end

  always_comb begin
    n_skip = '0;
    for (int unsigned s = 0; s < FAULT_SLOTS; s++) begin
      logic dup;
      dup = 1'b0;
      for (int unsigned t = 0; t < s; t++)
        if (faulty_valid[t] && faulty_address[t] == faulty_address[s]) dup = 1'b1;
      if (faulty_valid[s] && !dup && !occupied[faulty_address[s]]) n_skip = n_skip + 1'b1;
    end
  end

  assign wr_block = test_ctrl && t_we;
  assign rd_block = test_ctrl && (t_re || (t_row_inverted && rd_row == t_address_rd));
  assign full  = wr_block || ((count + n_skip) >= (ADDR_W+1)'(DEPTH));
  assign empty = rd_block || (count == '0);
  assign wr_go = wr_en && !full;
  assign rd_go = rd_en && !empty;

  always_ff @(posedge test_clk) begin
    if (rst) begin
      wr_ptr     <= '0;
      rd_ptr     <= '0;
      count      <= '0;
      occupied   <= '0;
      data_valid <= 1'b0;
    end else begin
      data_valid <= rd_go;
      if (wr_go) begin
        wr_ptr           <= wr_row + 1'b1;
        occupied[wr_row] <= 1'b1;
      end
      if (rd_go) begin
        rd_ptr           <= rd_row + 1'b1;
        occupied[rd_row] <= 1'b0;
      end
      count <= count + (ADDR_W+1)'(wr_go) - (ADDR_W+1)'(rd_go);
    end
  end

  // RAM port sharing: the engine drives a port only in the cycles it uses it,
  // and the FIFO is kept off that port in those cycles (wr_block, rd_block).
  always_comb begin
    if (test_ctrl && t_we) begin
      we         = 1'b1;
      address_wr = t_address_wr;
      data_wr    = t_data_wr;
    end else begin
      we         = wr_go;
      address_wr = wr_row;
      data_wr    = data_in;
    end
    if (test_ctrl && t_re) begin
      re         = 1'b1;
      address_rd = t_address_rd;
    end else begin
      re         = rd_go;
      address_rd = rd_row;
    end
  end

  dp_ram #(.DATA_W(DATA_W), .ADDR_W(ADDR_W), .NINJ(NINJ)) DP_RAM (
    .test_clk  (test_clk),
    .we        (we),
    .address_wr(address_wr),
    .data_wr   (data_wr),
    .re        (re),
    .address_rd(address_rd),
    .data_rd   (data_rd),
    .flt_en    (flt_en),
    .flt_addr  (flt_addr),
    .flt_mask  (flt_mask),
    .flt_val   (flt_val),
    .flt_kind  (flt_kind)
  );

  assign data_out    = data_rd;
  assign ram_data_rd = data_rd;
  assign wr_pointer  = wr_row;
  assign t_row_written = test_ctrl && wr_go && (wr_row == t_address_rd);
  assign rd_pointer  = rd_row;

  // A word is never written over a word that has not been read.
  a_no_overwrite: assert property (@(posedge test_clk) disable iff (rst)
    wr_go |-> !occupied[wr_row]);
  // Traffic never reads the row under test while it is inverted.
  a_no_inverted_read: assert property (@(posedge test_clk) disable iff (rst)
    (test_ctrl && t_row_inverted) |-> !(rd_go && rd_row == t_address_rd));
  // Traffic and engine never drive a port in the same cycle.
  a_port_sharing: assert property (@(posedge test_clk) disable iff (rst)
    !(test_ctrl && t_we && wr_go) && !(test_ctrl && t_re && rd_go));
  // A read always takes an occupied row.
  a_read_occupied: assert property (@(posedge test_clk) disable iff (rst)
    rd_go |-> occupied[rd_row]);

endmodule
