// Dual-port RAM holding the words of the FIFO buffer.
//
// One synchronous write port and one synchronous read port, both on the
// rising edge of test_clk: a word written in cycle n can be read by a read
// issued in cycle n+1; read data appear on data_rd in the cycle after re is
// high and hold until the next read. Simultaneous read and write of the same
// address returns the old word. The array is not reset, as in an SRAM macro.
//
// The port names (we, re, address_wr, data_wr, address_rd, data_rd) are those
// of the RAM inside the published FIFO. The flt_* inputs are this design's
// own addition, so that the on-line test and the bypass can be exercised:
// each of the NINJ sites acts on a set of bits (flt_mask) of one address.
// A stuck-at site (flt_kind FLT_STUCK_AT) makes those bits read back flt_val
// whatever is stored. A transition-fault site (FLT_TRANSITION) lets a write
// move those bits away from flt_val but not to it, as a cell too weak to make
// one of its transitions (flt_val = 1 for a failing 0-to-1 transition). A
// read-disturb site (FLT_READ_DISTURB) flips those bits in the cell on every
// read and returns the flipped value; a write in the same cycle to the same
// address wins. A stuck-open site (FLT_STUCK_OPEN) leaves those bits of the
// read port undriven, so they repeat the value of the previous read. These
// are the four fault models the test method targets. Tie flt_en to zero in a
// real chip.
module dp_ram
  import noc_fifo_pkg::*;
#(
  parameter int unsigned DATA_W = noc_fifo_pkg::DATA_W_DEF,
  parameter int unsigned ADDR_W = noc_fifo_pkg::ADDR_W_DEF,
  parameter int unsigned NINJ   = noc_fifo_pkg::NINJ_DEF
) (
  input  logic                           test_clk,
  // write port
  input  logic                           we,
  input  logic [ADDR_W-1:0]              address_wr,
  input  logic [DATA_W-1:0]              data_wr,
  // read port
  input  logic                           re,
  input  logic [ADDR_W-1:0]              address_rd,
  output logic [DATA_W-1:0]              data_rd,
  // stuck-at fault injection sites
  input  logic [NINJ-1:0]                flt_en,
  input  logic [NINJ-1:0][ADDR_W-1:0]    flt_addr,
  input  logic [NINJ-1:0][DATA_W-1:0]    flt_mask,
  input  logic [NINJ-1:0][DATA_W-1:0]    flt_val,
  input  flt_kind_e [NINJ-1:0]           flt_kind
);

  localparam int unsigned DEPTH = 2 ** ADDR_W;

  logic [DATA_W-1:0] mem [DEPTH];
  logic [DATA_W-1:0] cell_q;  // word as the cells return it, faults applied
  logic [DATA_W-1:0] cell_d;  // word as the cells take it, faults applied
  logic [DATA_W-1:0] disturb; // bits a read flips in the cell
  logic [DATA_W-1:0] open_q;  // bits the read port does not drive

  // A cell with a transition fault keeps its old value when asked to move to
  // flt_val.
  logic [DATA_W-1:0] blocked; // bits held by a transition fault

  always_comb begin
    cell_d  = data_wr;
    blocked = '0;
    for (int unsigned k = 0; k < NINJ; k++) begin
      if (flt_en[k] && flt_kind[k] == FLT_TRANSITION && flt_addr[k] == address_wr) begin
        blocked = flt_mask[k] & (mem[address_wr] ^ flt_val[k]) & ~(cell_d ^ flt_val[k]);
        cell_d  = (cell_d & ~blocked) | (mem[address_wr] & blocked);
      end
    end
  end

  always_ff @(posedge test_clk) begin
    if (re && disturb != '0) mem[address_rd] <= mem[address_rd] ^ disturb;
    if (we) mem[address_wr] <= cell_d;
  end

  // A stuck cell returns its stuck value whatever was written to it.
  always_comb begin
    cell_q  = mem[address_rd];
    disturb = '0;
    open_q  = '0;
    for (int unsigned k = 0; k < NINJ; k++) begin
      if (flt_en[k] && flt_addr[k] == address_rd) begin
        unique case (flt_kind[k])
          FLT_STUCK_AT:     cell_q = (cell_q & ~flt_mask[k]) | (flt_val[k] & flt_mask[k]);
          FLT_READ_DISTURB: disturb = disturb | flt_mask[k];
          FLT_STUCK_OPEN:   open_q  = open_q | flt_mask[k];
          default:          ;
        endcase
      end
    end
    cell_q = cell_q ^ disturb;
  end

  always_ff @(posedge test_clk) begin
    if (re) data_rd <= (cell_q & ~open_q) | (data_rd & open_q);
  end

endmodule
