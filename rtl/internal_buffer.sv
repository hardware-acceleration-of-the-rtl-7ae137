// internal_buffer: the memory that closes a PE ring. The last PE of the ring
// writes every cell it computes on a pass that is not the read's last; the
// first PE reads the same cells back, one column per step, when it starts the
// next pass of rows. Each of the NSLOT interleaved matrices has its own
// region. A cell of column c lives at address c mod DEPTH of its slot's
// region: with a ring of N_PE PEs and haplotypes of at most H_MAX bases a
// cell waits at most H_MAX + 1 - N_PE steps between its write and its read,
// so DEPTH = H_MAX + 1 - N_PE words per slot suffice, and shorter rings need
// deeper buffers. When the ring is at least as long as the pass period the
// cell is read in the very cycle it is written; the read port then takes it
// straight from the write port.
// Ports: one write and one combinational read per cycle, each with its slot
// and column. Depth rule and bypass are this design's own.
module internal_buffer
  import phmm_pkg::*;
#(
  parameter int unsigned NSLOT = 12,
  parameter int unsigned H_MAX = 302,
  parameter int unsigned N_PE  = 8
) (
  input  logic              clk,
  input  logic              wr_en,
  input  logic [SLOT_W-1:0] wr_slot,
  input  logic [LEN_W-1:0]  wr_col,
  input  fvec_t             wr_data,
  input  logic [SLOT_W-1:0] rd_slot,
  input  logic [LEN_W-1:0]  rd_col,
  output fvec_t             rd_data
);
  localparam int unsigned DEPTH = (H_MAX + 1 > N_PE) ? H_MAX + 1 - N_PE : 1;
  localparam int unsigned AW    = (NSLOT * DEPTH > 1) ? $clog2(NSLOT * DEPTH) : 1;

  fvec_t mem [NSLOT * DEPTH];

  function automatic logic [AW-1:0] addr(input logic [SLOT_W-1:0] s, input logic [LEN_W-1:0] c);
    return AW'(32'(s) * DEPTH + (32'(c) % DEPTH));
  endfunction

  always_ff @(posedge clk)
    if (wr_en) mem[addr(wr_slot, wr_col)] <= wr_data;

  assign rd_data = (wr_en && wr_slot == rd_slot && wr_col == rd_col) ? wr_data
                                                                     : mem[addr(rd_slot, rd_col)];
endmodule
