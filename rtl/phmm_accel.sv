// phmm_accel: Pair HMM forward-algorithm accelerator. It computes, for a
// read and a candidate haplotype, the likelihood that the read was produced
// by the haplotype: the sum over all alignments of the Pair HMM (states
// match, insert, delete) of their probabilities, in single-precision floating
// point. The host supplies per-read-base emission priors and transition
// probabilities; the accelerator runs the dynamic programming.
//
// It holds NUM_RINGS independent PE rings of N_PE processing elements each
// (default 8 x 8, the main configuration of the source thesis), and every
// ring interleaves up to ADD_LAT + MUL_LAT = 12 jobs in its pipelines, so up
// to 96 read/haplotype pairs are in flight. Rings share nothing: the host
// addresses a ring and a slot in it, writes the haplotype bases and read
// descriptors, then starts the job. Each ring reports its own results.
//
// Ports (ring index r selects the target of write and start):
//   wr_*     input memory write, one base or one descriptor per cycle
//   start_*  job start; start_ready is low while the addressed slot is busy
//   busy     per ring, per slot: job running or result not yet delivered
//   res_*    per ring: one-cycle result strobe with slot, tag and likelihood
// The host protocol and the ring-select ports are this design's own.
module phmm_accel
  import phmm_pkg::*;
#(
  parameter int unsigned NUM_RINGS = 8,
  parameter int unsigned N_PE      = 8,
  parameter int unsigned ADD_LAT   = 7,
  parameter int unsigned MUL_LAT   = 5,
  parameter int unsigned H_MAX     = 302,
  parameter int unsigned R_MAX     = 302,
  localparam int unsigned NSLOT    = ADD_LAT + MUL_LAT,
  localparam int unsigned RW       = (NUM_RINGS > 1) ? $clog2(NUM_RINGS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_hap_en,
  input  logic              wr_read_en,
  input  logic [RW-1:0]     wr_ring,
  input  logic [SLOT_W-1:0] wr_slot,
  input  logic [LEN_W-1:0]  wr_addr,
  input  base_t             wr_hbase,
  input  read_desc_t        wr_desc,
  input  logic              start_valid,
  output logic              start_ready,
  input  logic [RW-1:0]     start_ring,
  input  logic [SLOT_W-1:0] start_slot,
  input  logic [LEN_W-1:0]  start_hlen,
  input  logic [LEN_W-1:0]  start_rlen,
  input  logic [TAG_W-1:0]  start_tag,
  output logic [NSLOT-1:0]  busy      [NUM_RINGS],
  output logic              res_valid [NUM_RINGS],
  output logic [SLOT_W-1:0] res_slot  [NUM_RINGS],
  output logic [TAG_W-1:0]  res_tag   [NUM_RINGS],
  output fp32_t             res_value [NUM_RINGS]
);
  logic ring_ready [NUM_RINGS];

  for (genvar r = 0; r < int'(NUM_RINGS); r++) begin : g_ring
    pe_ring #(.N_PE(N_PE), .ADD_LAT(ADD_LAT), .MUL_LAT(MUL_LAT), .H_MAX(H_MAX), .R_MAX(R_MAX)) u_ring (
      .clk, .rst_n,
      .wr_hap_en  (wr_hap_en  && wr_ring == RW'(r)),
      .wr_read_en (wr_read_en && wr_ring == RW'(r)),
      .wr_slot, .wr_addr, .wr_hbase, .wr_desc,
      .start_valid(start_valid && start_ring == RW'(r)),
      .start_ready(ring_ready[r]),
      .start_slot, .start_hlen, .start_rlen, .start_tag,
      .busy       (busy[r]),
      .res_valid  (res_valid[r]),
      .res_slot   (res_slot[r]),
      .res_tag    (res_tag[r]),
      .res_value  (res_value[r]));
  end

  always_comb begin
    start_ready = 1'b0;
    for (int r = 0; r < int'(NUM_RINGS); r++)
      if (start_ring == RW'(r)) start_ready = ring_ready[r];
  end
endmodule
