// pe_ring: one ring of N_PE processing elements. PE k takes row k of every
// pass of N_PE read rows and follows PE k-1 one step behind along the
// haplotype, so that the PEs always sit on an anti-diagonal of the DP matrix
// and need only their upstream neighbour's last result. The last PE's results
// go to the internal buffer, from which the first PE reads them back as its
// upstream row on the next pass, so a ring of any length handles reads of any
// length up to R_MAX. Up to ADD_LAT + MUL_LAT matrices are interleaved in the
// pipelines, one per cycle in turn (see ring_ctrl).
//
// Contents: ring_input_mem (job data of every slot), ring_ctrl (sequencer),
// N_PE x phmm_pe, internal_buffer, result_sum (f^M + f^I + f^D of the last
// cell). Host side: write the haplotype bases and read descriptors of an idle
// slot, then start it with the two lengths and a tag; busy[s] is high until
// the job's likelihood appears on res_* (one cycle, with its tag and slot).
// Latency of a job, in cycles: NSLOT * (N_PE + (P-1)*W + hlen + k + 1)
// + 2*ADD_LAT + 1 after the slot's first issue, where P = ceil(rlen/N_PE),
// W = max(hlen+1, N_PE) and k = rlen - 1 - (P-1)*N_PE.
module pe_ring
  import phmm_pkg::*;
#(
  parameter int unsigned N_PE    = 8,
  parameter int unsigned ADD_LAT = 7,
  parameter int unsigned MUL_LAT = 5,
  parameter int unsigned H_MAX   = 302,
  parameter int unsigned R_MAX   = 302
) (
  input  logic              clk,
  input  logic              rst_n,
  // input memory write port
  input  logic              wr_hap_en,
  input  logic              wr_read_en,
  input  logic [SLOT_W-1:0] wr_slot,
  input  logic [LEN_W-1:0]  wr_addr,
  input  base_t             wr_hbase,
  input  read_desc_t        wr_desc,
  // job start
  input  logic              start_valid,
  output logic              start_ready,
  input  logic [SLOT_W-1:0] start_slot,
  input  logic [LEN_W-1:0]  start_hlen,
  input  logic [LEN_W-1:0]  start_rlen,
  input  logic [TAG_W-1:0]  start_tag,
  output logic [ADD_LAT+MUL_LAT-1:0] busy,
  // results
  output logic              res_valid,
  output logic [SLOT_W-1:0] res_slot,
  output logic [TAG_W-1:0]  res_tag,
  output fp32_t             res_value
);
  localparam int unsigned NSLOT = ADD_LAT + MUL_LAT;

  logic [SLOT_W-1:0] slot;
  logic [LEN_W-1:0]  rd_hap_addr, rd_read_addr;
  base_t             rd_hbase;
  read_desc_t        rd_desc;
  ring_tok_t         tok  [N_PE + 1];   // tok[k] enters PE k
  fvec_t             f    [N_PE];
  fvec_t             buf_rd;
  logic              sum_valid;
  logic [SLOT_W-1:0] sum_slot;
  fp32_t             sum_value;
  logic              fin_valid;
  fvec_t             fin_f;

  ring_input_mem #(.NSLOT(NSLOT), .H_MAX(H_MAX), .R_MAX(R_MAX)) u_mem (
    .clk, .wr_hap_en, .wr_read_en, .wr_slot, .wr_addr, .wr_hbase, .wr_desc,
    .rd_slot(slot), .rd_hap_addr, .rd_read_addr, .rd_hbase, .rd_desc);

  ring_ctrl #(.N_PE(N_PE), .ADD_LAT(ADD_LAT), .MUL_LAT(MUL_LAT), .H_MAX(H_MAX), .R_MAX(R_MAX)) u_ctrl (
    .clk, .rst_n, .start_valid, .start_ready, .start_slot, .start_hlen, .start_rlen, .start_tag,
    .busy, .rd_hap_addr, .rd_read_addr, .rd_hbase, .rd_desc, .slot, .tok(tok[0]),
    .sum_valid, .sum_slot, .sum_value, .res_valid, .res_slot, .res_tag, .res_value);

  for (genvar k = 0; k < int'(N_PE); k++) begin : g_pe
    phmm_pe #(.IDX(k), .ADD_LAT(ADD_LAT), .MUL_LAT(MUL_LAT)) u_pe (
      .clk, .rst_n, .slot,
      .tok_in (tok[k]),
      .up_f   ((k == 0) ? buf_rd : f[(k == 0) ? 0 : k - 1]),
      .f_out  (f[k]),
      .tok_out(tok[k+1]));
  end

  // the last PE's results of every pass but the read's last feed the next pass
  internal_buffer #(.NSLOT(NSLOT), .H_MAX(H_MAX), .N_PE(N_PE)) u_buf (
    .clk,
    .wr_en  (tok[N_PE].active && tok[N_PE].col != '0 && !tok[N_PE].last_pass),
    .wr_slot(slot),
    .wr_col (tok[N_PE].col),
    .wr_data(f[N_PE-1]),
    .rd_slot(slot),
    .rd_col (tok[0].col),
    .rd_data(buf_rd));

  // the PE holding the read's last row hands over the last column's cell
  always_comb begin
    fin_valid = 1'b0;
    fin_f     = f[0];
    for (int k = 0; k < int'(N_PE); k++)
      if (tok[k+1].active && tok[k+1].last_col && tok[k+1].last_pass &&
          tok[k+1].last_pe == PEI_W'(k)) begin
        fin_valid = 1'b1;
        fin_f     = f[k];
      end
  end

  result_sum #(.ADD_LAT(ADD_LAT)) u_sum (
    .clk, .rst_n, .in_valid(fin_valid), .in_slot(slot), .in_f(fin_f),
    .out_valid(sum_valid), .out_slot(sum_slot), .out_value(sum_value));
endmodule
