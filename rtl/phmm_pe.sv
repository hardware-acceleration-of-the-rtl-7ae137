// phmm_pe: one processing element of a PE ring. A PE owns one row of the
// forward-algorithm matrices (one read base) and moves along the haplotype
// one column per step, computing f^M, f^I and f^D of one cell per step:
//
//   t^a(c)   = a_dm * (f^I(c-1,r-1) + f^D(c-1,r-1))
//   t^b(c)   = a_mm *  f^M(c-1,r-1)
//   f^M(c,r) = prior(c,r) * (t^a(c) + t^b(c))
//   f^I(c,r) = a_mi * f^M(c-1,r) + a_ii * f^I(c-1,r)
//   f^D(c,r) = a_md * f^M(c,r-1) + a_dd * f^D(c,r-1)
//
// The t terms are started one step early from the upstream PE's previous
// result, so that every path is one adder plus one multiplier deep
// (7 + 5 = 12 cycles by default): 7 multipliers and 4 adders per PE. A step
// is therefore L = ADD_LAT + MUL_LAT cycles, and the pipelines are filled
// with L independent matrices ("slots"), one per cycle in turn; slot s owns
// the cycles whose count is s modulo L. Per slot the PE keeps its active row
// descriptor and the descriptor for its next row.
//
// Interface, all per cycle of the current slot (rst_n only clears the
// control words in flight):
//   tok_in  control word for this PE (see phmm_pkg::ring_tok_t)
//   up_f    upstream PE's result of the previous step: cell (col, r-1)
//   f_out   this PE's result of the previous step (cell col-1 of its row)
//   tok_out tok_in delayed by one step (L cycles), for the downstream PE
// Boundary values (Eq. 3.1: only f^M(0,0) = 1, every other border value 0)
// are substituted here: column 0 and, for PE 0 on the first pass, row 0.
// Transition probabilities are those of the destination row, computed by the
// host. The arithmetic split follows the optimised PE of the source thesis;
// placing the t stage at the consuming PE's input (fed by the upstream
// result register) instead of inside the upstream PE is this design's choice
// and computes the same values on the same cycles.
module phmm_pe
  import phmm_pkg::*;
#(
  parameter int unsigned IDX     = 0,
  parameter int unsigned ADD_LAT = 7,
  parameter int unsigned MUL_LAT = 5
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [SLOT_W-1:0] slot,
  input  ring_tok_t         tok_in,
  input  fvec_t             up_f,
  output fvec_t             f_out,
  output ring_tok_t         tok_out
);
  localparam int unsigned L    = ADD_LAT + MUL_LAT;
  localparam int unsigned SI_W = (L > 1) ? $clog2(L) : 1;

  logic [SI_W-1:0] si;   // slot as an index of the per-slot arrays
  assign si = SI_W'(slot);

  read_desc_t desc_next [L];
  read_desc_t desc_act  [L];
  read_desc_t coef;
  fvec_t      up_eff, own_eff;
  fp32_t      prior, prior_d, a_dm_d;
  logic       up_row0;

  always_ff @(posedge clk) begin
    if (tok_in.desc_valid && tok_in.desc_pe == PEI_W'(IDX))
      desc_next[si] <= tok_in.desc;
    if (tok_in.active && tok_in.col == '0)
      desc_act[si] <= desc_next[si];
  end

  always_comb begin
    coef    = (tok_in.col == '0) ? desc_next[si] : desc_act[si];
    up_row0 = tok_in.first_pass && (IDX == 0);
    if (tok_in.col == '0)
      up_eff = up_row0 ? '{m: FP_ONE, i: FP_ZERO, d: FP_ZERO} : '0;
    else
      up_eff = up_row0 ? '0 : up_f;
    own_eff = (tok_in.col == LEN_W'(1)) ? '0 : f_out;
    prior   = (tok_in.hbase == coef.base) ? coef.prior_match : coef.prior_mismatch;
  end

  // t^a and t^b for the next column
  fp32_t ta_sum, ta, tb_p, tb;
  delay_line #(.WIDTH(32), .DEPTH(ADD_LAT)) u_dm_d (.clk(clk), .d(coef.a_dm), .q(a_dm_d));
  fp_add #(.LAT(ADD_LAT)) u_ta_add (.clk(clk), .a(up_eff.i), .b(up_eff.d), .y(ta_sum));
  fp_mul #(.LAT(MUL_LAT)) u_ta_mul (.clk(clk), .a(ta_sum), .b(a_dm_d), .y(ta));
  fp_mul #(.LAT(MUL_LAT)) u_tb_mul (.clk(clk), .a(up_eff.m), .b(coef.a_mm), .y(tb_p));
  delay_line #(.WIDTH(32), .DEPTH(ADD_LAT)) u_tb_d (.clk(clk), .d(tb_p), .q(tb));

  // f^M
  fp32_t m_sum, m_res;
  delay_line #(.WIDTH(32), .DEPTH(ADD_LAT)) u_pr_d (.clk(clk), .d(prior), .q(prior_d));
  fp_add #(.LAT(ADD_LAT)) u_m_add (.clk(clk), .a(ta), .b(tb), .y(m_sum));
  fp_mul #(.LAT(MUL_LAT)) u_m_mul (.clk(clk), .a(m_sum), .b(prior_d), .y(m_res));

  // f^I
  fp32_t i_p1, i_p2, i_res;
  fp_mul #(.LAT(MUL_LAT)) u_i_mul1 (.clk(clk), .a(coef.a_mi), .b(own_eff.m), .y(i_p1));
  fp_mul #(.LAT(MUL_LAT)) u_i_mul2 (.clk(clk), .a(coef.a_ii), .b(own_eff.i), .y(i_p2));
  fp_add #(.LAT(ADD_LAT)) u_i_add  (.clk(clk), .a(i_p1), .b(i_p2), .y(i_res));

  // f^D
  fp32_t d_p1, d_p2, d_res;
  fp_mul #(.LAT(MUL_LAT)) u_d_mul1 (.clk(clk), .a(coef.a_md), .b(up_eff.m), .y(d_p1));
  fp_mul #(.LAT(MUL_LAT)) u_d_mul2 (.clk(clk), .a(coef.a_dd), .b(up_eff.d), .y(d_p2));
  fp_add #(.LAT(ADD_LAT)) u_d_add  (.clk(clk), .a(d_p1), .b(d_p2), .y(d_res));

  assign f_out = '{m: m_res, i: i_res, d: d_res};

  delay_line_r #(.WIDTH($bits(ring_tok_t)), .DEPTH(L)) u_tok_d
    (.clk(clk), .rst_n(rst_n), .d(tok_in), .q(tok_out));
endmodule
