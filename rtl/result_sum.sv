// result_sum: termination step of the forward algorithm. When the PE that
// holds the read's last row finishes the haplotype's last column, the ring
// hands its three forward variables here and the likelihood
// Result = f^M + f^I + f^D is formed as (f^M + f^I) + f^D with two pipelined
// single-precision adders. The slot number travels alongside.
// Latency 2*ADD_LAT cycles, one new input per cycle.
module result_sum
  import phmm_pkg::*;
#(
  parameter int unsigned ADD_LAT = 7
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [SLOT_W-1:0] in_slot,
  input  fvec_t             in_f,
  output logic              out_valid,
  output logic [SLOT_W-1:0] out_slot,
  output fp32_t             out_value
);
  fp32_t mi, d_d;
  fp_add #(.LAT(ADD_LAT)) u_add1 (.clk(clk), .a(in_f.m), .b(in_f.i), .y(mi));
  delay_line #(.WIDTH(32), .DEPTH(ADD_LAT)) u_d_d (.clk(clk), .d(in_f.d), .q(d_d));
  fp_add #(.LAT(ADD_LAT)) u_add2 (.clk(clk), .a(mi), .b(d_d), .y(out_value));
  delay_line_r #(.WIDTH(1 + SLOT_W), .DEPTH(2 * ADD_LAT)) u_v_d
    (.clk(clk), .rst_n(rst_n), .d({in_valid, in_slot}), .q({out_valid, out_slot}));
endmodule
