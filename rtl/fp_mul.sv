// fp_mul: fully pipelined IEEE-754 single-precision multiplier, y = a * b,
// with a latency of LAT cycles (default 5, the multiplier latency of the
// floating-point cores the accelerator was built around at 200 MHz) and one
// new operation accepted every cycle.
//
// The product is formed and rounded to nearest-even in the first stage; the
// remaining LAT-1 register stages only carry the result so that a retiming
// synthesis tool can spread the logic. Subnormal inputs are read as zero and
// results below the normal range are flushed to zero (the probabilities of the
// forward algorithm stay far above it); overflow gives infinity, and NaN or
// infinity times zero gives the quiet NaN 0x7fc00000. The rounding and
// subnormal handling are this design's choices; the latency is the one quoted
// for the original cores.
module fp_mul
  import phmm_pkg::*;
#(
  parameter int unsigned LAT = 5
) (
  input  logic  clk,
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);
  fp32_t r;

  always_comb begin
    logic        sa, sb, sy;
    logic [7:0]  ea, eb;
    logic [22:0] fa, fb;
    logic [47:0] prod;
    logic [23:0] mant;
    logic        guard, sticky;
    logic signed [10:0] ey;
    logic za, zb, ia, ib, na, nb;

    sa = a[31]; ea = a[30:23]; fa = a[22:0];
    sb = b[31]; eb = b[30:23]; fb = b[22:0];
    sy = sa ^ sb;
    za = (ea == 8'd0);
    zb = (eb == 8'd0);
    ia = (ea == 8'hff) && (fa == 23'd0);
    ib = (eb == 8'hff) && (fb == 23'd0);
    na = (ea == 8'hff) && (fa != 23'd0);
    nb = (eb == 8'hff) && (fb != 23'd0);

    prod   = {1'b1, fa} * {1'b1, fb};
    ey     = 11'(signed'({3'b0, ea})) + 11'(signed'({3'b0, eb})) - 11'sd127;
    if (prod[47]) begin
      mant   = {1'b0, prod[46:24]};
      guard  = prod[23];
      sticky = |prod[22:0];
      ey     = ey + 11'sd1;
    end else begin
      mant   = {1'b0, prod[45:23]};
      guard  = prod[22];
      sticky = |prod[21:0];
    end
    if (guard && (sticky || mant[0])) mant = mant + 24'd1;
    if (mant[23]) begin
      mant = 24'd0;
      ey   = ey + 11'sd1;
    end

    if (na || nb || (ia && zb) || (ib && za)) r = 32'h7fc0_0000;
    else if (ia || ib)                        r = {sy, 8'hff, 23'd0};
    else if (za || zb)                        r = {sy, 31'd0};
    else if (ey >= 11'sd255)                  r = {sy, 8'hff, 23'd0};
    else if (ey <= 11'sd0)                    r = {sy, 31'd0};
    else                                      r = {sy, ey[7:0], mant[22:0]};
  end

  delay_line #(.WIDTH(32), .DEPTH(LAT)) u_pipe (.clk(clk), .d(r), .q(y));
endmodule
