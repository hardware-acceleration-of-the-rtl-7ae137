// fp_add: fully pipelined IEEE-754 single-precision adder, y = a + b, with a
// latency of LAT cycles (default 7, the adder latency of the floating-point
// cores the accelerator was built around at 200 MHz) and one new operation
// accepted every cycle.
//
// The operands are ordered by magnitude, the smaller one is aligned with a
// sticky bit, the sum or difference is normalised and rounded to nearest-even
// in the first stage; the other LAT-1 register stages only carry the result so
// that a retiming synthesis tool can spread the logic. Subnormal inputs are
// read as zero and results below the normal range are flushed to zero; an
// exact cancellation gives +0; infinities and NaN follow IEEE-754 (inf - inf
// and NaN give 0x7fc00000). Rounding and subnormal handling are this design's
// choices; the latency is the one quoted for the original cores.
module fp_add
  import phmm_pkg::*;
#(
  parameter int unsigned LAT = 7
) (
  input  logic  clk,
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);
  fp32_t r;

  always_comb begin
    fp32_t       x, z;           // |x| >= |z|
    logic [7:0]  ex, ez, d8;
    logic [50:0] mx, mz, sum;    // carry, hidden bit, 23 fraction bits, 26 extra
    logic [23:0] mant;
    logic        guard, sticky, sub;
    logic signed [10:0] ey;
    int unsigned lz;
    logic xnan, znan, xinf, zinf;
    logic lost;

    if (a[30:0] >= b[30:0]) begin x = a; z = b; end
    else                    begin x = b; z = a; end
    ex = x[30:23];
    ez = z[30:23];
    xnan = (ex == 8'hff) && (x[22:0] != 23'd0);
    znan = (ez == 8'hff) && (z[22:0] != 23'd0);
    xinf = (ex == 8'hff) && (x[22:0] == 23'd0);
    zinf = (ez == 8'hff) && (z[22:0] == 23'd0);
    sub  = x[31] ^ z[31];
    lost = 1'b0;

    mx = (ex == 8'd0) ? 51'd0 : {2'b01, x[22:0], 26'd0};
    mz = (ez == 8'd0) ? 51'd0 : {2'b01, z[22:0], 26'd0};
    d8 = (ez == 8'd0) ? 8'd0 : ex - ez;
    if (d8 >= 8'd51) begin
      mz = {50'd0, |mz};
    end else if (d8 != 8'd0) begin
      lost = 1'b0;
      for (int unsigned k = 0; k < 51; k++)
        if (k < 32'(d8) && mz[k]) lost = 1'b1;
      mz = (mz >> d8) | {50'd0, lost};
    end
    sum = sub ? (mx - mz) : (mx + mz);

    ey = 11'(signed'({3'b0, ex}));
    lz = 0;
    if (sum[50]) begin
      sum = (sum >> 1) | {50'd0, sum[0]};
      ey  = ey + 11'sd1;
    end else begin
      for (int k = 49; k >= 0; k--) begin
        if (sum[k]) break;
        lz++;
      end
      if (lz <= 49) begin
        sum = sum << lz;
        ey  = ey - 11'(lz);
      end
    end
    mant   = {1'b0, sum[48:26]};
    guard  = sum[25];
    sticky = |sum[24:0];
    if (guard && (sticky || mant[0])) mant = mant + 24'd1;
    if (mant[23]) begin
      mant = 24'd0;
      ey   = ey + 11'sd1;
    end

    if (xnan || znan || (xinf && zinf && sub)) r = 32'h7fc0_0000;
    else if (xinf)                              r = {x[31], 8'hff, 23'd0};
    else if (sum == 51'd0)                      r = 32'd0;
    else if (ex == 8'd0)                        r = 32'd0;
    else if (ey >= 11'sd255)                    r = {x[31], 8'hff, 23'd0};
    else if (ey <= 11'sd0)                      r = 32'd0;
    else                                        r = {x[31], ey[7:0], mant[22:0]};
  end

  delay_line #(.WIDTH(32), .DEPTH(LAT)) u_pipe (.clk(clk), .d(r), .q(y));
endmodule
