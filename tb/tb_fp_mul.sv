// tb_fp_mul: self-checking testbench of fp_mul. Feeds a new operand pair
// every cycle (random normal numbers over a wide exponent range, plus zeros,
// cancellations and signs) and compares each result, exactly LAT cycles later,
// with the double-precision result rounded to single precision. A result may
// differ from the reference by at most one unit in the last place.
module tb_fp_mul;
  import tb_fp_pkg::*;
  localparam int unsigned LAT = 5;
  localparam int NOPS = 4000;

  logic        clk = 1'b0;
  logic [31:0] a, b, y;
  logic [31:0] expq [NOPS];
  int checks = 0, failures = 0;

  fp_mul #(.LAT(LAT)) dut (.clk(clk), .a(a), .b(b), .y(y));

  always #5 clk = ~clk;

  function automatic logic [31:0] rnd_fp(input int emin, input int espan);
    logic [31:0] f;
    f[31]    = 1'($urandom);
    f[30:23] = 8'(emin + int'($urandom % espan));
    f[22:0]  = 23'($urandom);
    return f;
  endfunction

  initial begin
    a = '0; b = '0;
    for (int t = 0; t < NOPS + LAT; t++) begin
      @(negedge clk);
      if (t >= LAT) begin
        checks++;
        if (!fp_close(y, expq[t-LAT])) begin
          failures++;
          if (failures < 10) $display("mismatch op %0d: got %h exp %h", t-LAT, y, expq[t-LAT]);
        end
      end
      if (t < NOPS) begin
        case (t % 8)
          0: begin a = rnd_fp(100, 40); b = 32'h0; end
          1: begin a = rnd_fp(100, 40); b = {~a[31], a[30:0]}; end
          2: begin a = rnd_fp(120, 8); b = rnd_fp(120, 8); b[31] = ~a[31]; end
          default: begin a = rnd_fp(60, 120); b = rnd_fp(60, 120); end
        endcase
        expq[t] = real_to_fp(fp_to_real(a) * fp_to_real(b));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NOPS + LAT + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
