// tb_result_sum: self-checking testbench of result_sum. Random triples of
// forward variables (in the range the algorithm produces, including zeros)
// arrive on random cycles with random slot numbers; every output strobe must
// come exactly 2*ADD_LAT cycles after its input, with the same slot and with
// f^M + f^I + f^D equal to the double-precision sum within 1e-6, and no
// strobe may appear without an input.
module tb_result_sum;
  import phmm_pkg::*;
  import tb_fp_pkg::*;

  localparam int unsigned ADD_LAT = 7;
  localparam int unsigned LAT = 2 * ADD_LAT;
  localparam int NCYC = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              in_valid, out_valid;
  logic [SLOT_W-1:0] in_slot, out_slot;
  fvec_t             in_f;
  fp32_t             out_value;

  result_sum #(.ADD_LAT(ADD_LAT)) dut (.*);

  bit  ev [NCYC];
  int  es [NCYC];
  real ex [NCYC];
  int checks = 0, failures = 0, nres = 0;

  initial begin
    in_valid = 0; in_slot = '0; in_f = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < NCYC + int'(LAT); t++) begin
      @(negedge clk);
      if (t >= int'(LAT)) begin
        checks++;
        if (out_valid != ev[t-LAT]) begin
          failures++; $display("cycle %0d: valid %0d exp %0d", t, out_valid, ev[t-LAT]);
        end else if (out_valid) begin
          nres++;
          if (int'(out_slot) != es[t-LAT] || !rel_close(fp_to_real(out_value), ex[t-LAT], 1e-6)) begin
            failures++;
            $display("cycle %0d: slot %0d value %g, exp %0d %g", t, out_slot, fp_to_real(out_value),
                     es[t-LAT], ex[t-LAT]);
          end
        end
      end
      if (t < NCYC) begin
        in_valid = ($urandom % 3 == 0);
        in_slot  = SLOT_W'($urandom % 12);
        in_f.m = real_to_fp(rq(0.0, 1e-3) * ((t % 7 == 0) ? 0.0 : 1.0));
        in_f.i = real_to_fp(rq(0.0, 1e-4));
        in_f.d = real_to_fp(rq(0.0, 1e-5));
        ev[t] = in_valid; es[t] = int'(in_slot);
        ex[t] = fp_to_real(in_f.m) + fp_to_real(in_f.i) + fp_to_real(in_f.d);
      end
    end
    checks++;
    if (nres == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
