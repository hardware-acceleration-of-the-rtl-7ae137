// tb_phmm_pe: self-checking testbench of phmm_pe. Two PEs, index 0 and
// index 1, receive the same stream of control words. Every one of the L
// slots carries its own random row (read base, priors, transition
// probabilities) and its own random haplotype. PE 1 is given random upstream
// values as if a previous row had produced them; PE 0 runs on the first pass,
// so its upstream is the row-0 border. Every cell result is compared, exactly
// one step (L cycles) after its column was issued, with the recursion of the
// forward algorithm evaluated in double precision.
module tb_phmm_pe;
  import phmm_pkg::*;
  import tb_fp_pkg::*;

  localparam int unsigned ADD_LAT = 7;
  localparam int unsigned MUL_LAT = 5;
  localparam int unsigned L = ADD_LAT + MUL_LAT;
  localparam int H = 20;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [SLOT_W-1:0] slot;
  ring_tok_t tok;
  fvec_t up0, up1, f0, f1;
  ring_tok_t to0, to1;

  phmm_pe #(.IDX(0), .ADD_LAT(ADD_LAT), .MUL_LAT(MUL_LAT)) dut0
    (.clk(clk), .rst_n(1'b1), .slot(slot), .tok_in(tok), .up_f(up0), .f_out(f0), .tok_out(to0));
  phmm_pe #(.IDX(1), .ADD_LAT(ADD_LAT), .MUL_LAT(MUL_LAT)) dut1
    (.clk(clk), .rst_n(1'b1), .slot(slot), .tok_in(tok), .up_f(up1), .f_out(f1), .tok_out(to1));

  read_desc_t dsc [2][L];
  base_t      hap [L][H+1];
  real        um [L][H+1], ui [L][H+1], ud [L][H+1];   // upstream row of PE 1
  real        rm [2][L][H+1], ri [2][L][H+1], rd [2][L][H+1];
  int checks = 0, failures = 0;

  function automatic real rq(input real lo, input real hi);
    return lo + (hi - lo) * real'($urandom % 10000) / 10000.0;
  endfunction

  function automatic read_desc_t mk_desc();
    read_desc_t d;
    real qb, qi, qd, qg;
    qb = rq(1e-3, 3e-2); qi = rq(1e-4, 1e-2); qd = rq(1e-4, 1e-2); qg = rq(0.05, 0.2);
    d.base = base_t'($urandom);
    d.prior_match = real_to_fp(1.0 - qb);
    d.prior_mismatch = real_to_fp(qb);
    d.a_mm = real_to_fp(1.0 - (qi + qd));
    d.a_dm = real_to_fp(1.0 - qg);
    d.a_mi = real_to_fp(qi);
    d.a_ii = real_to_fp(qg);
    d.a_md = real_to_fp(qd);
    d.a_dd = real_to_fp(qg);
    return d;
  endfunction

  task automatic reference();
    for (int p = 0; p < 2; p++)
      for (int s = 0; s < L; s++) begin
        real pm, pu_m, pu_i, pu_d, prior;
        rm[p][s][0] = 0.0; ri[p][s][0] = 0.0; rd[p][s][0] = 0.0;
        for (int c = 1; c <= H; c++) begin
          real upm_prev, upi_prev, upd_prev, upm, upd;
          if (p == 0) begin
            upm_prev = (c == 1) ? 1.0 : 0.0; upi_prev = 0.0; upd_prev = 0.0;
            upm = 0.0; upd = 0.0;
          end else begin
            upm_prev = (c == 1) ? 0.0 : um[s][c-1];
            upi_prev = (c == 1) ? 0.0 : ui[s][c-1];
            upd_prev = (c == 1) ? 0.0 : ud[s][c-1];
            upm = um[s][c]; upd = ud[s][c];
          end
          prior = (hap[s][c] == dsc[p][s].base) ? fp_to_real(dsc[p][s].prior_match)
                                                : fp_to_real(dsc[p][s].prior_mismatch);
          rm[p][s][c] = prior * (fp_to_real(dsc[p][s].a_mm) * upm_prev +
                                 fp_to_real(dsc[p][s].a_dm) * (upi_prev + upd_prev));
          ri[p][s][c] = fp_to_real(dsc[p][s].a_mi) * rm[p][s][c-1] +
                        fp_to_real(dsc[p][s].a_ii) * ri[p][s][c-1];
          rd[p][s][c] = fp_to_real(dsc[p][s].a_md) * upm + fp_to_real(dsc[p][s].a_dd) * upd;
        end
      end
  endtask

  task automatic check(input int p, input int s, input int c, input fvec_t f);
    checks += 3;
    if (!rel_close(fp_to_real(f.m), rm[p][s][c], 1e-5)) begin
      failures++; if (failures < 10) $display("PE%0d slot %0d col %0d M got %g exp %g", p, s, c, fp_to_real(f.m), rm[p][s][c]);
    end
    if (!rel_close(fp_to_real(f.i), ri[p][s][c], 1e-5)) begin
      failures++; if (failures < 10) $display("PE%0d slot %0d col %0d I got %g exp %g", p, s, c, fp_to_real(f.i), ri[p][s][c]);
    end
    if (!rel_close(fp_to_real(f.d), rd[p][s][c], 1e-5)) begin
      failures++; if (failures < 10) $display("PE%0d slot %0d col %0d D got %g exp %g", p, s, c, fp_to_real(f.d), rd[p][s][c]);
    end
  endtask

  initial begin
    for (int s = 0; s < L; s++) begin
      dsc[0][s] = mk_desc(); dsc[1][s] = mk_desc();
      for (int c = 0; c <= H; c++) begin
        hap[s][c] = base_t'($urandom);
        if (c % 3 == 0) hap[s][c] = dsc[c % 2][s].base;
        um[s][c] = fp_to_real(real_to_fp(rq(0.0, 1e-3)));
        ui[s][c] = fp_to_real(real_to_fp(rq(0.0, 1e-3)));
        ud[s][c] = fp_to_real(real_to_fp(rq(0.0, 1e-3)));
      end
    end
    reference();
    tok = '0; slot = '0; up0 = '0; up1 = '0;
    // steps 0 and 1 deliver the descriptors, steps 2 .. H+2 run columns 0 .. H;
    // one more step collects the last results
    for (int step = 0; step < H + 4; step++)
      for (int s = 0; s < int'(L); s++) begin
        @(negedge clk);
        // results of the previous step of this slot
        if (step >= 3 && step - 3 >= 1 && step - 3 <= H) begin
          check(0, s, step - 3, f0);
          check(1, s, step - 3, f1);
        end
        slot = SLOT_W'(s);
        tok = '0;
        if (step < 2) begin
          tok.desc_valid = 1'b1;
          tok.desc_pe = PEI_W'(step);
          tok.desc = dsc[step][s];
        end else if (step - 2 <= H) begin
          int c;
          c = step - 2;
          tok.active = 1'b1;
          tok.col = LEN_W'(c);
          tok.last_col = (c == H);
          tok.hbase = hap[s][c];
          tok.first_pass = 1'b1;
          tok.last_pass = 1'b1;
          tok.last_pe = PEI_W'(1);
          up1.m = real_to_fp(um[s][c]); up1.i = real_to_fp(ui[s][c]); up1.d = real_to_fp(ud[s][c]);
          up0 = '{m: 32'h1234_5678, i: 32'h1234_5678, d: 32'h1234_5678}; // must be ignored
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((H + 10) * L) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
