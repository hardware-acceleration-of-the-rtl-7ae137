// tb_workloads: runs batches of read/haplotype pairs shaped like the three
// benchmark sets the accelerator was evaluated on, through the top at its
// default configuration (8 rings x 8 PEs, 12 slots per ring).
//   set 0 "tiny": 332 pairs, lengths 10..41 (run in full)
//   set 1 "10s" : 3550 pairs, lengths 10..263 (run in full)
//   set 2 "1m"  : lengths 10..302; 29307 pairs in the benchmark, of which a
//                 sample of NJOB_1M is run here to keep the simulation short
// The benchmark data are not reproduced here, so the pairs are synthetic: the
// haplotype length is uniform over the set's range, the read is the
// haplotype with about 2% substitutions and a length within 3 bases of it
// (so that the global-alignment likelihood stays in single-precision range),
// and the quality-derived probabilities are random.
// A dispatcher hands each pair to any free (ring, slot), loading it through
// the single write port while the other slots compute, exactly as a host
// would. Every likelihood is checked against the double-precision reference.
// The total cycle count of each set is checked against a bound derived from
// the schedule: a ring advances one step of one slot per cycle, so the work
// of a set needs at least sum(steps)/NUM_RINGS cycles, and the shared write
// port needs sum(hlen+rlen+1) cycles; the run must finish within 1.3x the
// larger of the two plus the longest single job. The cycle counts and the
// implied runtime at 200 MHz are printed.
module tb_workloads;
  import phmm_pkg::*;
  import tb_fp_pkg::*;

  localparam int NRING = 8, NPE = 8, ADD_LAT = 7, L = 12;
  localparam int NJOB_1M = 600;
  localparam int MAXJ = 4600;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              wr_hap_en, wr_read_en, start_valid, start_ready;
  logic [2:0]        wr_ring, start_ring;
  logic [SLOT_W-1:0] wr_slot, start_slot;
  logic [LEN_W-1:0]  wr_addr, start_hlen, start_rlen;
  base_t             wr_hbase;
  read_desc_t        wr_desc;
  logic [TAG_W-1:0]  start_tag;
  logic [L-1:0]      busy      [NRING];
  logic              res_valid [NRING];
  logic [SLOT_W-1:0] res_slot  [NRING];
  logic [TAG_W-1:0]  res_tag   [NRING];
  fp32_t             res_value [NRING];

  phmm_accel dut (.*);

  real    expv [MAXJ];
  int     hl [MAXJ], rl [MAXJ];
  bit     inflight [NRING][L];
  longint cyc = 0;
  int     checks = 0, failures = 0, ndone = 0, n_zero = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // Steps a job occupies its slot: preload pass plus the row passes.
  function automatic longint job_steps(input int h, input int r);
    int p, w;
    p = (r + NPE - 1) / NPE;
    w = (h + 1 > NPE) ? h + 1 : NPE;
    return longint'(NPE + (p - 1) * w + h + 1);
  endfunction

  always @(posedge clk) if (rst_n) begin
    for (int g = 0; g < NRING; g++) if (res_valid[g]) begin
      int  j;
      real got;
      j = int'(res_tag[g]);
      got = fp_to_real(res_value[g]);
      checks++;
      if (!rel_close(got, expv[j], 1e-4)) begin
        failures++;
        $display("pair %0d (%0dx%0d): got %g expected %g", j, hl[j], rl[j], got, expv[j]);
      end
      if (got == 0.0) n_zero++;
      inflight[g][res_slot[g]] = 1'b0;
      ndone++;
    end
  end

  task automatic dispatch(input int j, input int g, input int s);
    base_t      hap[];
    read_desc_t rd[];
    int h, r;
    h = hl[j]; r = rl[j];
    hap = new[h]; rd = new[r];
    for (int c = 0; c < h; c++) hap[c] = base_t'($urandom);
    for (int k = 0; k < r; k++) begin
      rd[k] = rand_desc();
      if (k < h && ($urandom % 50 != 0)) rd[k].base = hap[k];
    end
    expv[j] = forward(h, r, hap, rd);
    inflight[g][s] = 1'b1;
    for (int c = 0; c < h; c++) begin
      @(negedge clk);
      wr_hap_en = 1; wr_read_en = 0; wr_ring = 3'(g); wr_slot = SLOT_W'(s);
      wr_addr = LEN_W'(c); wr_hbase = hap[c];
    end
    for (int k = 0; k < r; k++) begin
      @(negedge clk);
      wr_hap_en = 0; wr_read_en = 1; wr_ring = 3'(g); wr_slot = SLOT_W'(s);
      wr_addr = LEN_W'(k); wr_desc = rd[k];
    end
    @(negedge clk);
    wr_hap_en = 0; wr_read_en = 0;
    start_valid = 1; start_ring = 3'(g); start_slot = SLOT_W'(s);
    start_hlen = LEN_W'(h); start_rlen = LEN_W'(r); start_tag = TAG_W'(j);
    @(posedge clk);
    checks++;
    if (!start_ready) begin failures++; $display("ring %0d slot %0d not ready", g, s); end
    @(negedge clk);
    start_valid = 0;
  endtask

  task automatic run_set(input int set, input int first, input int n, input int lo,
                         input int hi, output int next);
    longint t0, steps, load, bound, longest, took;
    int rr;
    steps = 0; load = 0; longest = 0; rr = 0;
    for (int j = first; j < first + n; j++) begin
      int h, r;
      h = lo + int'($urandom % (hi - lo + 1));
      r = h - 3 + int'($urandom % 7);
      if (r < lo) r = lo;
      if (r > hi) r = hi;
      hl[j] = h; rl[j] = r;
      steps += job_steps(h, r);
      load += longint'(h + r + 1);
      if (job_steps(h, r) > longest) longest = job_steps(h, r);
    end
    bound = steps / NRING;
    if (load > bound) bound = load;
    bound = (bound * 13) / 10 + longest * L + 100;
    @(negedge clk);
    t0 = cyc;
    for (int j = first; j < first + n; j++) begin
      int g, s;
      bit found;
      found = 0;
      while (!found) begin
        // look for a free slot, starting after the ring used last
        for (int i = 0; i < NRING * L && !found; i++) begin
          g = (rr + i) % NRING;
          s = ((rr + i) / NRING) % L;
          if (!inflight[g][s] && !busy[g][s]) found = 1;
        end
        if (!found) @(negedge clk);
      end
      rr = g + 1;
      dispatch(j, g, s);
    end
    while (ndone < first + n) @(negedge clk);
    took = cyc - t0;
    checks++;
    if (took > bound) begin
      failures++;
      $display("set %0d took %0d cycles, bound %0d", set, took, bound);
    end
    $display("set %0d: %0d pairs, lengths %0d..%0d, %0d cycles (%0.3f ms at 200 MHz); ring work %0d, load port %0d cycles",
             set, n, lo, hi, took, real'(took) / 200.0e3, steps / NRING, load);
    next = first + n;
  endtask

  initial begin
    int nx;
    wr_hap_en = 0; wr_read_en = 0; start_valid = 0; wr_ring = '0; wr_slot = '0; wr_addr = '0;
    wr_hbase = '0; wr_desc = '0; start_ring = '0; start_slot = '0; start_hlen = '0;
    start_rlen = '0; start_tag = '0;
    for (int g = 0; g < NRING; g++) for (int s = 0; s < L; s++) inflight[g][s] = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_set(0, 0, 332, 10, 41, nx);
    run_set(1, nx, 3550, 10, 263, nx);
    run_set(2, nx, NJOB_1M, 10, 302, nx);
    checks++;
    if (n_zero != 0) begin
      failures++;
      $display("%0d likelihoods underflowed to zero", n_zero);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
