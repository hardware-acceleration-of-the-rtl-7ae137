// tb_phmm_accel: end-to-end testbench of the accelerator at its default
// configuration (8 rings of 8 PEs, 12 slots per ring, sequences up to 302
// bases). 48 read/haplotype jobs are spread over all rings and many slots
// and run concurrently: one of the largest size the design takes (302 x 302),
// lengths drawn from the 10..64 range of short test sets, haplotypes shorter
// than the ring (internal buffer bypassed), reads shorter than the ring
// (idle PEs), and jobs that reuse a slot once it is free. Every likelihood is
// compared with a double-precision forward algorithm (relative error below
// 1e-4) and every job's latency with the ring schedule. Reads are the
// haplotype with about 2% base substitutions and a length that differs by at
// most a few bases (or by a set amount in the special cases), so that the
// global-alignment likelihood stays inside the single-precision range. The run counts how
// often each mechanism occurred and fails if one never did.
module tb_phmm_accel;
  import phmm_pkg::*;
  import tb_fp_pkg::*;

  localparam int NRING = 8, NPE = 8, ADD_LAT = 7, L = 12;
  localparam int NJOB = 48;

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

  int  hl [NJOB], rl [NJOB], jring [NJOB], jslot [NJOB];
  real expv [NJOB];
  longint t_start [NJOB];
  longint cyc = 0;
  int checks = 0, failures = 0, ndone = 0;
  int n_multi = 0, n_partial = 0, n_bypass = 0, n_idle = 0, n_reuse = 0;
  int max_slots = 0, max_rings = 0;
  bit used [NRING][L];

  always @(posedge clk) cyc <= cyc + 1;

  function automatic longint exp_latency(input int h, input int r);
    int p, w, k;
    p = (r + NPE - 1) / NPE;
    w = (h + 1 > NPE) ? h + 1 : NPE;
    k = r - 1 - (p - 1) * NPE;
    return longint'(L) * (NPE + (p - 1) * w + h + k + 1) + 2 * ADD_LAT + 1;
  endfunction

  always @(posedge clk) if (rst_n) begin
    int rings_busy;
    rings_busy = 0;
    for (int g = 0; g < NRING; g++) begin
      int c;
      c = 0;
      for (int s = 0; s < L; s++) c += int'(busy[g][s]);
      if (c > max_slots) max_slots = c;
      if (c > 0) rings_busy++;
      if (res_valid[g]) begin
        int j;
        longint lat, el;
        real got;
        j = int'(res_tag[g]);
        got = fp_to_real(res_value[g]);
        lat = cyc - t_start[j];
        el  = exp_latency(hl[j], rl[j]);
        checks += 3;
        if (!rel_close(got, expv[j], 1e-4)) begin
          failures++; $display("job %0d (%0dx%0d): got %g exp %g", j, hl[j], rl[j], got, expv[j]);
        end
        if (lat < el || lat > el + L) begin
          failures++; $display("job %0d latency %0d, expected %0d..%0d", j, lat, el, el + L);
        end
        if (g != jring[j] || int'(res_slot[g]) != jslot[j]) begin
          failures++; $display("job %0d reported by ring %0d slot %0d", j, g, res_slot[g]);
        end
        ndone++;
      end
    end
    if (rings_busy > max_rings) max_rings = rings_busy;
  end

  task automatic run_job(input int j, input int g, input int s, input int h, input int r);
    base_t hap[];
    read_desc_t rd[];
    hap = new[h]; rd = new[r];
    for (int c = 0; c < h; c++) hap[c] = base_t'($urandom);
    for (int k = 0; k < r; k++) begin
      rd[k] = rand_desc();
      if (k < h && ($urandom % 50 != 0)) rd[k].base = hap[k];   // about 2% mismatches
    end
    hl[j] = h; rl[j] = r; jring[j] = g; jslot[j] = s;
    expv[j] = forward(h, r, hap, rd);
    if (used[g][s]) n_reuse++;
    used[g][s] = 1;
    while (busy[g][s]) @(negedge clk);
    for (int c = 0; c < h; c++) begin
      @(negedge clk);
      wr_hap_en = 1; wr_read_en = 0; wr_ring = 3'(g); wr_slot = SLOT_W'(s); wr_addr = LEN_W'(c);
      wr_hbase = hap[c];
    end
    for (int k = 0; k < r; k++) begin
      @(negedge clk);
      wr_hap_en = 0; wr_read_en = 1; wr_ring = 3'(g); wr_slot = SLOT_W'(s); wr_addr = LEN_W'(k);
      wr_desc = rd[k];
    end
    @(negedge clk);
    wr_hap_en = 0; wr_read_en = 0;
    start_valid = 1; start_ring = 3'(g); start_slot = SLOT_W'(s);
    start_hlen = LEN_W'(h); start_rlen = LEN_W'(r); start_tag = TAG_W'(j);
    @(posedge clk);
    checks++;
    if (!start_ready) begin failures++; $display("ring %0d slot %0d not ready", g, s); end
    t_start[j] = cyc;
    @(negedge clk);
    start_valid = 0;
    if (r > NPE) n_multi++;
    if (r % NPE != 0) n_partial++;
    if (h + 1 <= NPE && r > NPE) n_bypass++;
    if (r < NPE) n_idle++;
  endtask

  initial begin
    wr_hap_en = 0; wr_read_en = 0; start_valid = 0; wr_ring = '0; wr_slot = '0; wr_addr = '0;
    wr_hbase = '0; wr_desc = '0; start_ring = '0; start_slot = '0; start_hlen = '0;
    start_rlen = '0; start_tag = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int j = 0; j < NJOB; j++) begin
      int h, r, g, s;
      g = j % NRING;
      s = (j / NRING) % 4;
      h = 10 + int'($urandom % 55);
      r = h - 3 + int'($urandom % 7);   // near-equal lengths: short gaps
      case (j)
        0:  begin h = 302; r = 302; end
        1:  begin h = 5;   r = 20;  end
        2:  begin h = 30;  r = 5;   end
        3:  begin h = 7;   r = 9;   end
        9:  begin h = 1;   r = 1;   end
        10: begin h = 41;  r = 40;  end
        default: ;
      endcase
      if (j >= 40) s = 0;   // slot 0 again, once its first job is done
      if (j == 40) g = 3;
      run_job(j, g, s, h, r);
    end
    while (ndone < NJOB) @(negedge clk);
    checks++;
    if (n_multi == 0 || n_partial == 0 || n_bypass == 0 || n_idle == 0 || n_reuse == 0 ||
        max_slots < 2 || max_rings < 2) begin
      failures++;
      $display("mechanism not exercised");
    end
    $display("jobs %0d: multi-pass %0d, partial last pass %0d, buffer bypass %0d, idle PEs %0d, slot reuse %0d, max jobs in one ring %0d, max busy rings %0d, cycles %0d",
             NJOB, n_multi, n_partial, n_bypass, n_idle, n_reuse, max_slots, max_rings, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
