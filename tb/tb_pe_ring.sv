// tb_pe_ring: self-checking testbench of pe_ring, run with a ring of 4 PEs
// so that short reads already need several passes. Jobs of assorted shapes
// are loaded into different slots and run concurrently: single-pass reads
// shorter than the ring (idle PEs), reads whose length is and is not a
// multiple of the ring length (internal buffer, partial last pass),
// haplotypes so short that the buffer is read in the cycle it is written
// (bypass), and a second job reusing a slot. Each likelihood is compared with
// a double-precision forward algorithm (relative error below 1e-4) and each
// job's latency with the schedule formula given in pe_ring.
module tb_pe_ring;
  import phmm_pkg::*;
  import tb_fp_pkg::*;

  localparam int unsigned N_PE = 4, ADD_LAT = 7, MUL_LAT = 5, H_MAX = 64, R_MAX = 64;
  localparam int unsigned L = ADD_LAT + MUL_LAT;
  localparam int NJOB = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic wr_hap_en, wr_read_en, start_valid, start_ready, res_valid;
  logic [SLOT_W-1:0] wr_slot, start_slot, res_slot;
  logic [LEN_W-1:0]  wr_addr, start_hlen, start_rlen;
  base_t             wr_hbase;
  read_desc_t        wr_desc;
  logic [TAG_W-1:0]  start_tag, res_tag;
  logic [L-1:0]      busy;
  fp32_t             res_value;

  pe_ring #(.N_PE(N_PE), .ADD_LAT(ADD_LAT), .MUL_LAT(MUL_LAT), .H_MAX(H_MAX), .R_MAX(R_MAX)) dut (.*);

  int  hl [NJOB], rl [NJOB];
  real expv [NJOB];
  longint t_start [NJOB];
  bit  done [NJOB];
  longint cyc = 0;
  int checks = 0, failures = 0, ndone = 0;
  int n_multi = 0, n_partial = 0, n_bypass = 0, n_idle = 0, n_reuse = 0, max_conc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  function automatic longint exp_latency(input int h, input int r);
    int p, w, k;
    p = (r + N_PE - 1) / N_PE;
    w = (h + 1 > N_PE) ? h + 1 : N_PE;
    k = r - 1 - (p - 1) * N_PE;
    return longint'(L) * (N_PE + (p - 1) * w + h + k + 1) + 2 * ADD_LAT + 1;
  endfunction

  // results
  always @(posedge clk) if (rst_n && res_valid) begin
    int j;
    longint lat, el;
    real got;
    j = int'(res_tag);
    got = fp_to_real(res_value);
    lat = cyc - t_start[j];
    el  = exp_latency(hl[j], rl[j]);
    checks += 2;
    if (!rel_close(got, expv[j], 1e-4)) begin
      failures++; $display("job %0d (%0dx%0d): got %g exp %g", j, hl[j], rl[j], got, expv[j]);
    end
    if (lat < el || lat > el + L) begin
      failures++; $display("job %0d latency %0d, expected %0d..%0d", j, lat, el, el + L);
    end
    done[j] = 1; ndone++;
  end

  always @(posedge clk) begin
    int c;
    c = 0;
    for (int s = 0; s < int'(L); s++) c += int'(busy[s]);
    if (c > max_conc) max_conc = c;
  end

  task automatic run_job(input int j, input int s, input int h, input int r);
    base_t hap[];
    read_desc_t rd[];
    hap = new[h]; rd = new[r];
    for (int c = 0; c < h; c++) hap[c] = base_t'($urandom);
    for (int k = 0; k < r; k++) begin
      rd[k] = rand_desc();
      if (k < h && ($urandom % 4 != 0)) rd[k].base = hap[k];   // mostly matching read
    end
    hl[j] = h; rl[j] = r;
    expv[j] = forward(h, r, hap, rd);
    while (busy[s]) @(negedge clk);
    if (done.sum() > 0 && j >= int'(L)) n_reuse++;
    for (int c = 0; c < h; c++) begin
      @(negedge clk);
      wr_hap_en = 1; wr_read_en = 0; wr_slot = SLOT_W'(s); wr_addr = LEN_W'(c); wr_hbase = hap[c];
    end
    for (int k = 0; k < r; k++) begin
      @(negedge clk);
      wr_hap_en = 0; wr_read_en = 1; wr_slot = SLOT_W'(s); wr_addr = LEN_W'(k); wr_desc = rd[k];
    end
    @(negedge clk);
    wr_hap_en = 0; wr_read_en = 0;
    start_valid = 1; start_slot = SLOT_W'(s); start_hlen = LEN_W'(h); start_rlen = LEN_W'(r);
    start_tag = TAG_W'(j);
    @(posedge clk);
    if (!start_ready) begin failures++; $display("slot %0d not ready", s); end
    t_start[j] = cyc;
    @(negedge clk);
    start_valid = 0;
    if (r > int'(N_PE)) n_multi++;
    if (r % int'(N_PE) != 0) n_partial++;
    if (h + 1 <= int'(N_PE) && r > int'(N_PE)) n_bypass++;
    if (r < int'(N_PE)) n_idle++;
  endtask

  initial begin
    int shapes [NJOB][2] = '{'{10, 3}, '{20, 13}, '{16, 16}, '{3, 10}, '{1, 1}, '{40, 37},
                             '{7, 8}, '{2, 9}, '{33, 5}, '{12, 12}, '{64, 64}, '{5, 21},
                             '{25, 30}, '{9, 4}, '{18, 2}, '{3, 3}};
    wr_hap_en = 0; wr_read_en = 0; start_valid = 0; wr_slot = '0; wr_addr = '0;
    wr_hbase = '0; wr_desc = '0; start_slot = '0; start_hlen = '0; start_rlen = '0; start_tag = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int j = 0; j < NJOB; j++) run_job(j, j % int'(L), shapes[j][0], shapes[j][1]);
    while (ndone < NJOB) @(negedge clk);
    checks++;
    if (n_multi == 0 || n_partial == 0 || n_bypass == 0 || n_idle == 0 || n_reuse == 0 || max_conc < 2) begin
      failures++;
      $display("mechanism not exercised: multi %0d partial %0d bypass %0d idle %0d reuse %0d conc %0d",
               n_multi, n_partial, n_bypass, n_idle, n_reuse, max_conc);
    end
    $display("jobs %0d: multi-pass %0d, partial last pass %0d, buffer bypass %0d, idle PEs %0d, slot reuse %0d, max concurrent %0d",
             NJOB, n_multi, n_partial, n_bypass, n_idle, n_reuse, max_conc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
