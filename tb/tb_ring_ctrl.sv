// tb_ring_ctrl: self-checking testbench of ring_ctrl with a ring of 4 PEs.
// The input memory is replaced by a pattern that encodes slot and address in
// every word, so each control word can be checked field by field against an
// independent model of the schedule: a preload pass of N_PE steps, then
// ceil(rlen/N_PE) passes of max(hlen+1, N_PE) steps (the last one hlen+1
// steps) with columns, pass flags,
// last PE and descriptor hand-out. Three jobs run in different slots at the
// same time; afterwards result strobes are fed back and the tag, the slot and
// the busy/ready handshake are checked.
module tb_ring_ctrl;
  import phmm_pkg::*;

  localparam int unsigned N_PE = 4, ADD_LAT = 7, MUL_LAT = 5;
  localparam int unsigned L = ADD_LAT + MUL_LAT;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              start_valid, start_ready, sum_valid, res_valid;
  logic [SLOT_W-1:0] start_slot, slot, sum_slot, res_slot;
  logic [LEN_W-1:0]  start_hlen, start_rlen, rd_hap_addr, rd_read_addr;
  logic [TAG_W-1:0]  start_tag, res_tag;
  logic [L-1:0]      busy;
  base_t             rd_hbase;
  read_desc_t        rd_desc;
  ring_tok_t         tok;
  fp32_t             sum_value, res_value;

  ring_ctrl #(.N_PE(N_PE), .ADD_LAT(ADD_LAT), .MUL_LAT(MUL_LAT), .H_MAX(64), .R_MAX(64)) dut (.*);

  // memory pattern
  always_comb begin
    rd_hbase = base_t'(rd_hap_addr ^ LEN_W'(slot));
    rd_desc  = '0;
    rd_desc.a_mm = {16'hd5c0, 7'(slot), rd_read_addr};
  end

  int  jh [3] = '{10, 2, 5};
  int  jr [3] = '{9, 7, 3};
  int  js [3] = '{2, 5, 0};
  int  step [3];
  bit  active_job [3];
  int checks = 0, failures = 0;
  bit started = 0;

  // every control word of a running job is checked at the cycle of its slot
  always @(negedge clk) if (rst_n)
    for (int j = 0; j < 3; j++)
      if (active_job[j] && int'(slot) == js[j]) begin
        check_tok(j, step[j]);
        step[j]++;
        if (step[j] == total_steps(j)) active_job[j] = 0;
      end else if (started && !active_job[j] && int'(slot) == js[j]) begin
        checks++;
        if (tok.active || tok.desc_valid) fail($sformatf("job %0d slot still issuing", j));
      end

  task automatic fail(input string what);
    failures++;
    if (failures < 20) $display("t=%0t %s", $time, what);
  endtask

  function automatic int total_steps(input int j);
    int p, w;
    p = (jr[j] + N_PE - 1) / N_PE;
    w = (jh[j] + 1 > int'(N_PE)) ? jh[j] + 1 : N_PE;
    return N_PE + (p - 1) * w + jh[j] + 1;
  endfunction

  task automatic check_tok(input int j, input int st);
    int p, q, w, np, h, r;
    bit e_active, e_last, e_dv;
    int e_row;
    h = jh[j]; r = jr[j];
    np = (r + N_PE - 1) / N_PE;
    w  = (h + 1 > int'(N_PE)) ? h + 1 : N_PE;
    checks++;
    if (st < int'(N_PE)) begin
      q = st;
      e_active = 0;
      e_dv = (q < r);
      e_row = q;
      e_last = 0;
      p = -1;
    end else begin
      p = (st - N_PE) / w;
      q = (st - N_PE) % w;
      e_active = (q <= h);
      e_last = (p == np - 1);
      e_row = (p + 1) * N_PE + q;
      e_dv = (q < int'(N_PE)) && (e_row < r) && !e_last;
    end
    if (tok.active !== e_active) fail($sformatf("job %0d step %0d active %0d", j, st, tok.active));
    if (tok.desc_valid !== e_dv) fail($sformatf("job %0d step %0d desc_valid %0d", j, st, tok.desc_valid));
    if (e_dv && (int'(tok.desc_pe) != q || tok.desc.a_mm != {16'hd5c0, 7'(js[j]), LEN_W'(e_row)}))
      fail($sformatf("job %0d step %0d descriptor pe %0d word %h", j, st, tok.desc_pe, tok.desc.a_mm));
    if (e_active) begin
      int e_lastpe;
      e_lastpe = e_last ? r - p * N_PE - 1 : N_PE - 1;
      if (int'(tok.col) != q || tok.last_col != (q == h) || tok.first_pass != (p == 0) ||
          tok.last_pass != e_last || int'(tok.last_pe) != e_lastpe)
        fail($sformatf("job %0d step %0d col %0d lastcol %0d first %0d last %0d lastpe %0d",
                       j, st, tok.col, tok.last_col, tok.first_pass, tok.last_pass, tok.last_pe));
      if (q >= 1 && tok.hbase != base_t'(LEN_W'(q - 1) ^ LEN_W'(js[j])))
        fail($sformatf("job %0d step %0d hbase %0d", j, st, tok.hbase));
    end
  endtask

  initial begin
    start_valid = 0; start_slot = '0; start_hlen = '0; start_rlen = '0; start_tag = '0;
    sum_valid = 0; sum_slot = '0; sum_value = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int j = 0; j < 3; j++) begin
      @(negedge clk);
      start_valid = 1; start_slot = SLOT_W'(js[j]); start_hlen = LEN_W'(jh[j]);
      start_rlen = LEN_W'(jr[j]); start_tag = TAG_W'(16'h100 + j);
      @(posedge clk);
      checks++;
      if (!start_ready) fail("start not ready");
      active_job[j] = 1; step[j] = 0;
      @(negedge clk);
      start_valid = 0;
      // a second start to a busy slot must be refused
      start_valid = 1;
      #1;
      checks++;
      if (start_ready) fail("busy slot reported ready");
      start_valid = 0;
    end
    started = 1;
    while (active_job.sum() != 0 || !started) @(negedge clk);
    // results: busy until the sum comes back
    for (int j = 0; j < 3; j++) begin
      checks++;
      if (!busy[js[j]]) fail("slot not busy before its result");
      @(negedge clk);
      sum_valid = 1; sum_slot = SLOT_W'(js[j]); sum_value = 32'h3f00_0000 + j;
      @(negedge clk);
      sum_valid = 0;
      checks++;
      if (!res_valid || res_tag != TAG_W'(16'h100 + j) || int'(res_slot) != js[j] ||
          res_value != 32'h3f00_0000 + j || busy[js[j]])
        fail($sformatf("result %0d: valid %0d tag %h slot %0d", j, res_valid, res_tag, res_slot));
      @(negedge clk);
      checks++;
      if (res_valid) fail("result strobe longer than one cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
