// ring_ctrl: sequencer of one PE ring. The ring's pipelines interleave
// NSLOT = ADD_LAT + MUL_LAT independent matrices: slot s owns every cycle
// whose count is s modulo NSLOT, and one "step" of a slot is NSLOT cycles.
// For the slot of the current cycle the controller builds the control word
// that enters the first PE: haplotype column, base, pass flags and, when due,
// a read descriptor addressed to one PE.
//
// A job (haplotype of hlen bases, read of rlen bases) runs as
//   * a preload pass of N_PE steps that sends the descriptors of rows
//     1..N_PE to PEs 0..N_PE-1, one per step;
//   * ceil(rlen / N_PE) passes of W = max(hlen + 1, N_PE) steps (the last
//     pass only hlen + 1 steps). On step q of a pass the first PE handles
//     column q (q = 0 is the border column, q = hlen the last); on steps
//     q < N_PE the descriptor of row q of the next pass is sent to PE q. The
//     pass period W leaves the last PE's results in the internal buffer
//     until the first PE needs them.
// After the last pass the slot stays busy until result_sum returns its
// likelihood; then the job's tag and value are presented on res_* for one
// cycle and the slot is free. The host may start a job in any idle slot
// (start_ready = slot idle) after writing its data to the input memory.
// The pass schedule and the preload pass are this design's own; the row
// split into passes of N_PE rows follows the ring organisation of the
// source thesis.
module ring_ctrl
  import phmm_pkg::*;
#(
  parameter int unsigned N_PE    = 8,
  parameter int unsigned ADD_LAT = 7,
  parameter int unsigned MUL_LAT = 5,
  parameter int unsigned H_MAX   = 302,
  parameter int unsigned R_MAX   = 302
) (
  input  logic              clk,
  input  logic              rst_n,
  // job start
  input  logic              start_valid,
  output logic              start_ready,
  input  logic [SLOT_W-1:0] start_slot,
  input  logic [LEN_W-1:0]  start_hlen,
  input  logic [LEN_W-1:0]  start_rlen,
  input  logic [TAG_W-1:0]  start_tag,
  output logic [ADD_LAT+MUL_LAT-1:0] busy,
  // input memory read ports
  output logic [LEN_W-1:0]  rd_hap_addr,
  output logic [LEN_W-1:0]  rd_read_addr,
  input  base_t             rd_hbase,
  input  read_desc_t        rd_desc,
  // to the first PE
  output logic [SLOT_W-1:0] slot,
  output ring_tok_t         tok,
  // from result_sum
  input  logic              sum_valid,
  input  logic [SLOT_W-1:0] sum_slot,
  input  fp32_t             sum_value,
  output logic              res_valid,
  output logic [SLOT_W-1:0] res_slot,
  output logic [TAG_W-1:0]  res_tag,
  output fp32_t             res_value
);
  localparam int unsigned NSLOT = ADD_LAT + MUL_LAT;
  localparam int unsigned SI_W  = (NSLOT > 1) ? $clog2(NSLOT) : 1;

  logic [SLOT_W-1:0] cur;
  logic [SI_W-1:0]   ci;   // cur as an index of the per-slot arrays
  logic              run   [NSLOT];
  logic              pre   [NSLOT];
  logic [LEN_W-1:0]  q     [NSLOT];
  logic [LEN_W-1:0]  rbase [NSLOT];
  logic [LEN_W-1:0]  hlen  [NSLOT];
  logic [LEN_W-1:0]  rlen  [NSLOT];
  logic [TAG_W-1:0]  tag   [NSLOT];

  int unsigned w, rows_left, nrow;
  logic        last_pass, q_end;

  assign slot        = cur;
  assign ci          = SI_W'(cur);
  assign start_ready = !busy[SI_W'(start_slot)];

  always_comb begin
    rows_left = 32'(rlen[ci]) - 32'(rbase[ci]);
    last_pass = !pre[ci] && rows_left <= N_PE;
    if (pre[ci])                 w = N_PE;
    else if (32'(hlen[ci]) + 1 > N_PE) w = 32'(hlen[ci]) + 1;
    else                          w = N_PE;
    // the read's last pass needs no spacing for a next one: it ends at the
    // haplotype's last column
    q_end = last_pass ? (q[ci] == hlen[ci]) : (32'(q[ci]) + 1 == w);
    nrow  = pre[ci] ? 32'(q[ci]) : 32'(rbase[ci]) + N_PE + 32'(q[ci]);

    rd_hap_addr  = (q[ci] == '0) ? '0 : q[ci] - LEN_W'(1);
    rd_read_addr = (nrow < 32'(rlen[ci])) ? LEN_W'(nrow) : '0;

    tok = '0;
    if (run[ci]) begin
      if (!pre[ci]) begin
        tok.active     = (q[ci] <= hlen[ci]);
        tok.col        = q[ci];
        tok.last_col   = (q[ci] == hlen[ci]);
        tok.hbase      = rd_hbase;
        tok.first_pass = (rbase[ci] == '0);
        tok.last_pass  = last_pass;
        tok.last_pe    = PEI_W'((last_pass ? rows_left : N_PE) - 1);
      end
      tok.desc_valid = (32'(q[ci]) < N_PE) && (nrow < 32'(rlen[ci])) && !last_pass;
      tok.desc_pe    = PEI_W'(q[ci]);
      tok.desc       = rd_desc;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cur <= '0;
      for (int k = 0; k < int'(NSLOT); k++) begin
        busy[k] <= 1'b0;
        run[k]  <= 1'b0;
      end
      res_valid <= 1'b0;
    end else begin
      cur <= (32'(cur) == NSLOT - 1) ? '0 : cur + SLOT_W'(1);
      if (run[ci]) begin
        if (q_end) begin
          q[ci] <= '0;
          if (pre[ci])       pre[ci]   <= 1'b0;
          else if (last_pass) run[ci]   <= 1'b0;
          else                rbase[ci] <= rbase[ci] + LEN_W'(N_PE);
        end else begin
          q[ci] <= q[ci] + LEN_W'(1);
        end
      end
      if (start_valid && start_ready) begin
        busy[SI_W'(start_slot)]  <= 1'b1;
        run[SI_W'(start_slot)]   <= 1'b1;
        pre[SI_W'(start_slot)]   <= 1'b1;
        q[SI_W'(start_slot)]     <= '0;
        rbase[SI_W'(start_slot)] <= '0;
        hlen[SI_W'(start_slot)]  <= start_hlen;
        rlen[SI_W'(start_slot)]  <= start_rlen;
        tag[SI_W'(start_slot)]   <= start_tag;
      end
      res_valid <= sum_valid;
      if (sum_valid) begin
        busy[SI_W'(sum_slot)] <= 1'b0;
        res_slot       <= sum_slot;
        res_tag        <= tag[SI_W'(sum_slot)];
        res_value      <= sum_value;
      end
    end
  end

  a_start_len: assert property (@(posedge clk) disable iff (!rst_n)
    start_valid && start_ready |-> start_hlen >= 1 && 32'(start_hlen) <= H_MAX &&
                                   start_rlen >= 1 && 32'(start_rlen) <= R_MAX &&
                                   32'(start_slot) < NSLOT);
  a_sum_busy: assert property (@(posedge clk) disable iff (!rst_n)
    sum_valid |-> busy[SI_W'(sum_slot)] && !run[SI_W'(sum_slot)]);
endmodule
