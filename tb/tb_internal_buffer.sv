// tb_internal_buffer: self-checking testbench of internal_buffer (3 slots,
// haplotypes up to 20 bases, ring of 4 PEs, so 17 words per slot). Each slot
// writes columns 1..20 in order, one per step, and reads back a column a
// fixed number of steps later: slot 0 in the same cycle (write-to-read
// bypass), slot 1 five steps later, slot 2 seventeen steps later, the longest
// wait, in the cycle that overwrites the same word with a newer column. The
// read data are compared with a model of what was written.
module tb_internal_buffer;
  import phmm_pkg::*;

  localparam int unsigned NSLOT = 3, H_MAX = 20, N_PE = 4;
  localparam int DEPTH = H_MAX + 1 - N_PE;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic              wr_en;
  logic [SLOT_W-1:0] wr_slot, rd_slot;
  logic [LEN_W-1:0]  wr_col, rd_col;
  fvec_t             wr_data, rd_data;

  internal_buffer #(.NSLOT(NSLOT), .H_MAX(H_MAX), .N_PE(N_PE)) dut (.*);

  fvec_t model [NSLOT][H_MAX + 1];
  int    lag [NSLOT] = '{0, 5, DEPTH};
  int checks = 0, failures = 0;

  initial begin
    wr_en = 0; wr_slot = '0; rd_slot = '0; wr_col = '0; rd_col = '0; wr_data = '0;
    for (int k = 1; k <= int'(H_MAX) + DEPTH; k++)
      for (int s = 0; s < int'(NSLOT); s++) begin
        int rc;
        @(negedge clk);
        wr_slot = SLOT_W'(s); rd_slot = SLOT_W'(s);
        wr_en = (k <= int'(H_MAX));
        wr_col = LEN_W'(k);
        wr_data = '{m: $urandom, i: $urandom, d: $urandom};
        if (wr_en) model[s][k] = wr_data;
        rc = k - lag[s];
        rd_col = LEN_W'(rc < 0 ? 0 : rc);
        #1;
        if (rc >= 1 && rc <= int'(H_MAX)) begin
          checks++;
          if (rd_data != model[s][rc]) begin
            failures++;
            if (failures < 10) $display("slot %0d col %0d: got %h exp %h", s, rc, rd_data, model[s][rc]);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
