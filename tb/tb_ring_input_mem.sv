// tb_ring_input_mem: self-checking testbench of ring_input_mem (4 slots,
// 16 haplotype and 16 read entries each). Fills every slot with random bases
// and descriptors, overwrites some entries, then reads everything back through
// both read ports and compares with a model; also checks that a write to one
// slot leaves the same address of the other slots alone.
module tb_ring_input_mem;
  import phmm_pkg::*;
  import tb_fp_pkg::*;

  localparam int unsigned NSLOT = 4, H_MAX = 16, R_MAX = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic              wr_hap_en, wr_read_en;
  logic [SLOT_W-1:0] wr_slot, rd_slot;
  logic [LEN_W-1:0]  wr_addr, rd_hap_addr, rd_read_addr;
  base_t             wr_hbase, rd_hbase;
  read_desc_t        wr_desc, rd_desc;

  ring_input_mem #(.NSLOT(NSLOT), .H_MAX(H_MAX), .R_MAX(R_MAX)) dut (.*);

  base_t      mh [NSLOT][H_MAX];
  read_desc_t mr [NSLOT][R_MAX];
  int checks = 0, failures = 0;

  task automatic wr(input int s, input int a, input bit hap);
    @(negedge clk);
    wr_slot = SLOT_W'(s); wr_addr = LEN_W'(a);
    wr_hap_en = hap; wr_read_en = !hap;
    wr_hbase = base_t'($urandom);
    wr_desc = rand_desc();
    wr_desc.a_mm = $urandom;
    if (hap) mh[s][a] = wr_hbase; else mr[s][a] = wr_desc;
  endtask

  task automatic check_all();
    @(negedge clk);
    wr_hap_en = 0; wr_read_en = 0;
    for (int s = 0; s < int'(NSLOT); s++)
      for (int a = 0; a < int'(H_MAX); a++) begin
        rd_slot = SLOT_W'(s); rd_hap_addr = LEN_W'(a); rd_read_addr = LEN_W'(H_MAX - 1 - a);
        #1;
        checks += 2;
        if (rd_hbase != mh[s][a]) begin failures++; $display("hap %0d/%0d", s, a); end
        if (rd_desc != mr[s][H_MAX-1-a]) begin failures++; $display("read %0d/%0d", s, H_MAX-1-a); end
      end
  endtask

  initial begin
    wr_hap_en = 0; wr_read_en = 0; wr_slot = '0; wr_addr = '0; wr_hbase = '0; wr_desc = '0;
    rd_slot = '0; rd_hap_addr = '0; rd_read_addr = '0;
    for (int s = 0; s < int'(NSLOT); s++)
      for (int a = 0; a < int'(H_MAX); a++) begin
        wr(s, a, 1); wr(s, a, 0);
      end
    check_all();
    for (int k = 0; k < 20; k++) wr(int'($urandom % NSLOT), int'($urandom % H_MAX), 1'($urandom));
    check_all();
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
