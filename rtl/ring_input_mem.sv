// ring_input_mem: the input memory of one PE ring. For each of the NSLOT
// matrices a ring can hold at once it stores the haplotype (H_MAX bases) and
// the read, one read_desc_t (base, priors, transition probabilities) per read
// base, R_MAX deep. The host fills a slot through the write port while the
// slot is idle; the ring controller reads one haplotype base and one read
// descriptor per cycle through two combinational read ports.
// Organisation and ports are this design's own.
module ring_input_mem
  import phmm_pkg::*;
#(
  parameter int unsigned NSLOT = 12,
  parameter int unsigned H_MAX = 302,
  parameter int unsigned R_MAX = 302
) (
  input  logic              clk,
  input  logic              wr_hap_en,
  input  logic              wr_read_en,
  input  logic [SLOT_W-1:0] wr_slot,
  input  logic [LEN_W-1:0]  wr_addr,
  input  base_t             wr_hbase,
  input  read_desc_t        wr_desc,
  input  logic [SLOT_W-1:0] rd_slot,
  input  logic [LEN_W-1:0]  rd_hap_addr,
  input  logic [LEN_W-1:0]  rd_read_addr,
  output base_t             rd_hbase,
  output read_desc_t        rd_desc
);
  localparam int unsigned HAW = $clog2(NSLOT * H_MAX);
  localparam int unsigned RAW = $clog2(NSLOT * R_MAX);

  base_t      hap_mem  [NSLOT * H_MAX];
  read_desc_t read_mem [NSLOT * R_MAX];

  function automatic logic [HAW-1:0] haddr(input logic [SLOT_W-1:0] s, input logic [LEN_W-1:0] a);
    return HAW'(32'(s) * H_MAX + 32'(a));
  endfunction
  function automatic logic [RAW-1:0] raddr(input logic [SLOT_W-1:0] s, input logic [LEN_W-1:0] a);
    return RAW'(32'(s) * R_MAX + 32'(a));
  endfunction

  always_ff @(posedge clk) begin
    if (wr_hap_en)  hap_mem[haddr(wr_slot, wr_addr)]  <= wr_hbase;
    if (wr_read_en) read_mem[raddr(wr_slot, wr_addr)] <= wr_desc;
  end

  assign rd_hbase = hap_mem[haddr(rd_slot, rd_hap_addr)];
  assign rd_desc  = read_mem[raddr(rd_slot, rd_read_addr)];
endmodule
