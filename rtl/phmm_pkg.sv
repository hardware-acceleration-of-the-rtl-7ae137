// phmm_pkg: types and constants shared by the Pair HMM forward-algorithm
// accelerator.
//
// Numbers are IEEE-754 single precision (fp32_t), as the forward algorithm
// needs floating point to cover its dynamic range. A read row is described by
// a read_desc_t: the read base, the two emission priors (Eq. 3.4) and the six
// transition probabilities of Eq. 3.5 (a_im equals a_dm and is not stored
// twice). The host computes all probabilities; the hardware only multiplies
// and adds them. A ring_tok_t is the control word that enters the first PE of
// a ring once per step of a slot and travels from PE to PE one step later each
// time. The field widths are the design's own maxima (sequences up to 511
// bases, up to 256 PEs per ring, up to 32 interleaved slots).
package phmm_pkg;

  typedef logic [31:0] fp32_t;
  typedef logic [1:0]  base_t;   // A=0, C=1, G=2, T=3

  localparam int unsigned LEN_W  = 9;  // column / row index width
  localparam int unsigned PEI_W  = 8;  // PE index width
  localparam int unsigned SLOT_W = 5;  // slot index width
  localparam int unsigned TAG_W  = 16; // job tag width

  localparam fp32_t FP_ZERO = 32'h0000_0000;
  localparam fp32_t FP_ONE  = 32'h3f80_0000;

  typedef struct packed {
    base_t base;
    fp32_t prior_match;     // 1 - Q_base
    fp32_t prior_mismatch;  // Q_base
    fp32_t a_mm;
    fp32_t a_dm;            // also used as a_im
    fp32_t a_mi;
    fp32_t a_ii;
    fp32_t a_md;
    fp32_t a_dd;
  } read_desc_t;

  // The three forward variables of one cell.
  typedef struct packed {
    fp32_t m;
    fp32_t i;
    fp32_t d;
  } fvec_t;

  typedef struct packed {
    logic               active;     // a pass of real rows is at this step
    logic [LEN_W-1:0]   col;        // haplotype column (0 = boundary step)
    logic               last_col;   // col equals the haplotype length
    base_t              hbase;      // haplotype base of column col
    logic               first_pass; // rows 1..N_PE (upstream of PE0 is row 0)
    logic               last_pass;  // the last row of the read is in this pass
    logic [PEI_W-1:0]   last_pe;    // index of the last PE holding a row
    logic               desc_valid; // desc is for PE desc_pe, next pass
    logic [PEI_W-1:0]   desc_pe;
    read_desc_t         desc;
  } ring_tok_t;

endpackage
