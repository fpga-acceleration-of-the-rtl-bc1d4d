// plf_pkg: types and default latencies shared by the phylogenetic likelihood
// accelerator. Values are IEEE-754 single (fp32_t) or double (fp64_t) words.
// The default unit latencies are this design's choice: the document gives the
// double adder (14 cycles) and pipeline totals, not every unit's depth. The
// single-precision multiplier (8) and adder (11) are picked so that the
// conditional probability pipeline totals the 38 cycles quoted for the
// Virtex-2 Pro, and the comparator (1) and divider (30) so that the
// normalisation pipeline totals 32.
package plf_pkg;
  typedef logic [31:0] fp32_t;
  typedef logic [63:0] fp64_t;

  // four nucleotide values of one character, index 0..3 = A, C, G, T
  typedef fp32_t cpv_t [4];

  localparam int unsigned SP_MUL_LAT = 8;
  localparam int unsigned SP_ADD_LAT = 11;
  localparam int unsigned SP_DIV_LAT = 30;
  localparam int unsigned SP_MAX_LAT = 1;
  localparam int unsigned DP_MUL_LAT = 9;
  localparam int unsigned DP_ADD_LAT = 14;
  localparam int unsigned CVT_LAT    = 1;

  // one character of node output, as written back to the SRAM banks
  typedef struct packed {
    fp32_t scp;
    fp32_t lnscaler;
    fp32_t t;
    fp32_t g;
    fp32_t c;
    fp32_t a;
  } node_rec_t;
endpackage
