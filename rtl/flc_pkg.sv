// flc_pkg: constants and types shared by the fuzzy logic controller.
//
// The controller has NIN crisp inputs quantized to P_BITS, NX_TERMS fuzzy
// terms per input with at most two overlapping (so each input splits into an
// odd and an even term set), Q_BITS membership values and NY_TERMS output
// terms treated as singletons at their centres, weighted by membership x span.
// The 8-bit membership width and two inputs follow the source design; the
// other sizes are this implementation's choices.
//
// All lookup tables are written through one table-write request (cfg_wr_t):
//   CFG_IN_LUT   addr = {var, parity(0 odd/1 even), level}, data = {id, mu}
//   CFG_RULE     addr = {sub-rule base, cell},  data = output term index
//   CFG_OUT_TERM addr = output term,            data = {centre, span}
package flc_pkg;

  parameter int unsigned NIN       = 2;   // input variables (x, phi)
  parameter int unsigned P_BITS    = 8;   // input quantization: 2^p levels
  parameter int unsigned Q_BITS    = 8;   // membership quantization: 2^q levels
  parameter int unsigned NX_TERMS  = 7;   // fuzzy terms per input variable
  parameter int unsigned NY_TERMS  = 7;   // output fuzzy terms (M)
  parameter int unsigned SPAN_W    = 8;   // width of an output MF span
  parameter int unsigned CTR_W     = 8;   // width of an output MF centre
  parameter int unsigned FINE_BITS = 3;   // fine search: 2^F steps per interval

  // terms in the larger (odd) set and bits of an id inside a set
  parameter int unsigned NX_HALF = (NX_TERMS + 1) / 2;
  parameter int unsigned IDX_W   = (NX_HALF > 1) ? $clog2(NX_HALF) : 1;
  parameter int unsigned IDY_W   = $clog2(NY_TERMS);

  // defuzzifier arithmetic
  parameter int unsigned AREA_W = Q_BITS + SPAN_W;                 // mu * span
  parameter int unsigned ASUM_W = AREA_W + $clog2(NY_TERMS);       // sum of areas
  parameter int unsigned MOM_W  = ASUM_W + CTR_W + FINE_BITS + 1;  // scaled moments

  parameter int unsigned CFG_ADDR_W = 16;
  parameter int unsigned CFG_DATA_W = 16;

  typedef enum logic [1:0] {
    CFG_IN_LUT   = 2'd0,
    CFG_RULE     = 2'd1,
    CFG_OUT_TERM = 2'd2
  } cfg_tbl_e;

  typedef struct packed {
    logic                  we;
    cfg_tbl_e              tbl;
    logic [CFG_ADDR_W-1:0] addr;
    logic [CFG_DATA_W-1:0] data;
  } cfg_wr_t;

  // result of the coarse search, consumed by the fine search
  typedef struct packed {
    logic [MOM_W-1:0]  lm;       // left moment about the left centre (x 2^F)
    logic [MOM_W-1:0]  rm;       // right moment about the right centre (x 2^F)
    logic [ASUM_W-1:0] la;       // area of terms at or left of the left centre
    logic [ASUM_W-1:0] ra;       // area of terms at or right of the right centre
    logic [IDY_W-1:0]  li;       // left term index
    logic [IDY_W-1:0]  ri;       // right term index
    logic [CTR_W-1:0]  lc;       // left centre
    logic [CTR_W-1:0]  span_d;     // term interval: right centre - left centre
  } coarse_res_t;

endpackage
