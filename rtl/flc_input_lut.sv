// flc_input_lut: fuzzifier lookup tables of one input variable.
//
// Because at most two membership functions of an input overlap, its terms
// split into an odd set (terms 1,3,5,..) and an even set (terms 2,4,..), and
// at any crisp value at most one term of each set is active. For each set an
// MF table gives the membership value of the active term and an ID table its
// index inside the set (id = (j-1)/2 for odd term j, j/2-1 for even term j).
// The quantized crisp input is the read address of all four tables; a level
// where no term of a set is active holds membership 0.
//
// Interface: reads are combinational from the registered tables. Entries are
// written one per cycle through the table-write port when cfg.tbl is
// CFG_IN_LUT and the variable field of cfg.addr equals VAR:
//   cfg.addr = {var, parity (0 odd, 1 even), level}, cfg.data = {id, mu}.
// The split into odd/even MF and ID tables follows the source design; the
// write port and the table encoding are this implementation's.
module flc_input_lut
  import flc_pkg::*;
#(
  parameter int unsigned VAR      = 0
) (
  input  logic                clk,
  input  cfg_wr_t             cfg,
  input  logic [P_BITS-1:0]   x,
  output logic [Q_BITS-1:0]   mu_odd,
  output logic [Q_BITS-1:0]   mu_even,
  output logic [IDX_W-1:0]    id_odd,
  output logic [IDX_W-1:0]    id_even
);
  localparam int unsigned LEVELS = 2 ** P_BITS;
  localparam int unsigned VAR_LSB = P_BITS + 1;

  typedef struct packed {
    logic [IDX_W-1:0]  id;
    logic [Q_BITS-1:0] mu;
  } entry_t;

  entry_t tbl_odd  [LEVELS];
  entry_t tbl_even [LEVELS];

  logic               sel;
  logic [P_BITS-1:0]  waddr;
  entry_t             wdata;

  assign sel   = cfg.we && (cfg.tbl == CFG_IN_LUT) &&
                 (32'(cfg.addr[CFG_ADDR_W-1:VAR_LSB]) == VAR);
  assign waddr = cfg.addr[P_BITS-1:0];
  assign wdata = entry_t'(cfg.data[IDX_W+Q_BITS-1:0]);

  always_ff @(posedge clk) begin
    if (sel && !cfg.addr[P_BITS]) tbl_odd[waddr]  <= wdata;
    if (sel &&  cfg.addr[P_BITS]) tbl_even[waddr] <= wdata;
  end

  assign mu_odd  = tbl_odd[x].mu;
  assign id_odd  = tbl_odd[x].id;
  assign mu_even = tbl_even[x].mu;
  assign id_even = tbl_even[x].id;

endmodule
