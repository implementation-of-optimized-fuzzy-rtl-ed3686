// flc_inference: inference module with a decomposed fuzzy rule base.
//
// The rule base is an NIN-dimensional array of output term indices, one per
// combination of input terms. Splitting every input's terms into an odd and
// an even set splits the rule base into 2^NIN disjoint sub-rule bases
// (R_oo, R_oe, R_eo, R_ee for two inputs), and each of them has at most one
// rule active for a given input. Sub-rule base r uses, for input i, the odd
// set when bit NIN-1-i of r is 0 and the even set when it is 1; its cell_a
// address is the concatenation of the term ids of those sets, first input in
// the most significant position. The looked-up indices are captured in index
// registers (TermID1..TermID4 for two inputs), so the total storage is the
// same as the undecomposed rule base.
//
// Interface: term_id[r] is loaded from the sub-rule bases when load is high.
// Sub-rule bases are written through the table-write port with
// cfg.tbl = CFG_RULE, cfg.addr = {r, cell_a}, cfg.data = output term index.
// The decomposition follows the source design; the write port and the
// address layout are this implementation's.
module flc_inference
  import flc_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  input  cfg_wr_t                       cfg,
  input  logic                          load,
  input  logic [NIN-1:0][IDX_W-1:0]     id_odd,
  input  logic [NIN-1:0][IDX_W-1:0]     id_even,
  output logic [2**NIN-1:0][IDY_W-1:0]  term_id
);
  localparam int unsigned NREG   = 2 ** NIN;
  localparam int unsigned CELL_W = NIN * IDX_W;
  localparam int unsigned CELLS  = 2 ** CELL_W;

  logic [IDY_W-1:0] rule_mem [NREG][CELLS];
  logic [NREG-1:0][CELL_W-1:0] cell_a;
  logic [NIN-1:0]    wsub;
  logic [CELL_W-1:0] wcell;

  assign wsub  = cfg.addr[CELL_W +: NIN];
  assign wcell = cfg.addr[CELL_W-1:0];

  always_ff @(posedge clk) begin
    if (cfg.we && cfg.tbl == CFG_RULE)
      rule_mem[wsub][wcell] <= cfg.data[IDY_W-1:0];
  end

  // address of each sub-rule base: ids of the sets its parities select
  always_comb begin
    for (int r = 0; r < NREG; r++) begin
      for (int i = 0; i < NIN; i++) begin
        cell_a[r][(NIN-1-i)*IDX_W +: IDX_W] =
            r[NIN-1-i] ? id_even[i] : id_odd[i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      term_id <= '0;
    end else if (load) begin
      for (int r = 0; r < NREG; r++) term_id[r] <= rule_mem[r][cell_a[r]];
    end
  end

endmodule
