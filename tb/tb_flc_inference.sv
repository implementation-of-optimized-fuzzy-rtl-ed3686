// tb_flc_inference: writes random output term indices into every cell of every
// sub-rule base, then applies random term ids and checks that each index
// register loads the cell its parities select, and holds while load is low.
module tb_flc_inference;
  import flc_pkg::*;
  localparam int NREG   = 2 ** NIN;
  localparam int CELL_W = NIN * IDX_W;
  localparam int CELLS  = 2 ** CELL_W;

  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  always #5 clk = ~clk;

  cfg_wr_t cfg;
  logic [NIN-1:0][IDX_W-1:0] id_odd, id_even;
  logic [NREG-1:0][IDY_W-1:0] term_id, held;
  int model [NREG][CELLS];
  int checks = 0, failures = 0;

  flc_inference dut (.clk(clk), .rst_n(rst_n), .cfg(cfg), .load(load),
                     .id_odd(id_odd), .id_even(id_even), .term_id(term_id));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c;
    cfg = '0; id_odd = '0; id_even = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < NREG; r++)
      for (int k = 0; k < CELLS; k++) begin
        model[r][k] = int'($urandom_range(NY_TERMS - 1));
        cfg.we = 1'b1; cfg.tbl = CFG_RULE;
        cfg.addr = CFG_ADDR_W'((r << CELL_W) | k);
        cfg.data = CFG_DATA_W'(model[r][k]);
        @(posedge clk); #1;
      end
    cfg.we = 1'b0;
    for (int t = 0; t < 400; t++) begin
      for (int i = 0; i < NIN; i++) begin
        id_odd[i]  = IDX_W'($urandom);
        id_even[i] = IDX_W'($urandom);
      end
      load = 1'b1;
      @(posedge clk); #1;
      load = 1'b0;
      for (int r = 0; r < NREG; r++) begin
        c = 0;
        for (int i = 0; i < NIN; i++)
          c = (c << IDX_W) | (r[NIN-1-i] ? int'(id_even[i]) : int'(id_odd[i]));
        checks++;
        if (int'(term_id[r]) != model[r][c]) begin
          failures++;
          $display("test %0d sub %0d cell %0d: got %0d expected %0d", t, r, c, term_id[r], model[r][c]);
        end
      end
      held = term_id;
      id_odd = ~id_odd;
      @(posedge clk); #1;
      checks++;
      if (term_id !== held) begin failures++; $display("index registers changed without load"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
