// flc_min: MIN module built on a read-modify-write loop.
//
// Instead of a tree of comparators, 2^NIN registers hold the running minimum
// for the 2^NIN sub-rule bases (MINoo, MINoe, MINeo, MINee for two inputs).
// On start they are preset to the largest membership value (all ones). Then,
// for input i = 0..NIN-1 in turn, each register r = 0..2^NIN-1 is read,
// compared with the membership of input i from the odd set (bit NIN-1-i of r
// is 0) or the even set (that bit is 1), and the smaller value is written
// back. One comparator, one input multiplexer and one register decoder serve
// all registers, as in the source design.
//
// Timing: start (1 cycle, preset) then NIN*2^NIN read-modify-write cycles;
// done pulses in the cycle after the last write, when min_q is final and
// stays valid until the next start. mu_odd/mu_even must be stable meanwhile.
module flc_min
  import flc_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic [NIN-1:0][Q_BITS-1:0]    mu_odd,
  input  logic [NIN-1:0][Q_BITS-1:0]    mu_even,
  output logic                          busy,
  output logic                          done,
  output logic [2**NIN-1:0][Q_BITS-1:0] min_q
);
  localparam int unsigned NREG  = 2 ** NIN;
  localparam int unsigned VAR_W = (NIN > 1) ? $clog2(NIN) : 1;

  logic [VAR_W-1:0] var_i;    // input variable of this pass
  logic [NIN-1:0]   reg_r;    // register being modified
  logic [Q_BITS-1:0] mu_sel, cur, nxt;
  logic             last;

  // input multiplexer: membership of variable var_i in the set chosen by reg_r
  always_comb begin
    if (reg_r[NIN-1-var_i]) mu_sel = mu_even[var_i];
    else                    mu_sel = mu_odd[var_i];
    cur  = min_q[reg_r];
    nxt  = (mu_sel < cur) ? mu_sel : cur;
    last = (32'(var_i) == NIN - 1) && (32'(reg_r) == NREG - 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      var_i <= '0;
      reg_r <= '0;
      min_q <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy  <= 1'b1;
        var_i <= '0;
        reg_r <= '0;
        min_q <= '1;
      end else if (busy) begin
        min_q[reg_r] <= nxt;
        if (last) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else if (32'(reg_r) == NREG - 1) begin
          reg_r <= '0;
          var_i <= var_i + 1'b1;
        end else begin
          reg_r <= reg_r + 1'b1;
        end
      end
    end
  end

endmodule
