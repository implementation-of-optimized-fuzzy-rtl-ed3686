// flc_max: MAX module built on a read-modify-write loop.
//
// Several sub-rule bases may name the same output term; the output term's
// membership is then the largest of their firing strengths. NY_TERMS
// registers, one per output term, are cleared to 0 on start. In each of the
// following 2^NIN cycles an upper multiplexer picks firing strength min_q[k]
// and a lower multiplexer its output term index term_id[k]; the register that
// index addresses is read, compared with the strength and written back with
// the larger value. The read-modify-write loop follows the source design.
//
// Timing: start (clear) then 2^NIN cycles; done pulses in the cycle after the
// last write and mu_y then holds until the next start. Inputs must be stable
// while busy.
module flc_max
  import flc_pkg::*;
(
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            start,
  input  logic [2**NIN-1:0][Q_BITS-1:0]   min_q,
  input  logic [2**NIN-1:0][IDY_W-1:0]    term_id,
  output logic                            busy,
  output logic                            done,
  output logic [NY_TERMS-1:0][Q_BITS-1:0] mu_y
);
  localparam int unsigned NREG = 2 ** NIN;

  logic [NIN-1:0]    k;
  logic [Q_BITS-1:0] strength, cur, nxt;
  logic [IDY_W-1:0]  tid;

  always_comb begin
    strength = min_q[k];            // upper multiplexer
    tid      = term_id[k];          // lower multiplexer
    cur      = (32'(tid) < NY_TERMS) ? mu_y[tid] : '0;
    nxt      = (strength > cur) ? strength : cur;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      k    <= '0;
      mu_y <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        k    <= '0;
        mu_y <= '0;
      end else if (busy) begin
        if (32'(tid) < NY_TERMS) mu_y[tid] <= nxt;
        k <= k + 1'b1;
        if (32'(k) == NREG - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  // a rule that fires must name an existing output term
  a_tid_range: assert property (@(posedge clk) disable iff (!rst_n)
                                busy && strength != '0 |-> 32'(tid) < NY_TERMS);

endmodule
