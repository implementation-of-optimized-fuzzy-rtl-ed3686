// flc_control: control module of the fuzzy logic controller.
//
// Runs one control step as four phases in sequence: Min & Inference (the MIN
// read-modify-write loop, with the inference index registers loaded in its
// first cycle), Max, Coarse and Fine. Each phase is started with a one-cycle
// pulse and ends when the module reports done; the next phase starts in the
// cycle after. done pulses when the fine search has latched the crisp output.
// The phase order follows the source design; the start/done handshake is
// this implementation's. A start while busy is ignored.
module flc_control (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic min_done,
  input  logic max_done,
  input  logic coarse_done,
  input  logic fine_done,
  output logic min_start,
  output logic max_start,
  output logic coarse_start,
  output logic fine_start,
  output logic busy,
  output logic done
);
  typedef enum logic [2:0] {
    PH_IDLE, PH_MIN, PH_MAX, PH_COARSE, PH_FINE
  } phase_e;
  phase_e phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase        <= PH_IDLE;
      min_start    <= 1'b0;
      max_start    <= 1'b0;
      coarse_start <= 1'b0;
      fine_start   <= 1'b0;
      done         <= 1'b0;
    end else begin
      min_start    <= 1'b0;
      max_start    <= 1'b0;
      coarse_start <= 1'b0;
      fine_start   <= 1'b0;
      done         <= 1'b0;
      unique case (phase)
        PH_IDLE:   if (start)       begin phase <= PH_MIN;    min_start    <= 1'b1; end
        PH_MIN:    if (min_done)    begin phase <= PH_MAX;    max_start    <= 1'b1; end
        PH_MAX:    if (max_done)    begin phase <= PH_COARSE; coarse_start <= 1'b1; end
        PH_COARSE: if (coarse_done) begin phase <= PH_FINE;   fine_start   <= 1'b1; end
        PH_FINE:   if (fine_done)   begin phase <= PH_IDLE;   done         <= 1'b1; end
        default:   phase <= PH_IDLE;
      endcase
    end
  end

  assign busy = (phase != PH_IDLE);

  a_onehot_start: assert property (@(posedge clk) disable iff (!rst_n)
      $onehot0({min_start, max_start, coarse_start, fine_start}));

endmodule
