// decim2_stage: one 2-fold decimator of the reconfigurable decimation chain.
//
// It is a 2-tap linear-phase FIR filter (both taps equal to one, i.e. a
// first-order moving-average filter) followed by a drop of every second
// result, done in one step: the first sample of each pair is held, and when
// the second arrives the stage outputs their sum. The sum is one bit wider
// than the input, so the stage is exact: the sum of two samples equals twice
// their average, with the extra bit carrying the added resolution that
// averaging brings.
//
// Interface: a valid/data stream in and out. in_valid may be high on any
// cycle; out_valid is high for one cycle per pair, so never on two cycles in a
// row. Timing: the output for a pair is registered and appears the cycle after
// the pair's second sample is accepted. clear (from the control block) and a
// low en drop a half-collected pair and any pending output, so a new
// decimation factor starts on a clean pair boundary; a sample presented while
// clear or !en is high is not taken. Reset is synchronous, as the design has
// no asynchronous control signals.
//
// The filter choice (2 taps, unit coefficients, so no multipliers) follows the
// description of a 2-fold decimator as an M-tap linear-phase averaging FIR
// with M equal to the decimation degree; the enable and clear inputs are this
// design's own way of letting the control block reconfigure the chain.
module decim2_stage
  import decim_pkg::*;
#(
  parameter int unsigned IN_W = DEF_IN_W
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   en,
  input  logic                   clear,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] in_data,
  output logic                   out_valid,
  output logic signed [IN_W:0]   out_data
);

  logic signed [IN_W-1:0] held;   // first sample of the current pair
  logic                   phase;  // 1: holding the first sample of a pair

  always_ff @(posedge clk) begin
    if (rst) begin
      held      <= '0;
      phase     <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else if (clear || !en) begin
      phase     <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (!phase) begin
          held  <= in_data;
          phase <= 1'b1;
        end else begin
          out_data  <= (IN_W+1)'(held) + (IN_W+1)'(in_data);
          out_valid <= 1'b1;
          phase     <= 1'b0;
        end
      end
    end
  end

  // A 2-fold decimator can never produce outputs on consecutive cycles.
  a_no_back_to_back: assert property (@(posedge clk) disable iff (rst)
    out_valid |=> !out_valid);

endmodule
