// reconfig_decimator: reconfigurable decimation filter for an oversampling ADC.
//
// The filter lowers the sample rate of an oversampling converter's output by
// a factor chosen at run time from the select line: 2, 4, 8 or 16. Rather
// than one fixed multi-tap FIR filter with multipliers, it is built from a
// chain of identical 2-fold decimators, each a 2-tap averaging FIR that keeps
// every second result. The control block decides how many of the stages are
// used; the output is taken from the last stage in use and the rest of the
// chain is switched off. Cascading k averaging stages gives the sum of each
// group of 2^k consecutive input samples, i.e. a 2^k-sample moving average
// sampled once per group, which is the oversample-and-average scheme that
// trades rate for resolution.
//
// Every stage adds one bit, so the arithmetic is exact. The selected stage's
// sum is shifted left so that its most significant bit always has the same
// weight: out_data = (sum of the M samples of a group) * (16 / M), a signed
// 14-bit value equal to 16 times the group average. At a factor of 16 all 14
// bits carry resolution; at lower factors the low bits are zero.
//
// Interface: in_valid/in_data is the input stream (one sample per cycle at
// most, 10-bit signed two's complement); out_valid/out_data is the decimated
// stream; factor reports the factor in force. Timing: with k = sel+1 stages in
// use, the output for a group appears k cycles after the group's last sample
// is accepted; with a sample on every cycle there is one output every M
// cycles. A change of sel takes effect one cycle later; the cycle it takes
// effect, the chain is cleared and a sample presented then is dropped, so the
// first group of the new factor starts with the next sample.
//
// Taken from the design: the 2-fold decimator chain, factors up to 16, the
// select line and control block, the 14-bit output. This design's own
// choices: the input width, the unit-coefficient 2-tap stages, the output
// alignment, the valid strobes and the clear-on-switch behaviour.
module reconfig_decimator
  import decim_pkg::*;
#(
  parameter int unsigned IN_W     = DEF_IN_W,
  parameter int unsigned N_STAGES = DEF_N_STAGES,
  localparam int unsigned OUT_W   = IN_W + N_STAGES,
  localparam int unsigned SEL_W   = (N_STAGES > 1) ? $clog2(N_STAGES) : 1
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic [SEL_W-1:0]        sel,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data,
  output logic [N_STAGES:0]       factor
);

  logic [N_STAGES-1:0] stage_en;
  logic                clear;
  logic [SEL_W-1:0]    tap;

  decim_control #(.N_STAGES(N_STAGES)) u_control (
    .clk, .rst, .sel, .stage_en, .clear, .tap, .factor
  );

  // Stream between stages, each entry sign-extended to the output width.
  logic                    s_valid [N_STAGES+1];
  logic signed [OUT_W-1:0] s_data  [N_STAGES+1];

  assign s_valid[0] = in_valid;
  assign s_data[0]  = OUT_W'(in_data);

  for (genvar i = 0; i < N_STAGES; i++) begin : g_stage
    localparam int unsigned W = IN_W + i;
    logic signed [W:0] sum;

    decim2_stage #(.IN_W(W)) u_stage (
      .clk,
      .rst,
      .en       (stage_en[i]),
      .clear,
      .in_valid (s_valid[i]),
      .in_data  (s_data[i][W-1:0]),
      .out_valid(s_valid[i+1]),
      .out_data (sum)
    );

    assign s_data[i+1] = OUT_W'(sum);
  end

  // Output tap: the last stage in use, aligned to the full output width.
  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= s_valid[32'(tap) + 1] && !clear;
      if (s_valid[32'(tap) + 1])
        out_data <= s_data[32'(tap) + 1] <<< (N_STAGES - 1 - 32'(tap));
    end
  end

endmodule
