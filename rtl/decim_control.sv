// decim_control: the control block of the reconfigurable decimation filter.
//
// It reads the select line and turns it into the settings of the 2-fold
// decimator chain: which stages run (stage_en, the unused tail of the chain
// is switched off and bypassed), which stage's output is the filter output
// (tap), and the decimation factor in force (factor = 2^(tap+1)). The select
// value is the index of the last stage in use, so with four stages the
// factors are 2, 4, 8 and 16. Every factor is even, so bit 0 of factor is
// always 0; the port keeps the plain binary value for readability.
//
// Timing: sel is registered, so a new selection takes effect one cycle after
// it is presented. In that same cycle clear pulses high for one cycle so every
// stage drops its half-collected pair and the new factor starts on a clean
// group boundary. clear is also high on the first cycle after reset.
//
// Taking the factor from a select line through a control block follows the
// design; the encoding of sel, the registering, and the clear pulse on a
// change are this design's own choices.
module decim_control
  import decim_pkg::*;
#(
  parameter int unsigned N_STAGES = DEF_N_STAGES,
  localparam int unsigned SEL_W   = (N_STAGES > 1) ? $clog2(N_STAGES) : 1
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [SEL_W-1:0]    sel,
  output logic [N_STAGES-1:0] stage_en,
  output logic                clear,
  output logic [SEL_W-1:0]    tap,
  output logic [N_STAGES:0]   factor
);

  logic [SEL_W-1:0] sel_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      sel_q <= '0;
      clear <= 1'b1;
    end else begin
      // Selections beyond the last stage are clamped to the full chain.
      if (32'(sel) >= N_STAGES) begin
        sel_q <= SEL_W'(N_STAGES - 1);
        clear <= (32'(sel_q) != N_STAGES - 1);
      end else begin
        sel_q <= sel;
        clear <= (sel != sel_q);
      end
    end
  end

  always_comb begin
    for (int i = 0; i < N_STAGES; i++)
      stage_en[i] = (i <= 32'(sel_q));
    tap    = sel_q;
    factor = (N_STAGES+1)'(2) << sel_q;
  end

endmodule
