// tb_reconfig_decimator: end-to-end testbench of the reconfigurable
// decimation filter at its default size (10-bit input, four 2-fold stages,
// 14-bit output, factors 2 to 16).
//
// The testbench streams signed samples through the filter in a series of
// phases. Each phase picks a decimation factor on the select line, then
// sends either an unbroken stream (one sample per cycle), a stream with random
// gaps, or a full-scale stream (all most-negative or all largest-positive
// samples). A reference model groups the accepted samples M at a time and
// predicts each output: (sum of the group) * 16 / M, due k = log2(M) cycles
// after the group's last sample is accepted. Every output is checked for its
// value and for the cycle it appears on, so the one-output-per-M-samples rate
// and the latency are checked too; outputs nobody expected count as failures.
//
// Between phases the input is idled, then sel is changed. Half the time the
// idle gap is the shortest that still lets every complete group out (k-1
// cycles with k stages in use), which checks that boundary exactly. The testbench presents a sample on the
// cycle the new factor takes effect and expects it to be dropped, and it
// often leaves a half-collected group behind to check that a switch discards
// it. It counts how often each mechanism happened: outputs at each factor,
// factor switches, bypassed stages, discarded partial groups, the dropped
// sample, gapped input and full-scale groups; a mechanism that never happened
// is a failure.
module tb_reconfig_decimator;
  import decim_pkg::*;

  localparam int IN_W  = DEF_IN_W;
  localparam int OUT_W = DEF_IN_W + DEF_N_STAGES;

  typedef struct {
    int value;
    int cycle;
  } expect_t;

  typedef enum int {MODE_STREAM, MODE_GAPS, MODE_FULL_SCALE} phase_mode_e;

  logic clk = 1'b0;
  logic rst;
  dec_sel_e sel;
  logic in_valid;
  logic signed [IN_W-1:0] in_data;
  logic out_valid;
  logic signed [OUT_W-1:0] out_data;
  logic [DEF_N_STAGES:0] factor;

  reconfig_decimator dut (
    .clk, .rst, .sel, .in_valid, .in_data, .out_valid, .out_data, .factor
  );

  always #5 clk = ~clk;

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;
  expect_t expq [$];

  // Mechanism counters.
  int outs_at_factor [4] = '{default: 0};
  int switches = 0, bypassed_outputs = 0, partial_discards = 0;
  int dropped_on_switch = 0, gapped_samples = 0, full_scale_groups = 0;
  int tight_switches = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output monitor: outputs change on rising edges and are checked on the
  // falling edge that follows.
  initial forever begin
    @(negedge clk);
    if (!rst) begin
      if (expq.size() != 0 && expq[0].cycle < cyc) begin
        failures++;
        $display("cycle %0d: expected output %0d at cycle %0d never came",
                 cyc, expq[0].value, expq[0].cycle);
        void'(expq.pop_front());
      end
      if (out_valid) begin
        if (expq.size() == 0) begin
          failures++;
          $display("cycle %0d: unexpected output %0d", cyc, out_data);
        end else begin
          expect_t e;
          e = expq.pop_front();
          checks += 2;
          if (int'(out_data) != e.value) begin
            failures++;
            $display("cycle %0d: out_data=%0d expected %0d", cyc, out_data, e.value);
          end
          if (cyc != e.cycle) begin
            failures++;
            $display("cycle %0d: output came at cycle %0d, expected %0d", cyc, cyc, e.cycle);
          end
          if (e.value == -(1 << (OUT_W - 1)) || e.value == ((1 << (IN_W - 1)) - 1) * 16)
            full_scale_groups++;
          case (int'(factor))
            2:  outs_at_factor[0]++;
            4:  outs_at_factor[1]++;
            8:  outs_at_factor[2]++;
            16: outs_at_factor[3]++;
            default: begin
              failures++;
              $display("cycle %0d: factor output %0d is not a valid factor", cyc, factor);
            end
          endcase
          if (factor != 5'd16) bypassed_outputs++;
        end
      end
    end
  end

  // Reference model state for the current phase.
  int cur_sel = 0;
  int grp_sum = 0;
  int grp_cnt = 0;

  // Present one sample on the next rising edge (called on a falling edge)
  // and update the model.
  task automatic send(input logic signed [IN_W-1:0] d);
    int m, k;
    m = 2 << cur_sel;
    k = cur_sel + 1;
    in_valid = 1'b1;
    in_data  = d;
    grp_sum += int'(d);
    grp_cnt++;
    if (grp_cnt == m) begin
      expq.push_back('{value: grp_sum * (16 / m), cycle: cyc + 1 + k});
      grp_sum = 0;
      grp_cnt = 0;
    end
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  task automatic idle(input int n);
    in_valid = 1'b0;
    repeat (n) @(negedge clk);
  endtask

  // Switch to a new factor: drain, change sel, present one sample on the
  // cycle the change takes effect (it must be dropped), then continue.
  task automatic switch_to(input int new_sel);
    // A group is kept if its last sample was accepted at least k edges
    // before the edge that registers the new sel: k-1 idle cycles suffice.
    if ($urandom_range(0, 1) != 0) begin
      idle(cur_sel);
      tight_switches++;
    end else begin
      idle(8);
    end
    if (grp_cnt != 0) partial_discards++;
    grp_sum = 0;
    grp_cnt = 0;
    sel = dec_sel_e'(new_sel);
    if (new_sel != cur_sel) switches++;
    @(negedge clk);
    if (new_sel != cur_sel) begin
      in_valid = 1'b1;            // accepted on the clear cycle: dropped
      in_data  = IN_W'($urandom);
      dropped_on_switch++;
    end
    cur_sel = new_sel;
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  task automatic run_phase(input phase_mode_e mode, input int n);
    logic signed [IN_W-1:0] fs;
    fs = ($urandom_range(0, 1) != 0) ? {1'b1, {(IN_W-1){1'b0}}} : {1'b0, {(IN_W-1){1'b1}}};
    for (int i = 0; i < n; i++) begin
      case (mode)
        MODE_STREAM:     send(IN_W'($urandom));
        MODE_FULL_SCALE: send(fs);
        default: begin
          if ($urandom_range(0, 2) == 0) idle($urandom_range(1, 3));
          send(IN_W'($urandom));
          gapped_samples++;
        end
      endcase
    end
  endtask

  initial begin
    int s;
    rst = 1'b1; sel = DEC_BY_2; in_valid = 1'b0; in_data = '0;
    repeat (4) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    idle(3);

    // Each factor in turn: unbroken stream, gapped stream, full scale.
    for (int f = 0; f < 4; f++) begin
      switch_to(f);
      run_phase(MODE_STREAM, 8 * (2 << f));
      run_phase(MODE_GAPS, 4 * (2 << f) + 1);    // leaves a partial group
      run_phase(MODE_FULL_SCALE, 2 << f);
      run_phase(MODE_FULL_SCALE, 2 << f);
    end

    // Random factor changes with random stimulus.
    for (int p = 0; p < 40; p++) begin
      do s = $urandom_range(0, 3); while (s == cur_sel);
      switch_to(s);
      run_phase(phase_mode_e'($urandom_range(0, 2)), $urandom_range(1, 80));
    end
    idle(10);

    if (expq.size() != 0) begin
      failures++;
      $display("%0d expected outputs never came", expq.size());
    end
    for (int f = 0; f < 4; f++)
      if (outs_at_factor[f] == 0) begin
        failures++;
        $display("no output at factor %0d", 2 << f);
      end
    if (switches == 0 || bypassed_outputs == 0 || partial_discards == 0 ||
        dropped_on_switch == 0 || gapped_samples == 0 || full_scale_groups == 0 ||
        tight_switches == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    $display("outputs at factor 2/4/8/16: %0d/%0d/%0d/%0d", outs_at_factor[0],
             outs_at_factor[1], outs_at_factor[2], outs_at_factor[3]);
    $display("switches=%0d bypassed_outputs=%0d partial_discards=%0d dropped_on_switch=%0d",
             switches, bypassed_outputs, partial_discards, dropped_on_switch);
    $display("gapped_samples=%0d full_scale_groups=%0d tight_switches=%0d cycles=%0d",
             gapped_samples, full_scale_groups, tight_switches, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
