// tb_oversampled_average: workload testbench for the use the filter is built
// for, turning a low-resolution oversampled converter stream into a
// higher-resolution, lower-rate one by averaging.
//
// A behavioural first-order sigma-delta modulator in the testbench stands in
// for a 1-bit oversampling converter: for a constant input level x between 0
// and 1 it emits a stream of 0s and 1s whose density is x. The stream is fed
// to the decimation filter at factors 2, 4, 8 and 16. Each output, divided by
// 16, is the average of its group of M bits, and for a first-order modulator
// that average lies within 1/M of x, so every output is checked against that
// bound: each doubling of the factor halves the error, one more bit of
// resolution, as a 1-bit converter followed by averaging of M samples acts as
// a converter with log2(M) more bits. Each output is also checked exactly
// against the sum of its group. One sample enters per clock cycle.
module tb_oversampled_average;
  import decim_pkg::*;

  localparam int IN_W  = DEF_IN_W;
  localparam int OUT_W = DEF_IN_W + DEF_N_STAGES;
  localparam int GROUPS_PER_LEVEL = 24;
  localparam real LEVELS [5] = '{0.1, 0.25, 0.5, 0.7, 0.93};

  logic clk = 1'b0;
  logic rst;
  dec_sel_e sel;
  logic in_valid;
  logic signed [IN_W-1:0] in_data;
  logic out_valid;
  logic signed [OUT_W-1:0] out_data;
  logic [DEF_N_STAGES:0] factor;

  reconfig_decimator dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int outputs_per_factor [4] = '{default: 0};
  real worst_err [4] = '{default: 0.0};

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Group sums sent, in order, with the level they came from.
  int  sumq  [$];
  real lvlq  [$];
  int  cur_sel = 0;

  initial forever begin
    @(negedge clk);
    if (!rst && out_valid) begin
      if (sumq.size() == 0) begin
        failures++;
        $display("unexpected output %0d", out_data);
      end else begin
        automatic int  m   = 2 << cur_sel;
        automatic int  s   = sumq.pop_front();
        automatic real x   = lvlq.pop_front();
        automatic real avg = real'(out_data) / 16.0;
        automatic real err = (avg > x) ? avg - x : x - avg;
        checks += 2;
        if (int'(out_data) != s * (16 / m)) begin
          failures++;
          $display("factor %0d: out_data=%0d expected %0d", m, out_data, s * (16 / m));
        end
        if (err > 1.0 / real'(m) + 1e-9) begin
          failures++;
          $display("factor %0d level %f: average %f is off by more than 1/%0d", m, x, avg, m);
        end
        if (err > worst_err[cur_sel]) worst_err[cur_sel] = err;
        outputs_per_factor[cur_sel]++;
      end
    end
  end

  initial begin
    real integ;
    int  m, gsum, bit_out;
    rst = 1'b1; sel = DEC_BY_2; in_valid = 1'b0; in_data = '0;
    repeat (4) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;

    for (int f = 0; f < 4; f++) begin
      // Change the factor with the input idle; the chain is then cleared.
      repeat (10) @(negedge clk);
      cur_sel = f;
      sel = dec_sel_e'(f);
      repeat (3) @(negedge clk);
      m = 2 << f;
      for (int l = 0; l < 5; l++) begin
        integ = 0.5;
        gsum  = 0;
        for (int n = 0; n < GROUPS_PER_LEVEL * m; n++) begin
          // First-order sigma-delta: accumulate x, emit 1 on overflow.
          integ += LEVELS[l];
          bit_out = (integ >= 1.0) ? 1 : 0;
          integ -= real'(bit_out);
          gsum += bit_out;
          if ((n % m) == m - 1) begin
            sumq.push_back(gsum);
            lvlq.push_back(LEVELS[l]);
            gsum = 0;
          end
          in_valid = 1'b1;
          in_data  = IN_W'(bit_out);
          @(negedge clk);
        end
      end
      in_valid = 1'b0;
    end
    repeat (10) @(negedge clk);

    if (sumq.size() != 0) begin
      failures++;
      $display("%0d outputs never came", sumq.size());
    end
    for (int f = 0; f < 4; f++) begin
      $display("factor %0d: %0d outputs, worst |average - level| = %f (bound %f)",
               2 << f, outputs_per_factor[f], worst_err[f], 1.0 / real'(2 << f));
      if (outputs_per_factor[f] != 5 * GROUPS_PER_LEVEL) begin
        failures++;
        $display("factor %0d: %0d outputs, expected %0d", 2 << f, outputs_per_factor[f],
                 5 * GROUPS_PER_LEVEL);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
