// tb_decim2_stage: self-checking testbench for one 2-fold decimator stage.
//
// Drives random signed samples with random gaps, occasional clear pulses and
// enable drops, including full-scale values. A reference model in the
// testbench pairs up the accepted samples and predicts, for every cycle,
// whether an output is due one cycle after the pair's second sample and what
// the pair's sum is. Inputs change on the falling edge; outputs are checked
// on the falling edge after the rising edge that produced them, which also
// checks the one-cycle latency.
module tb_decim2_stage;
  localparam int unsigned IN_W = 10;
  localparam int          N    = 6000;

  logic clk = 1'b0;
  logic rst, en, clear, in_valid;
  logic signed [IN_W-1:0] in_data;
  logic out_valid;
  logic signed [IN_W:0] out_data;

  int checks = 0, failures = 0;
  int pairs = 0, clears_mid_pair = 0, disables = 0;

  decim2_stage #(.IN_W(IN_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [IN_W-1:0] rand_sample();
    case ($urandom_range(0, 7))
      0:       return {1'b0, {(IN_W-1){1'b1}}};   // largest positive
      1:       return {1'b1, {(IN_W-1){1'b0}}};   // most negative
      default: return IN_W'($urandom);
    endcase
  endfunction

  initial begin
    automatic bit have_first = 0;
    automatic int first = 0;
    automatic bit exp_valid = 0;
    automatic int exp_data = 0;

    rst = 1; en = 1; clear = 0; in_valid = 0; in_data = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;

    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      // Check what the previous rising edge produced.
      checks++;
      if (out_valid !== exp_valid) begin
        failures++;
        $display("cycle %0d: out_valid=%0b expected %0b", n, out_valid, exp_valid);
      end else if (exp_valid) begin
        checks++;
        if (int'(out_data) != exp_data) begin
          failures++;
          $display("cycle %0d: out_data=%0d expected %0d", n, out_data, exp_data);
        end
      end

      // New stimulus for the next rising edge.
      in_valid = ($urandom_range(0, 3) != 0);
      in_data  = rand_sample();
      clear    = ($urandom_range(0, 40) == 0);
      en       = ($urandom_range(0, 60) != 0);

      // Reference model of that edge.
      exp_valid = 0;
      if (clear || !en) begin
        if (have_first && clear) clears_mid_pair++;
        if (!en) disables++;
        have_first = 0;
      end else if (in_valid) begin
        if (!have_first) begin
          have_first = 1;
          first      = int'(in_data);
        end else begin
          have_first = 0;
          exp_valid  = 1;
          exp_data   = first + int'(in_data);
          pairs++;
        end
      end
    end

    if (pairs == 0 || clears_mid_pair == 0 || disables == 0) begin
      failures++;
      $display("stimulus did not cover: pairs=%0d clears_mid_pair=%0d disables=%0d",
               pairs, clears_mid_pair, disables);
    end
    $display("pairs=%0d clears_mid_pair=%0d disables=%0d", pairs, clears_mid_pair, disables);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
