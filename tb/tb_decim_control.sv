// tb_decim_control: self-checking testbench for the control block.
//
// Presents a random sequence of select values (holding each for a random
// number of cycles) and checks, every cycle, that the registered settings
// follow the select line one cycle later: the stage enables are a
// thermometer code up to the selected stage, the tap is the selected stage,
// the factor is 2, 4, 8 or 16, and clear pulses for exactly one cycle when
// the selection changes (and on the first cycle after reset).
module tb_decim_control;
  import decim_pkg::*;

  localparam int unsigned N_STAGES = 4;
  localparam int          N        = 3000;

  logic clk = 1'b0;
  logic rst;
  logic [1:0] sel;
  logic [N_STAGES-1:0] stage_en;
  logic clear;
  logic [1:0] tap;
  logic [N_STAGES:0] factor;

  int checks = 0, failures = 0;
  int switches = 0;
  int seen [4] = '{default: 0};

  decim_control #(.N_STAGES(N_STAGES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected settings per selection, written out as a table.
  localparam logic [3:0] EN_TABLE     [4] = '{4'b0001, 4'b0011, 4'b0111, 4'b1111};
  localparam int         FACTOR_TABLE [4] = '{2, 4, 8, 16};

  task automatic check(string what, int got, int exp, int n);
    checks++;
    if (got != exp) begin
      failures++;
      $display("cycle %0d: %s=%0d expected %0d", n, what, got, exp);
    end
  endtask

  initial begin
    int prev_sel, cur_sel, hold;
    bit exp_clear;

    rst = 1; sel = DEC_BY_2;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    check("clear after reset", int'(clear), 1, 0);
    prev_sel = 0;
    hold = 0;

    for (int n = 1; n < N; n++) begin
      if (hold == 0) begin
        cur_sel = $urandom_range(0, 3);
        hold    = $urandom_range(1, 6);
      end
      hold--;
      sel = 2'(cur_sel);
      exp_clear = (cur_sel != prev_sel);
      if (exp_clear) switches++;
      @(negedge clk);
      check("stage_en", int'(stage_en), int'(EN_TABLE[cur_sel]), n);
      check("tap", int'(tap), cur_sel, n);
      check("factor", int'(factor), FACTOR_TABLE[cur_sel], n);
      check("clear", int'(clear), int'(exp_clear), n);
      seen[cur_sel]++;
      prev_sel = cur_sel;
    end

    for (int s = 0; s < 4; s++)
      if (seen[s] == 0) begin
        failures++;
        $display("selection %0d never used", s);
      end
    if (switches == 0) begin
      failures++;
      $display("no selection change happened");
    end
    $display("switches=%0d", switches);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
