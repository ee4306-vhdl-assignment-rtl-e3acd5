// tb_prs_gen_range: checks the first timer's random generator. After reset
// it holds the XNOR lock-up value (all ones), which is out of range, so it
// must wait for a fast step and then hold zero. Under random hourly and fast
// steps the value must follow an independently written model: stage 9 xnor
// stage 4 feedback, fast steps taken only while the value is 450 or more,
// hourly steps only while it is below. The XNOR sequence from zero must cover
// 511 values, and both kinds of step must be seen.
module tb_prs_gen_range;
  timeunit 1ns; timeprecision 1ns;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;

  logic step_hour, step_fast, max_seq, bad_start;
  logic [8:0] prseq;
  prs_gen_range dut (.clk, .rst_n, .step_hour, .step_fast, .prseq, .max_seq, .bad_start);

  int checks = 0, failures = 0;
  logic [8:0] model;
  int fast_taken = 0, hour_taken = 0, fast_ignored = 0, hour_ignored = 0, recoveries = 0;
  int cyc = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL cycle %0d: %s", cyc, what);
    end
  endtask

  function automatic logic [8:0] lfsr_xnor(input logic [8:0] v);
    return {v[7:0], ~(v[8] ^ v[3])};
  endfunction

  initial begin
    step_hour = 1'b0; step_fast = 1'b0;
    repeat (3) @(negedge clk);
    check(prseq == 9'h1FF && bad_start && max_seq, "reset to all ones");
    rst_n = 1'b1;
    step_hour = 1'b1;                          // out of range: hourly step ignored
    @(negedge clk);
    check(prseq == 9'h1FF, "hourly step ignored while out of range");
    step_hour = 1'b0; step_fast = 1'b1;
    @(negedge clk);
    check(prseq == 9'd0, "all ones replaced by zero");
    model = 9'd0;
    repeat (20000) begin
      cyc++;
      step_hour = ($urandom_range(7) == 0);
      step_fast = ($urandom_range(3) == 0);
      #0;
      check(max_seq == (model >= 450), "max_seq");
      check(bad_start == (model == 9'h1FF), "bad_start");
      if (model >= 450) begin
        if (step_fast) begin
          fast_taken++;
          if (model == 9'h1FF) recoveries++;
          model = (model == 9'h1FF) ? 9'd0 : lfsr_xnor(model);
        end else if (step_hour) hour_ignored++;
      end else begin
        if (step_hour) begin hour_taken++; model = lfsr_xnor(model); end
        else if (step_fast) fast_ignored++;
      end
      @(negedge clk);
      check(prseq == model, $sformatf("value %0d expected %0d", prseq, model));
    end
    check(fast_taken > 0 && hour_taken > 511 && fast_ignored > 0 && hour_ignored > 0,
          "all step kinds seen");
    $display("fast %0d hour %0d ignored fast %0d hour %0d recoveries %0d",
             fast_taken, hour_taken, fast_ignored, hour_ignored, recoveries);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
