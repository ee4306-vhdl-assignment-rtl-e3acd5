// tb_prs_gen_zero: checks the second timer's random generator. After reset
// the register holds zero, the zero check must flag it and load 010101010 on
// the next clock. Then, under random steps, the value must follow an
// independently written 9-bit shift register with feedback stage 9 xor
// stage 4, hold between steps, and visit all 511 non-zero values once per
// 511 steps.
module tb_prs_gen_zero;
  timeunit 1ns; timeprecision 1ns;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;

  logic step, bad_start;
  logic [8:0] prseq;
  prs_gen_zero dut (.clk, .rst_n, .step, .prseq, .bad_start);

  int checks = 0, failures = 0;
  logic [8:0] model;
  bit seen [512];
  int steps = 0, distinct = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL step %0d: %s", steps, what);
    end
  endtask

  function automatic logic [8:0] lfsr(input logic [8:0] v);
    logic [8:0] r;
    for (int i = 8; i > 0; i--) r[i] = v[i-1];
    r[0] = (v[8] != v[3]);
    return r;
  endfunction

  initial begin
    step = 1'b0;
    repeat (3) @(negedge clk);
    check(prseq == 9'd0 && bad_start, "reset to zero, flagged");
    rst_n = 1'b1;
    step = 1'b1;                     // a step must not delay the reload
    @(negedge clk);
    check(prseq == 9'b010101010 && !bad_start, "zero reloaded with 010101010");
    model = 9'b010101010;
    repeat (3000) begin
      step = ($urandom_range(2) == 0);
      @(negedge clk);
      if (step) begin
        model = lfsr(model);
        steps++;
        if (steps <= 511) begin
          if (!seen[model]) distinct++;
          seen[model] = 1'b1;
        end
      end
      check(prseq == model, $sformatf("value %0d expected %0d", prseq, model));
      check(!bad_start, "no zero state");
    end
    check(steps > 511 && distinct == 511 && !seen[0], "511 distinct non-zero values");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
