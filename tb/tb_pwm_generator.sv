// tb_pwm_generator: checks the PWM reference: after restart the level of step 0 is
// reported as high and steps 1..40 follow high/low with period 4 and 2 high steps
// (high when step mod 4 is 0 or 1); the phase holds while step is low and restart
// returns to step 1 from any phase.
module tb_pwm_generator;
  logic clk = 0, rst_n = 0, restart = 0, step = 0;
  logic pwm, pwm_init;
  int checks = 0, failures = 0;

  pwm_generator dut (.clk, .rst_n, .restart, .step, .pwm, .pwm_init);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int r = 0; r < 3; r++) begin
      @(negedge clk); restart = 1; @(negedge clk); restart = 0;
      check(pwm_init == 1'b1, "level of step 0");
      for (int t = 1; t <= 40 - r * 7; t++) begin
        step = 1;
        check(pwm == ((t % 4) < 2), $sformatf("run %0d step %0d level %b", r, t, pwm));
        @(negedge clk);
        if (t == 9) begin
          step = 0;
          repeat (3) @(negedge clk);   // hold
        end
      end
      step = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
