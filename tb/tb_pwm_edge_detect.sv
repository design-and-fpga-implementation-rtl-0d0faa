// tb_pwm_edge_detect: drives a random PWM level sequence and checks
// rise = step & level & ~previous level, with the previous level loaded by restart
// and held while step is low.
module tb_pwm_edge_detect;
  logic clk = 0, rst_n = 0, restart = 0, prev_level = 0, step = 0, pwm = 0;
  logic rise, prev_m;
  int checks = 0, failures = 0, rises = 0;

  pwm_edge_detect dut (.clk, .rst_n, .restart, .prev_level, .step, .pwm, .rise);

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
    @(negedge clk);
    for (int i = 0; i < 500; i++) begin
      if (i % 50 == 0) begin
        restart = 1; prev_level = 1'($urandom); prev_m = prev_level; step = 0;
        @(negedge clk); restart = 0;
      end
      step = 1'($urandom_range(0, 3) != 0);
      pwm  = 1'($urandom);
      #1;
      check(rise == (step && pwm && !prev_m), $sformatf("i=%0d rise %b", i, rise));
      if (rise) rises++;
      if (step) prev_m = pwm;
      @(negedge clk);
    end
    check(rises > 50, "edges seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
