// tb_ttfs_encoder: checks the TTFS encoder against a model.
// The model computes the threshold of step k as 2^(-1.4375*x) with x = k/8 (the
// shift-and-add exponent, its integer/fraction split and a (1+f) mantissa) and
// fires at the steps where sample > threshold and the step time has reached the
// refractory register. Two encoders run side by side: the default one (refractory
// longer than the window: one spike per sample) and one with T_REF = 5 steps (later
// crossings fire again after the refractory time). Checked per sample: every step's
// spike, 40 steps from start to done, and that large samples fire earlier.
module tb_ttfs_encoder;
  logic clk = 0, rst_n = 0, start = 0;
  logic [15:0] data;
  logic spike_a, sv_a, done_a, busy_a, spike_b, sv_b, done_b, busy_b;
  logic [5:0] step_a, step_b;
  int checks = 0, failures = 0;

  ttfs_encoder dut_a (.clk, .rst_n, .start, .data, .spike(spike_a), .step_valid(sv_a),
                      .step(step_a), .done(done_a), .busy(busy_a));
  ttfs_encoder #(.T_REF(16'd640)) dut_b (.clk, .rst_n, .start, .data, .spike(spike_b),
                      .step_valid(sv_b), .step(step_b), .done(done_b), .busy(busy_b));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // threshold model, Q1.15
  function automatic int thr(input int k);
    int x, p, ip, fp, sh, mm;
    longint m;
    x  = k * 128;                       // Q6.10
    p  = x + x / 2 - x / 16;            // 1.4375 x, truncated like the shifts
    // -p = -(ip) + fp with 0 <= fp < 1024
    ip = (p + 1023) / 1024;             // ceil
    fp = ip * 1024 - p;
    sh = ip;
    mm = (1024 + fp) * 32;
    m  = longint'(mm);              // (1+f) in Q1.15
    if (sh >= 24) return 0;
    return int'(m >> sh);
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int first_a;
  task automatic encode(input logic [15:0] d);
    int ref_a, ref_b, lat, nspk_a;
    bit exp_a, exp_b;
    @(negedge clk);
    data = d; start = 1;
    @(negedge clk);
    start = 0;
    ref_a = 0; ref_b = 0; nspk_a = 0; first_a = -1;
    for (int k = 0; k < 40; k++) begin
      exp_a = (int'(d) > thr(k)) && (k * 128 >= ref_a);
      exp_b = (int'(d) > thr(k)) && (k * 128 >= ref_b);
      if (exp_a) begin ref_a += 5120; nspk_a++; if (first_a < 0) first_a = k; end
      if (exp_b) ref_b += 640;
      if (!(sv_a && sv_b && step_a == 6'(k) && step_b == 6'(k)))
        check(0, $sformatf("step %0d not valid", k));
      if (spike_a !== exp_a) check(0, $sformatf("d=%h step %0d spike %b exp %b thr %0d", d, k, spike_a, exp_a, thr(k)));
      if (spike_b !== exp_b) check(0, $sformatf("d=%h step %0d refr spike %b exp %b", d, k, spike_b, exp_b));
      if ((k == 39) != done_a) check(0, $sformatf("done at step %0d", k));
      @(negedge clk);
    end
    check(!busy_a && !busy_b, "idle after 40 steps");
    check(nspk_a <= 1, "at most one spike with default refractory");
    checks++;
  endtask

  initial begin
    int f_hi, f_lo, multi;
    data = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    check(thr(0) == 32768 && thr(8) == 32'h3200, "threshold model self-check");
    encode(16'h8000); f_hi = first_a;
    encode(16'h2000); f_lo = first_a;
    check(f_hi >= 0 && f_lo > f_hi, $sformatf("larger sample fires earlier: %0d %0d", f_hi, f_lo));
    encode(16'h0010);
    check(first_a == -1, "tiny sample never crosses");
    for (int i = 0; i < 200; i++) encode(16'($urandom_range(0, 32768)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
