// tb_pwm_align: checks the PWM alignment against a step-by-step model: every ISI
// spike moves to the next edge (or stays on a coinciding edge), spikes waiting for
// one edge merge, spikes after the last edge are dropped. Hand cases from the
// alignment figure and random trains; serial spikes, final train and 17 clocks.
module tb_pwm_align;
  logic clk = 0, rst_n = 0, load = 0;
  logic [15:0] isi_train, edge_train, train;
  logic spike, step_valid, done, busy;
  int checks = 0, failures = 0;

  pwm_align dut (.clk, .rst_n, .load, .isi_train, .edge_train, .spike, .step_valid,
                 .train, .done, .busy);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] model(input logic [15:0] s, input logic [15:0] e);
    logic [15:0] r;
    int last_spike;
    r = '0;
    last_spike = -1;   // step of the oldest spike not yet aligned
    for (int t = 1; t <= 16; t++) begin
      if (s[16 - t] && last_spike < 0) last_spike = t;
      if (e[16 - t] && last_spike >= 0) begin r[16 - t] = 1'b1; last_spike = -1; end
    end
    return r;
  endfunction

  task automatic run(input logic [15:0] s, input logic [15:0] e, input logic [15:0] hand = 16'hxxxx, input bit use_hand = 0);
    logic [15:0] m;
    m = model(s, e);
    if (use_hand) check(m == hand, "model vs hand value");
    @(negedge clk);
    isi_train = s; edge_train = e; load = 1;
    @(negedge clk);
    load = 0;
    for (int t = 1; t <= 16; t++) begin
      if (!step_valid || spike != m[16 - t] || done != (t == 16))
        check(0, $sformatf("s=%b e=%b step %0d", s, e, t));
      @(negedge clk);
    end
    check(train == m, $sformatf("s=%b e=%b train %b exp %b", s, e, train, m));
    check(!busy, "idle");
  endtask

  initial begin
    isi_train = 0; edge_train = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // edges at steps 4, 8, 12, 16
    run(16'b0100_0000_0000_0000, 16'b0001_0001_0001_0001, 16'b0001_0000_0000_0000, 1); // step 2 -> 4
    run(16'b0101_0101_0101_0101, 16'b0001_0001_0001_0001, 16'b0001_0001_0001_0001, 1); // pairs merge
    run(16'b0001_0000_0000_0000, 16'b0001_0001_0001_0001, 16'b0001_0000_0000_0000, 1); // on the edge
    run(16'b0000_0000_0000_0001, 16'b0001_0001_0001_0000, 16'b0000_0000_0000_0000, 1); // dropped
    run(16'b1000_0000_0100_0000, 16'b0000_0010_0000_0001, 16'b0000_0010_0000_0001, 1);
    for (int i = 0; i < 300; i++) run(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
