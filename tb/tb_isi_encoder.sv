// tb_isi_encoder: checks the ISI (burst) encoder against Eq. 3.1/3.2.
// With NMAX = 8, TMAX = 6, TMIN = 2 and A = sample/32768 (clipped to 1):
//   Ns = ceil(8A), ISI = ceil(6 - 4A) if 8A > 1 else 6,
// spikes at steps ISI, 2*ISI, ... (at most Ns, within 16 steps). Checked: Ns, ISI,
// the serial spikes, the collected train and 17 clocks from start to done, for
// hand-picked and random samples.
module tb_isi_encoder;
  logic clk = 0, rst_n = 0, start = 0;
  logic [15:0] data, train;
  logic spike, step_valid, done, busy;
  logic [4:0] ns;
  logic [7:0] isi;
  int checks = 0, failures = 0;

  isi_encoder dut (.clk, .rst_n, .start, .data, .spike, .step_valid, .train, .ns, .isi,
                   .done, .busy);

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

  task automatic encode(input logic [15:0] d, input int exp_ns_hand = -1, input int exp_isi_hand = -1);
    real a;
    int e_ns, e_isi, cnt;
    logic [15:0] e_train;
    a = (d > 16'h8000) ? 1.0 : real'(d) / 32768.0;
    e_ns  = int'($ceil(8.0 * a));
    e_isi = (8.0 * a > 1.0) ? int'($ceil(6.0 - 4.0 * a)) : 6;
    e_train = '0; cnt = 0;
    for (int t = 1; t <= 16; t++)
      if (t % e_isi == 0 && cnt < e_ns) begin e_train[16 - t] = 1'b1; cnt++; end
    @(negedge clk);
    data = d; start = 1;
    @(negedge clk);
    start = 0;
    check(ns == 5'(e_ns) && isi == 8'(e_isi), $sformatf("d=%h ns %0d/%0d isi %0d/%0d", d, ns, e_ns, isi, e_isi));
    if (exp_ns_hand >= 0) check(e_ns == exp_ns_hand && e_isi == exp_isi_hand, "model vs hand values");
    for (int t = 1; t <= 16; t++) begin
      if (!step_valid) check(0, "step not valid");
      if (spike != e_train[16 - t]) check(0, $sformatf("d=%h step %0d spike %b", d, t, spike));
      if (done != (t == 16)) check(0, $sformatf("done at step %0d", t));
      @(negedge clk);
    end
    check(train == e_train, $sformatf("d=%h train %b exp %b", d, train, e_train));
    check(!busy, "idle after 17 clocks");
  endtask

  initial begin
    data = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    encode(16'h8000, 8, 2);   // A = 1: 8 spikes, ISI 2
    encode(16'h4000, 4, 4);   // A = 0.5: 4 spikes, ISI 4
    encode(16'h1000, 1, 6);   // A = 0.125: Ns = 1 -> ISI = Tmax
    encode(16'h0000, 0, 6);   // no spike
    encode(16'hFFFF, 8, 2);   // clipped to 1
    encode(16'h1001, 2, 6);   // Ns = 2, ISI = ceil(6 - 0.5) = 6
    for (int i = 0; i < 300; i++) encode(16'($urandom_range(0, 32768)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
