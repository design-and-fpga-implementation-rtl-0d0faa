// tb_rate_encoder_lfsr_array: checks the baseline one-LFSR-per-step rate encoder.
// The 16-bit train must appear 16 clocks after start; a zero sample must give no
// spike; the mean spike count must follow 16*sample/65536; the lanes must differ
// from each other (not all bits equal for mid-range samples); and each bit i must
// match an independent model of lane i's Fibonacci LFSR with its seed formula.
module tb_rate_encoder_lfsr_array;
  logic clk = 0, rst_n = 0, start = 0;
  logic [15:0] data, spikes;
  logic valid, busy;
  logic [15:0] fib_m [16], rnd_prev [16];
  int checks = 0, failures = 0;

  rate_encoder_lfsr_array dut (.clk, .rst_n, .start, .data, .spikes, .valid, .busy);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [15:0] nz(input logic [15:0] v);
    return (v == 0) ? 16'h1 : v;
  endfunction

  always @(posedge clk) begin
    for (int i = 0; i < 16; i++) begin
      if (!rst_n) begin
        fib_m[i] <= nz(16'(32'hACE1 + 32'h9E37 * i));
      end else begin
        fib_m[i] <= {fib_m[i][14:0], fib_m[i][15] ^ fib_m[i][13] ^ fib_m[i][12] ^ fib_m[i][10]};
      end
      rnd_prev[i] <= fib_m[i];
    end
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic encode(input logic [15:0] d, output logic [15:0] s);
    int lat;
    logic [15:0] exp_s;
    @(negedge clk);
    data = d; start = 1;
    @(negedge clk);
    start = 0; lat = 1;
    while (!valid && lat < 40) begin @(negedge clk); lat++; end
    check(lat == 16, $sformatf("latency %0d", lat));
    for (int i = 0; i < 16; i++) exp_s[i] = d > rnd_prev[i];
    check(spikes == exp_s, $sformatf("train %h expected %h", spikes, exp_s));
    s = spikes;
  endtask

  initial begin
    logic [15:0] s;
    int total, mixed;
    data = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    encode(16'h0000, s); check(s == 16'h0, "zero sample");
    total = 0; mixed = 0;
    for (int i = 0; i < 100; i++) begin
      encode(16'h8000, s);
      total += $countones(s);
      if (s != 16'h0 && s != 16'hFFFF) mixed++;
    end
    check(total > 700 && total < 900, $sformatf("mean count at 50%%: %0d/1600", total));
    check(mixed > 90, $sformatf("encoders independent: %0d mixed trains", mixed));
    total = 0;
    for (int i = 0; i < 100; i++) begin encode(16'h2000, s); total += $countones(s); end
    check(total > 140 && total < 260, $sformatf("mean count at 12.5%%: %0d/1600", total));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
