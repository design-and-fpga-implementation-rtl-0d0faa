// tb_rate_encoder: checks the dual-LFSR rate encoder.
// A model of both LFSRs (Fibonacci x^16+x^14+x^13+x^11+1 and its Galois form) runs
// beside the encoder from reset. For 300 random samples it checks that spike_valid
// comes exactly 16 clocks after start and that spike = (sample > fib ^ gal) for the
// random number of the 16th clock. It also checks the extreme samples and that the
// spike rate over many samples follows sample/65536.
module tb_rate_encoder;
  logic clk = 0, rst_n = 0, start = 0;
  logic [15:0] data;
  logic spike, spike_valid, busy;
  logic [15:0] fib_m, gal_m, rnd_prev;
  int checks = 0, failures = 0;

  rate_encoder dut (.clk, .rst_n, .start, .data, .spike, .spike_valid, .busy);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // reference LFSRs
  always @(posedge clk) begin
    if (!rst_n) begin
      fib_m <= 16'hACE1;
      gal_m <= 16'h1D2B;
    end else begin
      fib_m <= {fib_m[14:0], fib_m[15] ^ fib_m[13] ^ fib_m[12] ^ fib_m[10]};
      gal_m <= (gal_m >> 1) ^ (gal_m[0] ? 16'hB400 : 16'h0);
    end
    rnd_prev <= fib_m ^ gal_m;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic encode(input logic [15:0] d, output logic s);
    int lat;
    @(negedge clk);
    data = d; start = 1;
    @(negedge clk);
    start = 0;
    lat = 1;
    while (!spike_valid && lat < 40) begin @(negedge clk); lat++; end
    check(lat == 16, $sformatf("latency %0d", lat));
    check(spike == (d > rnd_prev), $sformatf("spike for %h vs rnd %h", d, rnd_prev));
    s = spike;
  endtask

  initial begin
    logic s;
    int ones, n;
    data = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (7) @(negedge clk);
    for (int i = 0; i < 300; i++) encode(16'($urandom), s);
    // extremes
    encode(16'h0000, s);  check(s == 0, "zero sample never spikes");
    // statistics at 25 %
    ones = 0; n = 400;
    for (int i = 0; i < n; i++) begin encode(16'h4000, s); ones += s; end
    check(ones > 60 && ones < 140, $sformatf("rate 25%%: %0d/400", ones));
    ones = 0;
    for (int i = 0; i < n; i++) begin encode(16'hE000, s); ones += s; end
    check(ones > 310 && ones < 390, $sformatf("rate 87.5%%: %0d/400", ones));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
