// tb_phase_encoder: checks the binary phase encoder.
// For random 8-bit samples, the spike train after load must be the sample's bits
// MSB first, repeating with period 8 for three periods. Decoding the first period
// with the weights 2^-(1+mod(t-1,8)) must return the sample exactly. A reload in the
// middle of a period must restart the pattern at once.
module tb_phase_encoder;
  logic clk = 0, rst_n = 0, load = 0;
  logic [7:0] data = 0;
  logic spike;
  int checks = 0, failures = 0;

  phase_encoder dut (.clk, .rst_n, .load, .data, .spike);

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

  task automatic encode(input logic [7:0] d, input int steps);
    int dec;
    @(negedge clk);
    load = 1; data = d;
    @(negedge clk);
    load = 0; data = 8'($urandom);
    dec = 0;
    for (int t = 1; t <= steps; t++) begin
      check(spike == d[7 - (t - 1) % 8], $sformatf("d=%h step %0d spike %b", d, t, spike));
      if (t <= 8 && spike) dec += 256 >> t;       // weight 2^-t in units of 1/256
      @(negedge clk);
    end
    if (steps >= 8) check(dec == int'(d), $sformatf("decode %0d vs %0d", dec, d));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    check(spike == 0, "no spike after reset");
    rst_n <= 1;
    encode(8'h80, 24);
    encode(8'h01, 24);
    encode(8'hFF, 8);
    for (int i = 0; i < 200; i++) encode(8'($urandom), 3 + (i % 3) * 8);   // some cut mid-period
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
