// tb_lfsr16_galois: checks the Galois LFSR against a bit-level model of
// the Galois form of x^16+x^14+x^13+x^11+1 for 2000
// steps, that en=0 holds the state, and that the sequence has the maximal period
// 65535 (back to the seed after 65535 steps and not before).
module tb_lfsr16_galois;
  logic clk = 0, rst_n = 0, en = 0;
  logic [15:0] q, model;
  int checks = 0, failures = 0;
  int first_return;

  lfsr16_galois #(.SEED(16'h1D2B)) dut (.clk, .rst_n, .en, .q);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [15:0] step(input logic [15:0] s);
    // shift towards bit 0; the bit leaving bit 0 re-enters at bit 15 and is XORed
    // into bits 13, 12 and 10
    logic [15:0] r;
    logic o;
    o = s[0];
    r = s >> 1;
    r[15] = o;
    r[13] = r[13] ^ o;
    r[12] = r[12] ^ o;
    r[10] = r[10] ^ o;
    return r;
  endfunction

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    check(q == 16'h1D2B, "seed after reset");
    model = q;
    en = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      model = step(model);
      check(q == model, $sformatf("step %0d: %h vs %h", i, q, model));
    end
    check(q == model, "2000 steps follow the model");
    en = 0;
    repeat (5) @(negedge clk);
    check(q == model, "en=0 holds");
    // period
    rst_n = 0; @(negedge clk); rst_n = 1; en = 1;
    first_return = 0;
    for (int i = 1; i <= 65535; i++) begin
      @(negedge clk);
      if (q == 16'h1D2B && first_return == 0) first_return = i;
    end
    check(first_return == 65535, $sformatf("period %0d", first_return));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
