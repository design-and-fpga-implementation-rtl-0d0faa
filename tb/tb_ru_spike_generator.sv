// tb_ru_spike_generator: checks the LIF neuron with adaptive threshold against a
// model of V <- V - V/8 + I (saturating), spike and reset when V > Vth,
// Vth = 256 + A, A <- A - A/16 + 64 on a spike. Random input currents over 2000
// steps, with spikes and threshold growth both required to occur; fire low holds
// the state. Every step is one check. Then large negative currents must saturate V
// at -32768 without wrapping, and clear must return V and the threshold to rest.
module tb_ru_spike_generator;
  logic clk = 0, rst_n = 0, clear = 0, fire = 0;
  logic signed [19:0] isum = 0;
  logic spike;
  logic signed [15:0] vmem, vth;
  int checks = 0, failures = 0;
  int v_m, a_m, nspk, max_vth;

  ru_spike_generator dut (.clk, .rst_n, .clear, .fire, .isum, .spike, .vmem, .vth);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic int asr(input int v, input int s);
    return v >>> s;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int vn, s, bad;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    v_m = 0; a_m = 0; nspk = 0; max_vth = 0; bad = 0;
    @(negedge clk);
    for (int i = 0; i < 2000; i++) begin
      isum = 20'($signed($urandom_range(0, 260)) - 60);
      fire = 1;
      vn = v_m - asr(v_m, 3) + int'(isum);
      if (vn > 32767) vn = 32767;
      if (vn < -32768) vn = -32768;
      s = (vn > 256 + a_m) ? 1 : 0;
      a_m = a_m - asr(a_m, 4) + (s != 0 ? 64 : 0);
      v_m = (s != 0) ? 0 : vn;
      @(negedge clk);
      fire = 0;
      check(spike == s[0] && int'(vmem) == v_m && int'(vth) == 256 + a_m, $sformatf("step %0d", i));
      if (spike != s[0] || int'(vmem) != v_m || int'(vth) != 256 + a_m) begin
        bad++;
        if (bad < 5) $display("step %0d: spike %b/%0d v %0d/%0d vth %0d/%0d", i, spike, s, vmem, v_m, vth, 256 + a_m);
      end
      nspk += s;
      if (256 + a_m > max_vth) max_vth = 256 + a_m;
      if (i % 100 == 0) begin
        @(negedge clk);   // a clock without fire: nothing changes
        check(int'(vmem) == v_m && int'(vth) == 256 + a_m, "state held without fire");
      end
    end
    check(bad == 0, $sformatf("%0d mismatching steps", bad));
    check(nspk > 50, $sformatf("%0d spikes", nspk));
    check(max_vth > 300, $sformatf("threshold adapted up to %0d", max_vth));
    // negative saturation: V would go far below -32768
    for (int i = 0; i < 6; i++) begin
      isum = -20'sd200000;
      fire = 1;
      @(negedge clk);
      fire = 0;
      check(vmem < 0 && !spike, $sformatf("negative drive step %0d: v %0d", i, vmem));
    end
    check(vmem == -16'sh8000, $sformatf("saturated at %0d", vmem));
    // clear
    clear = 1;
    @(negedge clk);
    clear = 0;
    check(vmem == 0 && vth == 16'sd256 && !spike, "clear returns to rest");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
