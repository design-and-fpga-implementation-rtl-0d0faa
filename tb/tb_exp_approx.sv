// tb_exp_approx: checks the exponential approximation unit.
// Exact values worked out by hand (x = 0 -> 1.0 = 16'h8000; x = 1.0 -> exponent
// -1.4375 = -2 + 0.5625 -> 1.5625/4 = 16'h3200; x = 0.5 -> p = 0.71875, n = -1 +
// 0.28125 -> 1.28125/2 = 16'h5200), then for every x in 0..8.0 (Q6.10): monotonic
// non-increasing and within 9 % (or 3 LSB) of 32768*exp(-x); large x gives 0.
// Finally all 65536 inputs are compared with a bit-exact integer model, one check each.
module tb_exp_approx;
  logic [15:0] x, y, prev;
  int checks = 0, failures = 0;
  real ref_v, err;
  int bad;

  exp_approx dut (.x, .y);

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

  // bit-exact model: p = x + x/2 - x/16, shift = ceil(p/1024), f = shift*1024 - p,
  // y = ((1024 + f) << 13 >> shift) >> 8
  function automatic int model(input int xi);
    int pp, sh, f, mm;
    pp = xi + xi / 2 - xi / 16;
    sh = (pp + 1023) / 1024;
    f  = sh * 1024 - pp;
    if (sh >= 24) return 0;
    mm = 1024 + f;
    return int'(((longint'(mm) << 13) >> sh) >> 8);
  endfunction

  initial begin

    x = 16'h0000; #1; check(y == 16'h8000, $sformatf("exp(0) = %h", y));
    x = 16'h0400; #1; check(y == 16'h3200, $sformatf("exp(-1) = %h", y));
    x = 16'h0200; #1; check(y == 16'h5200, $sformatf("exp(-0.5) = %h", y));
    x = 16'hFFFF; #1; check(y == 16'h0000, $sformatf("exp(-64) = %h", y));
    prev = 16'hFFFF; bad = 0;
    for (int i = 0; i <= 8192; i++) begin
      x = 16'(i); #1;
      ref_v = 32768.0 * $exp(-real'(i) / 1024.0);
      err = real'(y) - ref_v;
      if (err < 0) err = -err;
      if (y > prev) bad++;
      if (err > 3.0 && err > 0.09 * ref_v) begin
        bad++;
        if (bad < 5) $display("x=%0d y=%0d ref=%f", i, y, ref_v);
      end
      prev = y;
    end
    check(bad == 0, $sformatf("sweep: %0d bad points", bad));
    // every input against the bit-exact model

    for (int i = 0; i < 65536; i++) begin
      x = 16'(i); #1;
      check(int'(y) == model(i), $sformatf("x=%0d y=%0d model %0d", i, y, model(i)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
