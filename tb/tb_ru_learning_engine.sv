// tb_ru_learning_engine: checks the R-STDP learning engine against a model.
// The model keeps its own spike histories, LFSR (x^16+x^14+x^13+x^11+1, seed B5A3,
// one step per synapse visited) and weights. For each synapse it finds dt with the
// rule: output spiked now -> nearest pre spike k steps back, potentiation; else pre
// spiked now -> nearest earlier output spike, depression. The update happens when
// random < 65535*2^(-k/2) and ct is high; the change is round(32*2^(-k/2)), and the
// weight is clamped to [-2048, 2047]. After each sweep all weights are read back,
// one check per weight.
// Then the temp memory: a better loss saves the weights, a worse one restores them.
// The sweep must take 17 clocks; potentiation, depression and clamping must occur.
module tb_ru_learning_engine;
  import lsm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic hist_shift = 0, post_spike = 0, learn_start = 0, ct = 0, load_we = 0, iter_end = 0;
  logic [15:0] pre_spikes = 0, loss = 0;
  logic [3:0] rd_addr = 0, load_addr = 0;
  weight_t rd_data, load_data = 0;
  logic busy, upd_pot, upd_dep, saved, restored;
  int checks = 0, failures = 0;
  int n_pot = 0, n_dep = 0, n_clamp = 0;

  logic [11:0] pre_m [16];
  logic [11:0] post_m;
  int          w_m [16];
  int          saved_m [16];
  logic [15:0] rng_m;

  ru_learning_engine dut (.clk, .rst_n, .hist_shift, .pre_spikes, .post_spike, .learn_start,
    .ct, .rd_addr, .rd_data, .load_we, .load_addr, .load_data, .iter_end, .loss, .busy,
    .upd_pot, .upd_dep, .saved, .restored);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (upd_pot) n_pot++;
    if (upd_dep) n_dep++;
  end

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

  function automatic int p2h(input int k, input int scale);   // scale * 2^(-k/2)
    return int'($floor(real'(scale) * $pow(2.0, -real'(k) / 2.0)));
  endfunction

  task automatic load_w(input int a, input int v);
    @(negedge clk);
    load_we = 1; load_addr = 4'(a); load_data = 16'(v); w_m[a] = v;
    @(negedge clk);
    load_we = 0;
  endtask

  task automatic shift(input logic [15:0] pre, input logic post);
    @(negedge clk);
    hist_shift = 1; pre_spikes = pre; post_spike = post;
    for (int i = 0; i < 16; i++) pre_m[i] = {pre[i], pre_m[i][11:1]};
    post_m = {post, post_m[11:1]};
    @(negedge clk);
    hist_shift = 0;
  endtask

  function automatic int first_back(input logic [11:0] h);
    for (int k = 0; k < 12; k++) if (h[11 - k]) return k;
    return -1;
  endfunction

  task automatic read_check(input string tag);
    for (int a = 0; a < 16; a++) begin
      @(negedge clk); rd_addr = 4'(a);
      @(negedge clk);
      check(int'(rd_data) == w_m[a], $sformatf("%s: w[%0d] = %0d, model %0d", tag, a, rd_data, w_m[a]));
    end
  endtask

  task automatic sweep(input logic teach);
    int k, lat, wn, prob, d;
    bit neg;
    for (int a = 0; a < 16; a++) begin
      k = -1; neg = 0;
      if (post_m[11]) k = first_back(pre_m[a]);
      else if (pre_m[a][11]) begin k = first_back(post_m); neg = 1; end
      if (k >= 0) begin
        prob = (k % 2 == 0) ? (65535 >> (k / 2)) : (46341 >> (k / 2));
        d = (32 * prob + 32768) >> 16;
        if (teach && int'(rng_m) < prob) begin
          wn = neg ? w_m[a] - d : w_m[a] + d;
          if (wn > 2047) begin wn = 2047; n_clamp++; end
          if (wn < -2048) begin wn = -2048; n_clamp++; end
          w_m[a] = wn;
        end
      end
      rng_m = {rng_m[14:0], rng_m[15] ^ rng_m[13] ^ rng_m[12] ^ rng_m[10]};
    end
    @(negedge clk);
    ct = teach; learn_start = 1;
    @(negedge clk);
    learn_start = 0; lat = 1;
    while (busy && lat < 40) begin @(negedge clk); lat++; end
    check(lat == 18, $sformatf("sweep busy for %0d clocks (expected 17 + start)", lat));
  endtask

  initial begin
    int lat;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    rng_m = 16'hB5A3;
    post_m = '0;
    for (int i = 0; i < 16; i++) pre_m[i] = '0;
    check(p2h(0, 65535) == 65535, "LUT self-check");
    for (int a = 0; a < 16; a++) load_w(a, $urandom_range(0, 1000) - 500);
    load_w(3, 2040);                       // to be clamped
    load_w(5, -2040);
    read_check("after load");
    for (int step = 0; step < 60; step++) begin
      logic [15:0] pre;
      logic post;
      pre  = 16'($urandom) & 16'($urandom);
      post = ($urandom_range(0, 2) == 0);
      if (step % 7 == 0) begin pre[3] = 1; post = 1; end            // dt = 0, potentiation
      if (step % 7 == 3) begin pre[5] = 1; post = 0; end
      shift(pre, post);
      sweep(step % 5 != 4);                // every fifth sweep without teacher
      read_check($sformatf("step %0d", step));
    end
    check(n_pot > 20 && n_dep > 20, $sformatf("potentiations %0d, depressions %0d", n_pot, n_dep));
    check(n_clamp > 0, $sformatf("%0d clamped updates", n_clamp));
    // temp memory: first loss is an improvement -> save
    @(negedge clk); iter_end = 1; loss = 16'd100;
    @(negedge clk); iter_end = 0;
    check(saved, "saved on better loss");
    for (int a = 0; a < 16; a++) saved_m[a] = w_m[a];
    lat = 0; while (busy && lat < 40) begin @(negedge clk); lat++; end
    for (int a = 0; a < 16; a++) load_w(a, a * 10);
    read_check("overwritten");
    @(negedge clk); iter_end = 1; loss = 16'd150;
    @(negedge clk); iter_end = 0;
    check(restored, "restored on worse loss");
    lat = 0; while (busy && lat < 40) begin @(negedge clk); lat++; end
    for (int a = 0; a < 16; a++) w_m[a] = saved_m[a];
    read_check("restored");
    for (int a = 0; a < 16; a++) load_w(a, -a);
    @(negedge clk); iter_end = 1; loss = 16'd120;   // better than 150
    @(negedge clk); iter_end = 0;
    check(saved, "saved again");
    lat = 0; while (busy && lat < 40) begin @(negedge clk); lat++; end
    for (int a = 0; a < 16; a++) load_w(a, 7);
    @(negedge clk); iter_end = 1; loss = 16'd130;
    @(negedge clk); iter_end = 0;
    lat = 0; while (busy && lat < 40) begin @(negedge clk); lat++; end
    for (int a = 0; a < 16; a++) w_m[a] = -a;
    read_check("second restore");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
