// tb_neuro_encoder_top: end-to-end test of the whole design at its default sizes.
//
// Part 1, encoders: four 1000-sample test signals are generated here, normalised to
// 0..1 -- a sum of sines with random power and phase plus noise (NS), a smooth sine
// of 12 periods plus noise (SS), a slowly rising signal with a sigmoid step plus
// noise (CRF) and a stair 0, 1/3, 2/3, 1, 2/3, 1/3, 0 (SW). Every sample goes through
// all encoders at once. Checked per sample: the TTFS first-spike step and the
// multiplexing encoder's ISI and aligned trains against a model, the latencies (16,
// 40 and 34 clocks). Each train is decoded (rate: count/16; TTFS and multiplexing:
// mean of all sample values giving the same output) and RMSE, SNR and mean absolute
// error are printed per signal and encoder; RMSE must stay below a bound.
//
// Part 2, readout layer: the rate encoder's 16-bit train stands in for the reservoir
// spike record. Samples above 0.5 are class 1 (CT1), the others class 2 (CT2). After
// training iterations with loss = misclassified samples (save/restore of the temp
// memory), the output spike counters must match the spikes seen here.
//
// Every mechanism must happen at least once: rate spike and silence, TTFS spike, TTFS
// no-spike window, refractory suppression of a later crossing, ISI Ns <= 1 branch,
// ISI window truncation, PWM alignment shift, spike merging, LIF firing,
// potentiation, depression, weight save and weight restore, and a phase spike.
// The baselines (one-LFSR rate array, ROM TTFS, binary phase encoder) get the same
// samples in the same clock: the ROM TTFS first spike and the phase train are checked
// against models, and all of them are decoded and scored like the proposed encoders.
module tb_neuro_encoder_top;
  import lsm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic rate_start = 0, ttfs_start = 0, mux_start = 0;
  logic [15:0] rate_data = 0, ttfs_data = 0, mux_data = 0;
  logic [15:0] rate_spikes, mux_isi_train, mux_edge_train, mux_train;
  logic rate_valid, rate_busy, ttfs_spike, ttfs_step_valid, ttfs_done, ttfs_busy;
  logic [5:0] ttfs_step, ttfs_base_step;
  logic [15:0] rate_base_spikes;
  logic phase_load = 0, phase_spike;
  logic [7:0] phase_data = 0;
  logic rate_base_valid, rate_base_busy;
  logic ttfs_base_spike, ttfs_base_step_valid, ttfs_base_done, ttfs_base_busy;
  logic mux_spike, mux_valid, mux_done, mux_busy;
  logic lsm_step_start = 0, lsm_learn_en = 0, lsm_iter_end = 0, lsm_count_clear = 0;
  logic [15:0] lsm_spike_record = 0;
  logic [1:0] lsm_ct = 0, lsm_load_we = 0;
  logic [15:0] lsm_loss [2];
  logic [3:0] lsm_load_addr = 0;
  weight_t lsm_load_data = 0;
  logic [1:0] lsm_spikes, lsm_upd_pot, lsm_upd_dep, lsm_saved, lsm_restored;
  logic [15:0] lsm_counts [2];
  logic lsm_step_done, lsm_busy;

  neuro_encoder_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // mechanism counters
  typedef enum int {M_RATE_SPIKE, M_RATE_SILENT, M_TTFS_SPIKE, M_TTFS_NONE, M_TTFS_REFR,
                    M_ISI_TMAX, M_ISI_TRUNC, M_ALIGN_SHIFT, M_MERGE, M_LIF_FIRE,
                    M_POT, M_DEP, M_SAVE, M_RESTORE, M_PHASE_SPIKE, M_NUM} mech_t;
  int mech [M_NUM];
  const string mech_name [M_NUM] = '{"rate spike", "rate silence", "TTFS spike",
    "TTFS no spike", "TTFS refractory suppression", "ISI Ns<=1 (Tmax)",
    "ISI window truncation", "PWM alignment shift", "spike merge", "LIF fire",
    "potentiation", "depression", "weight save", "weight restore", "phase spike"};

  always @(posedge clk) begin
    for (int r = 0; r < 2; r++) begin
      if (lsm_upd_pot[r]) mech[M_POT]++;
      if (lsm_upd_dep[r]) mech[M_DEP]++;
      if (lsm_saved[r])   mech[M_SAVE]++;
      if (lsm_restored[r]) mech[M_RESTORE]++;
    end
  end

  initial begin
    #400000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- models
  function automatic int thr(input int k);          // TTFS threshold of step k, Q1.15
    int x, p, ip, fp;
    x = k * 128; p = x + x / 2 - x / 16;
    ip = (p + 1023) / 1024; fp = ip * 1024 - p;
    if (ip >= 24) return 0;
    return ((1024 + fp) * 32) >> ip;
  endfunction

  function automatic int ttfs_first(input int d);    // -1: no spike
    for (int k = 0; k < 40; k++) if (d > thr(k)) return k;
    return -1;
  endfunction

  function automatic int thr_rom(input int k);      // baseline ROM threshold, Q1.15
    return int'($floor(32768.0 * $exp(-real'(k) / 8.0) + 0.5));
  endfunction

  function automatic int ttfs_rom_first(input int d);
    for (int k = 0; k < 40; k++) if (d > thr_rom(k)) return k;
    return -1;
  endfunction

  function automatic logic [15:0] isi_model(input int d, output int ns, output int isi);
    logic [15:0] r;
    int c;
    real a;
    a = (d > 32768) ? 1.0 : real'(d) / 32768.0;
    ns = int'($ceil(8.0 * a));
    isi = (8.0 * a > 1.0) ? int'($ceil(6.0 - 4.0 * a)) : 6;
    r = '0; c = 0;
    for (int t = 1; t <= 16; t++) if (t % isi == 0 && c < ns) begin r[16 - t] = 1; c++; end
    return r;
  endfunction

  function automatic logic [15:0] align_model(input logic [15:0] s);
    logic [15:0] r;
    bit pend;
    r = '0; pend = 0;
    for (int t = 1; t <= 16; t++) begin
      if (s[16 - t]) pend = 1;
      if (t % 4 == 0 && pend) begin r[16 - t] = 1; pend = 0; end
    end
    return r;
  endfunction

  // decoding tables: mean sample value per output pattern
  real ttfs_sum [int];  int ttfs_n [int];
  real trom_sum [int];  int trom_n [int];
  real isi_sum  [int];  int isi_n  [int];
  real mux_sum  [int];  int mux_n  [int];
  task automatic build_decoders();
    int ns, isi;
    for (int d = 0; d <= 32768; d += 16) begin
      int k;
      logic [15:0] m;
      k = ttfs_rom_first(d);
      if (!trom_n.exists(k)) begin trom_n[k] = 0; trom_sum[k] = 0; end
      trom_n[k]++; trom_sum[k] += real'(d) / 32768.0;
      k = ttfs_first(d);
      m = isi_model(d, ns, isi);
      if (!isi_n.exists(int'(m))) begin isi_n[int'(m)] = 0; isi_sum[int'(m)] = 0; end
      isi_n[int'(m)]++; isi_sum[int'(m)] += real'(d) / 32768.0;
      m = align_model(m);
      if (!ttfs_n.exists(k)) begin ttfs_n[k] = 0; ttfs_sum[k] = 0; end
      ttfs_n[k]++; ttfs_sum[k] += real'(d) / 32768.0;
      if (!mux_n.exists(int'(m))) begin mux_n[int'(m)] = 0; mux_sum[int'(m)] = 0; end
      mux_n[int'(m)]++; mux_sum[int'(m)] += real'(d) / 32768.0;
    end
  endtask

  // ---------------------------------------------------------------- signals
  real sig [1000];
  function automatic real gauss();
    real s = 0;
    for (int i = 0; i < 6; i++) s += real'($urandom_range(0, 100000)) / 100000.0;
    return (s - 3.0) / 1.0;     // unit-ish variance
  endfunction

  task automatic make_signal(input int which);
    real mn, mx, amp [3], ph [3];
    for (int j = 0; j < 3; j++) begin
      amp[j] = 0.2 + real'($urandom_range(0, 100)) / 100.0;
      ph[j]  = real'($urandom_range(0, 628)) / 100.0;
    end
    for (int i = 0; i < 1000; i++) begin
      real t = real'(i) / 1000.0;
      case (which)
        0: sig[i] = amp[0] * $sin(2.0 * 3.14159 * 5.0 * t + ph[0]) +
                    amp[1] * $sin(2.0 * 3.14159 * 8.0 * t + ph[1]) +
                    amp[2] * $sin(2.0 * 3.14159 * 1.0 * t + ph[2]) + 0.15 * gauss();
        1: sig[i] = $sin(2.0 * 3.14159 * 12.0 * t) + 0.12 * gauss();
        2: sig[i] = 0.3 * t + 0.5 / (1.0 + $exp(-(t - 0.5) * 30.0)) + 0.04 * gauss();
        default: begin
          int seg = i / 125;
          int lvl [8] = '{0, 1, 2, 3, 3, 2, 1, 0};
          sig[i] = real'(lvl[seg]) / 3.0;
        end
      endcase
    end
    if (which != 3) begin
      mn = sig[0]; mx = sig[0];
      foreach (sig[i]) begin if (sig[i] < mn) mn = sig[i]; if (sig[i] > mx) mx = sig[i]; end
      foreach (sig[i]) sig[i] = (sig[i] - mn) / (mx - mn);
    end
  endtask

  // ---------------------------------------------------------------- part 1
  real se [7], ae [7], pw;
  task automatic encode_sample(input real a, output logic [15:0] rate_tr);
    int ph_dec;
    bit ph_ok;
    int d15, d16, lat_r, lat_t, lat_m, first, ns, isi, nspk_t, first_b, nspk_b;
    logic [15:0] e_isi, e_mux, base_tr;
    bit got_r, got_t, got_m, got_rb, got_tb;
    real rec;
    d15 = int'(a * 32768.0);
    d16 = (a >= 1.0) ? 65535 : int'(a * 65536.0);
    @(negedge clk);
    rate_data = 16'(d16); ttfs_data = 16'(d15); mux_data = 16'(d15);
    rate_start = 1; ttfs_start = 1; mux_start = 1;
    phase_load = 1; phase_data = 8'(d16 >> 8);
    @(negedge clk);
    rate_start = 0; ttfs_start = 0; mux_start = 0; phase_load = 0;
    ph_dec = 0; ph_ok = 1;
    first = -1; nspk_t = 0; got_r = 0; got_t = 0; got_m = 0;
    first_b = -1; nspk_b = 0; got_rb = 0; got_tb = 0;
    for (int c = 1; c < 45; c++) begin
      if (rate_valid) begin
        check(c == 16, $sformatf("rate latency %0d", c));
        rate_tr = rate_spikes; got_r = 1;
      end
      if (ttfs_step_valid) begin
        if (ttfs_spike) begin
          nspk_t++;
          if (first < 0) first = int'(ttfs_step);
        end else if (first >= 0 && d15 > thr(int'(ttfs_step))) mech[M_TTFS_REFR]++;
      end
      if (ttfs_done) begin check(c == 40, $sformatf("TTFS done in clock %0d", c + 1)); got_t = 1; end
      if (mux_done) begin lat_m = c; got_m = 1; end
      if (c <= 16) begin
        if (phase_spike != phase_data[7 - (c - 1) % 8]) ph_ok = 0;
        if (c <= 8 && phase_spike) ph_dec += 256 >> c;
      end
      if (rate_base_valid) begin
        check(c == 16, $sformatf("baseline rate latency %0d", c));
        base_tr = rate_base_spikes; got_rb = 1;
      end
      if (ttfs_base_step_valid && ttfs_base_spike) begin
        nspk_b++;
        if (first_b < 0) first_b = int'(ttfs_base_step);
      end
      if (ttfs_base_done) begin check(c == 40, $sformatf("baseline TTFS done in clock %0d", c + 1)); got_tb = 1; end
      @(negedge clk);
    end
    check(got_r && got_t && got_m && got_rb && got_tb, "all encoders finished");
    check(lat_m + 1 == 34, $sformatf("multiplexing done in clock %0d", lat_m + 1));
    // rate
    if (rate_tr != 0) mech[M_RATE_SPIKE]++;
    if (rate_tr != 16'hFFFF) mech[M_RATE_SILENT]++;
    rec = real'($countones(rate_tr)) / 16.0;
    se[0] += (a - rec) ** 2; ae[0] += (a > rec) ? a - rec : rec - a;
    // TTFS
    check(first == ttfs_first(d15) && nspk_t <= 1, $sformatf("TTFS d=%0d first %0d exp %0d", d15, first, ttfs_first(d15)));
    if (first >= 0) mech[M_TTFS_SPIKE]++; else mech[M_TTFS_NONE]++;
    rec = ttfs_sum[first] / real'(ttfs_n[first]);
    se[1] += (a - rec) ** 2; ae[1] += (a > rec) ? a - rec : rec - a;
    // baselines
    check(ph_ok && ph_dec == int'(phase_data), $sformatf("phase d=%h decoded %0d", phase_data, ph_dec));
    if (phase_data != 0) mech[M_PHASE_SPIKE]++;
    rec = real'(ph_dec) / 256.0;
    se[6] += (a - rec) ** 2; ae[6] += (a > rec) ? a - rec : rec - a;
    rec = real'($countones(base_tr)) / 16.0;
    se[3] += (a - rec) ** 2; ae[3] += (a > rec) ? a - rec : rec - a;
    check(first_b == ttfs_rom_first(d15) && nspk_b <= 1,
          $sformatf("baseline TTFS d=%0d first %0d exp %0d", d15, first_b, ttfs_rom_first(d15)));
    rec = trom_sum[first_b] / real'(trom_n[first_b]);
    se[4] += (a - rec) ** 2; ae[4] += (a > rec) ? a - rec : rec - a;
    // multiplexing
    e_isi = isi_model(d15, ns, isi);
    e_mux = align_model(e_isi);
    check(mux_isi_train == e_isi && mux_train == e_mux,
          $sformatf("mux d=%0d isi %b/%b mux %b/%b", d15, mux_isi_train, e_isi, mux_train, e_mux));
    if (ns <= 1) mech[M_ISI_TMAX]++;
    if ($countones(e_isi) < ns) mech[M_ISI_TRUNC]++;
    if (e_isi != 0 && e_isi != e_mux) mech[M_ALIGN_SHIFT]++;
    if ($countones(e_mux) < $countones(e_isi)) mech[M_MERGE]++;
    rec = isi_n.exists(int'(mux_isi_train)) ? isi_sum[int'(mux_isi_train)] / real'(isi_n[int'(mux_isi_train)]) : 0.0;
    se[5] += (a - rec) ** 2; ae[5] += (a > rec) ? a - rec : rec - a;
    rec = mux_n.exists(int'(mux_train)) ? mux_sum[int'(mux_train)] / real'(mux_n[int'(mux_train)]) : 0.0;
    se[2] += (a - rec) ** 2; ae[2] += (a > rec) ? a - rec : rec - a;
  endtask

  // ---------------------------------------------------------------- part 2
  int spk_m [2];
  task automatic lsm_step(input logic [15:0] rec, input logic [1:0] c, input logic l);
    @(negedge clk);
    lsm_step_start = 1; lsm_spike_record = rec; lsm_ct = c; lsm_learn_en = l;
    @(negedge clk);
    lsm_step_start = 0;
    while (!lsm_step_done) @(negedge clk);
    for (int r = 0; r < 2; r++) if (lsm_spikes[r]) begin spk_m[r]++; mech[M_LIF_FIRE]++; end
  endtask

  initial begin
    const static string sname [4] = '{"NS", "SS", "CRF", "SW"};
    const static real bound [7] = '{0.16, 0.16, 0.16, 0.16, 0.16, 0.16, 0.01};
    const static string ename [7] = '{"rate", "TTFS", "multiplexing", "baseline rate", "baseline TTFS", "ISI (burst)", "phase"};
    logic [15:0] tr;
    lsm_loss[0] = 0; lsm_loss[1] = 0;
    foreach (mech[i]) mech[i] = 0;
    build_decoders();
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int s = 0; s < 4; s++) begin
      make_signal(s);
      se = '{0.0, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0}; ae = '{0.0, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0}; pw = 0;
      for (int i = 0; i < 1000; i++) begin
        encode_sample(sig[i], tr);
        pw += sig[i] ** 2;
      end
      for (int e = 0; e < 7; e++) begin
        real rmse;
        rmse = $sqrt(se[e] / 1000.0);
        $display("signal %-3s encoder %-13s RMSE %6.4f  SNR %6.2f dB  aAE %6.4f", sname[s], ename[e],
                 rmse, 10.0 * $log10(pw / se[e]), ae[e] / 1000.0);
        check(rmse < bound[e], $sformatf("%s %s RMSE %f", sname[s], ename[e], rmse));
      end
    end

    // readout layer: rate-coded samples as spike record
    for (int r = 0; r < 2; r++)
      for (int a = 0; a < 16; a++) begin
        @(negedge clk);
        lsm_load_we = 2'(1 << r); lsm_load_addr = 4'(a); lsm_load_data = 16'(40);
      end
    @(negedge clk); lsm_load_we = 0;
    spk_m[0] = 0; spk_m[1] = 0;
    for (int it = 0; it < 4; it++) begin
      int wrong;
      wrong = 0;
      @(negedge clk); lsm_count_clear = 1; @(negedge clk); lsm_count_clear = 0;
      spk_m[0] = 0; spk_m[1] = 0;
      for (int n = 0; n < 30; n++) begin
        real a;
        logic [1:0] cls;
        int c0, c1;
        a = real'($urandom_range(0, 1000)) / 1000.0;
        cls = (a > 0.5) ? 2'b01 : 2'b10;
        encode_sample(a, tr);
        c0 = spk_m[0]; c1 = spk_m[1];
        for (int st = 0; st < 6; st++) begin
          encode_sample(a, tr);
          lsm_step(tr, cls, 1'b1);
        end
        if ((spk_m[0] - c0 >= spk_m[1] - c1) != cls[0]) wrong++;
      end
      @(negedge clk);
      check(int'(lsm_counts[0]) == spk_m[0] && int'(lsm_counts[1]) == spk_m[1],
            $sformatf("spike counters %0d/%0d vs %0d/%0d", lsm_counts[0], lsm_counts[1], spk_m[0], spk_m[1]));
      $display("training iteration %0d: %0d of 30 samples misclassified", it, wrong);
      @(negedge clk);
      lsm_iter_end = 1;
      lsm_loss[0] = 16'(wrong + (it == 2 ? 100 : 0)); lsm_loss[1] = lsm_loss[0];   // iteration 2 is made worse
      @(negedge clk); lsm_iter_end = 0;
      while (lsm_busy) @(negedge clk);
    end

    // depression probe: with moderate weights, a strong step makes both units fire,
    // a silent step lets them rest, and a weak single input then arrives while the
    // units stay below their raised thresholds (pre now, post two steps earlier)
    for (int rep = 0; rep < 8; rep++) begin
      for (int r = 0; r < 2; r++)
        for (int a = 0; a < 16; a++) begin
          @(negedge clk);
          lsm_load_we = 2'(1 << r); lsm_load_addr = 4'(a); lsm_load_data = 16'(300);
        end
      @(negedge clk); lsm_load_we = 0;
      lsm_step(16'hFFFF, 2'b11, 1'b1);
      lsm_step(16'h0000, 2'b11, 1'b1);
      lsm_step(16'h0001, 2'b11, 1'b1);
    end

    for (int m = 0; m < M_NUM; m++) begin
      $display("mechanism %-28s %0d", mech_name[m], mech[m]);
      check(mech[m] > 0, {"mechanism never happened: ", mech_name[m]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
