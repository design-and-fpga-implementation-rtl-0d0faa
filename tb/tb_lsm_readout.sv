// tb_lsm_readout: checks the two-unit readout layer.
// Both units get the same spike record but different weights. With learning on and
// only CT1 high, only unit 0 may change weights; then only CT2. Spike counters must
// equal the number of steps in which each unit spiked (counted here from spikes at
// step_done), be cleared by count_clear, and iter_end must reach both units' temp
// memories (save, then restore). Per step: latency 22 clocks (39 with learning),
// counters equal to the model after every step, no update of a unit whose CT bit is
// low or while learning is off. Finally both units get identical weights: with
// learning off they must then spike identically, since they see the same record.
module tb_lsm_readout;
  import lsm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic step_start = 0, learn_en = 0, iter_end = 0, count_clear = 0;
  logic [15:0] spike_record = 0;
  logic [1:0] ct = 0, load_we = 0;
  logic [15:0] loss [2];
  logic [3:0] load_addr = 0;
  weight_t load_data = 0;
  logic [1:0] spikes, upd_pot, upd_dep, saved, restored;
  logic [15:0] counts [2];
  logic step_done, busy;
  int checks = 0, failures = 0;
  int upd [2], cnt_m [2], n_saved, n_restored;

  lsm_readout dut (.clk, .rst_n, .step_start, .spike_record, .ct, .learn_en, .iter_end,
    .loss, .load_we, .load_addr, .load_data, .count_clear, .spikes, .counts, .step_done,
    .busy, .upd_pot, .upd_dep, .saved, .restored);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    for (int r = 0; r < 2; r++) begin
      if (upd_pot[r] || upd_dep[r]) upd[r]++;
      if (step_done && spikes[r]) cnt_m[r]++;
    end
    if (saved == 2'b11) n_saved++;
    if (restored == 2'b11) n_restored++;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_steps(input int n, input logic [1:0] c, input logic l);
    for (int t = 0; t < n; t++) begin
      int lat, u0, u1;
      u0 = upd[0]; u1 = upd[1];
      @(negedge clk);
      step_start = 1; spike_record = 16'($urandom); ct = c; learn_en = l;
      @(negedge clk); step_start = 0; lat = 1;
      while (!step_done) begin @(negedge clk); lat++; end
      check(lat + 1 == (l ? 39 : 22), $sformatf("step took %0d clocks", lat + 1));
      @(negedge clk);
      check(counts[0] == 16'(cnt_m[0]) && counts[1] == 16'(cnt_m[1]),
            $sformatf("counts %0d/%0d model %0d/%0d", counts[0], counts[1], cnt_m[0], cnt_m[1]));
      check((l && c[0]) || upd[0] == u0, "unit 0 updated without CT1 and learning");
      check((l && c[1]) || upd[1] == u1, "unit 1 updated without CT2 and learning");
    end
  endtask

  initial begin
    loss[0] = 0; loss[1] = 0;
    upd[0] = 0; upd[1] = 0; cnt_m[0] = 0; cnt_m[1] = 0; n_saved = 0; n_restored = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int r = 0; r < 2; r++)
      for (int a = 0; a < 16; a++) begin
        @(negedge clk);
        load_we = 2'(1 << r); load_addr = 4'(a);
        load_data = 16'(r == 0 ? $urandom_range(0, 100) : $urandom_range(0, 60));
      end
    @(negedge clk); load_we = 0;
    run_steps(40, 2'b01, 1'b1);
    check(upd[0] > 0 && upd[1] == 0, $sformatf("CT1 only: updates %0d/%0d", upd[0], upd[1]));
    run_steps(40, 2'b10, 1'b1);
    check(upd[1] > 0, $sformatf("CT2: updates of unit 1 %0d", upd[1]));
    run_steps(40, 2'b00, 1'b0);
    check(counts[0] == 16'(cnt_m[0]) && counts[1] == 16'(cnt_m[1]),
          $sformatf("counts %0d/%0d model %0d/%0d", counts[0], counts[1], cnt_m[0], cnt_m[1]));
    check(cnt_m[0] > 0 && cnt_m[1] > 0, "both units spiked");
    @(negedge clk); count_clear = 1; @(negedge clk); count_clear = 0;
    check(counts[0] == 0 && counts[1] == 0, "counters cleared");
    cnt_m[0] = 0; cnt_m[1] = 0;
    @(negedge clk); iter_end = 1; loss[0] = 10; loss[1] = 10;
    @(negedge clk); iter_end = 0;
    while (busy) @(negedge clk);
    @(negedge clk); iter_end = 1; loss[0] = 20; loss[1] = 20;
    @(negedge clk); iter_end = 0;
    while (busy) @(negedge clk);
    check(n_saved == 1 && n_restored == 1, $sformatf("saves %0d restores %0d", n_saved, n_restored));
    // identical units
    for (int a = 0; a < 16; a++) begin
      @(negedge clk);
      load_we = 2'b11; load_addr = 4'(a); load_data = 16'($urandom_range(0, 90));
    end
    @(negedge clk); load_we = 0;
    begin
      int diff;
      diff = 0;
      for (int t = 0; t < 60; t++) begin
        run_steps(1, 2'b00, 1'b0);
        if (spikes[0] != spikes[1]) diff++;
      end
      check(diff == 0, $sformatf("identical units differed in %0d steps", diff));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
