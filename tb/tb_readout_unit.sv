// tb_readout_unit: checks one readout unit over many time steps.
// Weights are loaded through the load port. With learning off, and with learning on
// but ct low, the output spike of every step must match a LIF model (sum of the
// weights of the active inputs, leak 1/8, threshold 256 + adaptive part, +64 per
// spike, decay 1/16). A step must take 22 clocks without and 39 with learning, from
// the step_start clock to step_done. With ct high the weights must be potentiated.
module tb_readout_unit;
  import lsm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic step_start = 0, ct = 0, learn_en = 0, iter_end = 0, load_we = 0;
  logic [15:0] pre_spikes = 0, loss = 0;
  logic [3:0] load_addr = 0;
  weight_t load_data = 0;
  logic spike, step_done, busy, upd_pot, upd_dep, saved, restored;
  logic signed [15:0] vmem, vth;
  int checks = 0, failures = 0, n_pot = 0, n_dep = 0;
  int w_m [16];
  int v_m = 0, a_m = 0;

  readout_unit dut (.clk, .rst_n, .step_start, .pre_spikes, .ct, .learn_en, .iter_end,
    .loss, .load_we, .load_addr, .load_data, .spike, .step_done, .busy, .vmem, .vth,
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

  task automatic do_step(input logic [15:0] pre, input logic l, input logic c,
                         input bit model_ok, output logic s);
    int lat, isum, vn, fs;
    @(negedge clk);
    step_start = 1; pre_spikes = pre; learn_en = l; ct = c;
    @(negedge clk);
    step_start = 0; lat = 1;
    while (!step_done && lat < 80) begin @(negedge clk); lat++; end
    check(lat + 1 == (l ? 39 : 22), $sformatf("step took %0d clocks", lat + 1));
    isum = 0;
    for (int i = 0; i < 16; i++) if (pre[i]) isum += w_m[i];
    vn = v_m - (v_m >>> 3) + isum;
    if (vn > 32767) vn = 32767;
    if (vn < -32768) vn = -32768;
    fs = (vn > 256 + a_m) ? 1 : 0;
    a_m = a_m - (a_m >>> 4) + (fs != 0 ? 64 : 0);
    v_m = (fs != 0) ? 0 : vn;
    if (model_ok) check(spike == fs[0] && int'(vmem) == v_m, $sformatf("spike %b/%0d v %0d/%0d", spike, fs, vmem, v_m));
    else begin v_m = int'(vmem); a_m = int'(vth) - 256; end   // resynchronise after learning
    s = spike;
  endtask

  initial begin
    logic s;
    int nspk;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int a = 0; a < 16; a++) begin
      @(negedge clk);
      load_we = 1; load_addr = 4'(a); w_m[a] = $urandom_range(0, 120) - 20; load_data = 16'(w_m[a]);
    end
    @(negedge clk); load_we = 0;
    nspk = 0;
    for (int t = 0; t < 100; t++) begin
      do_step(16'($urandom), 1'b0, 1'b0, 1, s); nspk += s;
    end
    for (int t = 0; t < 50; t++) begin
      do_step(16'($urandom), 1'b1, 1'b0, 1, s); nspk += s;
    end
    check(nspk > 10, $sformatf("%0d output spikes", nspk));
    check(n_pot == 0 && n_dep == 0, "no update without teacher");
    for (int t = 0; t < 50; t++) do_step(16'($urandom), 1'b1, 1'b1, 0, s);
    check(n_pot > 10, $sformatf("%0d potentiations with teacher", n_pot));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
