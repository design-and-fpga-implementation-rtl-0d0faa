// tb_multiplexing_encoder: end-to-end check of the ISI + PWM multiplexing encoder.
// For each sample the model builds the ISI train (Eq. 3.1/3.2 with NMAX 8, TMAX 6,
// TMIN 2), the PWM rising edges at steps 4, 8, 12, 16, and the aligned train (each
// spike to the next edge, merged per edge). Checked: the three trains, the serial
// output and the 34-clock latency from the start clock to done.
module tb_multiplexing_encoder;
  logic clk = 0, rst_n = 0, start = 0;
  logic [15:0] data, isi_train, edge_train, mux_train;
  logic mux_spike, mux_valid, done, busy;
  int checks = 0, failures = 0;

  multiplexing_encoder dut (.clk, .rst_n, .start, .data, .isi_train, .edge_train,
                            .mux_spike, .mux_valid, .mux_train, .done, .busy);

  always #5 clk = ~clk;

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

  task automatic encode(input logic [15:0] d);
    real a;
    int e_ns, e_isi, cnt, lat, pend, sidx;
    logic [15:0] e_isi_tr, e_edge, e_mux, serial;
    a = (d > 16'h8000) ? 1.0 : real'(d) / 32768.0;
    e_ns  = int'($ceil(8.0 * a));
    e_isi = (8.0 * a > 1.0) ? int'($ceil(6.0 - 4.0 * a)) : 6;
    e_isi_tr = '0; cnt = 0;
    for (int t = 1; t <= 16; t++)
      if (t % e_isi == 0 && cnt < e_ns) begin e_isi_tr[16 - t] = 1'b1; cnt++; end
    e_edge = 16'b0001_0001_0001_0001;
    e_mux = '0; pend = 0;
    for (int t = 1; t <= 16; t++) begin
      if (e_isi_tr[16 - t]) pend = 1;
      if (e_edge[16 - t] && pend != 0) begin e_mux[16 - t] = 1'b1; pend = 0; end
    end
    @(negedge clk);
    data = d; start = 1;
    lat = 1; serial = '0; sidx = 15;   // lat = index of the current clock, start clock = 0
    @(negedge clk);
    start = 0;
    while (!done && lat < 60) begin
      if (mux_valid) begin serial[sidx] = mux_spike; sidx--; end
      @(negedge clk); lat++;
    end
    serial[0] = mux_spike;
    check(lat + 1 == 34, $sformatf("done in clock %0d, expected 34", lat + 1));
    @(negedge clk);
    check(isi_train == e_isi_tr, $sformatf("d=%h isi %b exp %b", d, isi_train, e_isi_tr));
    check(edge_train == e_edge, $sformatf("edges %b", edge_train));
    check(mux_train == e_mux, $sformatf("d=%h mux %b exp %b", d, mux_train, e_mux));
    check(serial == e_mux, $sformatf("serial %b", serial));
  endtask

  initial begin
    data = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    encode(16'h8000);
    encode(16'h4000);
    encode(16'h1000);
    encode(16'h0000);
    for (int i = 0; i < 200; i++) encode(16'($urandom_range(0, 32768)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
