// tb_dp_ram: checks the weight RAM: data written can be read back one clock after
// the address, a read and a write to different addresses in the same clock both
// work, and a read of the address being written returns the old word.
module tb_dp_ram;
  logic clk = 0, we = 0;
  logic [3:0] waddr = 0, raddr = 0;
  logic [15:0] wdata = 0, rdata;
  logic [15:0] model [16];
  int checks = 0, failures = 0;

  dp_ram dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

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

  initial begin
    @(negedge clk);
    for (int i = 0; i < 16; i++) begin
      we = 1; waddr = 4'(i); wdata = 16'($urandom); model[i] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int i = 0; i < 300; i++) begin
      logic [15:0] expv;
      raddr = 4'($urandom);
      we = 1'($urandom);
      waddr = 4'($urandom);
      wdata = 16'($urandom);
      expv = model[raddr];                // old word even if written now
      @(negedge clk);
      check(rdata == expv, $sformatf("read %0d: %h exp %h", raddr, rdata, expv));
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
