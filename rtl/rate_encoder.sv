// rate_encoder: proposed rate (Poisson-like) spike encoder.
//
// Two free-running 16-bit LFSRs, one Fibonacci and one Galois, advance every clock.
// Their states are XORed into one random number, which lowers the predictability and
// correlation of either register alone. Sixteen clocks after a sample is taken, that
// random number is compared with the sample and a spike is fired if the sample is
// larger. The higher the sample, the more likely the spike; sixteen such encoders in
// parallel give a spike count proportional to the amplitude.
//
// Interface: start (1 cycle, ignored while busy) latches data; spike is valid for the
// single cycle in which spike_valid is high, RAND_PERIOD cycles after start. The
// sample is unsigned with full scale 16'hFFFF.
// From the document: the two LFSR types, the XOR, the comparator, 16-bit width and
// one random number every 16 clocks. This design's choice: the handshake and seeds.
module rate_encoder #(
  parameter int unsigned  RAND_PERIOD = 16,
  parameter logic [15:0]  FIB_SEED    = 16'hACE1,
  parameter logic [15:0]  GAL_SEED    = 16'h1D2B
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  encoder_pkg::sample_t  data,
  output logic                  spike,
  output logic                  spike_valid,
  output logic                  busy
);
  import encoder_pkg::*;
  localparam int unsigned CNT_W = (RAND_PERIOD > 1) ? $clog2(RAND_PERIOD) : 1;

  logic [15:0]      fib_q, gal_q, rnd;
  sample_t          data_q;
  logic [CNT_W-1:0] cnt;

  lfsr16_fib    #(.SEED(FIB_SEED)) u_fib (.clk, .rst_n, .en(1'b1), .q(fib_q));
  lfsr16_galois #(.SEED(GAL_SEED)) u_gal (.clk, .rst_n, .en(1'b1), .q(gal_q));

  assign rnd = fib_q ^ gal_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      cnt         <= '0;
      data_q      <= '0;
      spike       <= 1'b0;
      spike_valid <= 1'b0;
    end else begin
      spike_valid <= 1'b0;
      spike       <= 1'b0;
      if (start && !busy) begin
        busy   <= 1'b1;
        data_q <= data;
        cnt    <= '0;
      end else if (busy) begin
        if (cnt == CNT_W'(RAND_PERIOD - 2)) begin
          // the random number of the 16th cycle after start
          spike       <= (data_q > rnd);
          spike_valid <= 1'b1;
          busy        <= 1'b0;
        end
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
