// rate_encoder_lfsr_array: baseline rate encoder with one LFSR per time step.
//
// The state-of-the-art rate encoder that the dual-LFSR design improves on, kept for
// comparison. There is one 16-bit Fibonacci LFSR and one comparator per time step of
// the spike train. Every LFSR runs freely, and its state is the random threshold of
// its comparator: bit i of the spike train is 1 when the sample is larger than
// LFSR i. Because each random number comes from a single LFSR, it is a fixed,
// predictable sequence, which is the weakness the dual-LFSR encoder addresses.
//
// Timing and interface are those of rate_encoder_array: start (ignored while busy)
// latches data, and after RAND_PERIOD clocks valid is high for one clock with the
// N_ENC-bit spike train on spikes. The comparison uses the LFSR states of the 16th
// cycle after start. Sample unsigned, full scale 16'hFFFF.
// From the document: n-bit LFSR random number generators, one per time step, each
// feeding a comparator against the input. This design's choice: the LFSR polynomial
// (that of lfsr16_fib), the seeds (those of rate_encoder_array's Fibonacci LFSRs,
// FIB = 16'hACE1 + 16'h9E37*i, forced non-zero) and the handshake.
module rate_encoder_lfsr_array #(
  parameter int unsigned N_ENC       = 16,
  parameter int unsigned RAND_PERIOD = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  encoder_pkg::sample_t data,
  output logic [N_ENC-1:0]     spikes,
  output logic                 valid,
  output logic                 busy
);
  import encoder_pkg::*;
  localparam int unsigned CNT_W = (RAND_PERIOD > 1) ? $clog2(RAND_PERIOD) : 1;

  logic [15:0]      rnd [N_ENC];
  logic [N_ENC-1:0] hit;
  sample_t          data_q;
  logic [CNT_W-1:0] cnt;

  for (genvar i = 0; i < N_ENC; i++) begin : g_lane
    localparam logic [15:0] FS = 16'(32'hACE1 + 32'h9E37 * i);
    lfsr16_fib #(.SEED((FS == 16'h0) ? 16'h1 : FS)) u_lfsr (
      .clk, .rst_n, .en(1'b1), .q(rnd[i])
    );
    assign hit[i] = data_q > rnd[i];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      cnt    <= '0;
      data_q <= '0;
      spikes <= '0;
      valid  <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (start && !busy) begin
        busy   <= 1'b1;
        data_q <= data;
        cnt    <= '0;
      end else if (busy) begin
        if (cnt == CNT_W'(RAND_PERIOD - 2)) begin
          spikes <= hit;
          valid  <= 1'b1;
          busy   <= 1'b0;
        end
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
