// rate_encoder_array: sixteen proposed rate encoders working on one sample.
//
// Every encoder sees the same sample but has its own pair of LFSR seeds, so their
// random numbers are independent. After 16 clocks the array delivers a 16-bit spike
// train (bit i from encoder i); the number of ones approximates
// 16 * sample / 65536, which is how a rate code is decoded.
//
// Interface: start (ignored while busy) latches data; spikes is valid for the one
// cycle valid is high, 16 cycles after start.
// From the document: 16 encoders in parallel, 16-bit train over 16 clocks. This
// design's choice: the seed of encoder i, FIB = 16'hACE1 + 16'h9E37*i and
// GAL = 16'h1D2B ^ (16'h7F4A*(i+1)), both forced non-zero.
// All encoders start together and have the same latency, so only encoder 0's
// spike_valid and busy are used; lint reports the other copies unused.
module rate_encoder_array #(
  parameter int unsigned N_ENC = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  encoder_pkg::sample_t data,
  output logic [N_ENC-1:0]     spikes,
  output logic                 valid,
  output logic                 busy
);
  logic [N_ENC-1:0] v, b;

  for (genvar i = 0; i < N_ENC; i++) begin : g_enc
    localparam logic [15:0] FS = 16'(32'hACE1 + 32'h9E37 * i);
    localparam logic [15:0] GS = 16'(32'h1D2B ^ (32'h7F4A * (i + 1)));
    rate_encoder #(
      .FIB_SEED((FS == 16'h0) ? 16'h1 : FS),
      .GAL_SEED((GS == 16'h0) ? 16'h1 : GS)
    ) u_enc (
      .clk, .rst_n, .start, .data,
      .spike(spikes[i]), .spike_valid(v[i]), .busy(b[i])
    );
  end

  // all encoders run in lockstep
  assign valid = v[0];
  assign busy  = b[0];
endmodule
