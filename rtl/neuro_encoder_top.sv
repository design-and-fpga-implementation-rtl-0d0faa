// neuro_encoder_top: spike encoders and LSM readout layer of the neuromorphic front end.
//
// The three proposed spike encoders stand side by side, each with its own sample
// input, because they are alternative ways to feed a spiking network:
//   - rate:  16 parallel rate encoders (dual-LFSR), a 16-bit spike train per sample
//            every 16 clocks;
//   - TTFS:  one time-to-first-spike encoder with the shift-and-add exponential
//            threshold, 40 clocks per sample;
//   - multiplexing: ISI burst train aligned to PWM rising edges, 34 clocks per sample.
// Beside the proposed rate and TTFS encoders run the baselines they are compared
// with (one LFSR per time step; a threshold ROM), fed from the same start and
// sample inputs so that both encodings of every sample are available, and the
// 8-bit binary phase encoder that the multiplexing encoder's PWM phase stage replaces.
// Next to them is the readout layer of the liquid state machine: two readout units
// with on-chip R-STDP learning. The reservoir that would turn encoder spikes into the
// 16-bit spike record is not part of this design, so the spike record is an input.
//
// All ports are the sub-blocks' ports brought out with a prefix; see each sub-block
// for formats and timing. One clock, synchronous active-low reset.
module neuro_encoder_top (
  input  logic                 clk,
  input  logic                 rst_n,
  // rate encoder array
  input  logic                 rate_start,
  input  encoder_pkg::sample_t rate_data,
  output logic [15:0]          rate_spikes,
  output logic                 rate_valid,
  output logic                 rate_busy,
  // baseline rate encoder (one LFSR per step), same start/data as the rate array
  output logic [15:0]          rate_base_spikes,
  output logic                 rate_base_valid,
  output logic                 rate_base_busy,
  // TTFS encoder
  input  logic                 ttfs_start,
  input  encoder_pkg::sample_t ttfs_data,
  output logic                 ttfs_spike,
  output logic                 ttfs_step_valid,
  output logic [5:0]           ttfs_step,
  output logic                 ttfs_done,
  output logic                 ttfs_busy,
  // baseline ROM-threshold TTFS encoder, same start/data as the TTFS encoder
  output logic                 ttfs_base_spike,
  output logic                 ttfs_base_step_valid,
  output logic [5:0]           ttfs_base_step,
  output logic                 ttfs_base_done,
  output logic                 ttfs_base_busy,
  // baseline binary phase encoder
  input  logic                 phase_load,
  input  logic [7:0]           phase_data,
  output logic                 phase_spike,
  // multiplexing encoder
  input  logic                 mux_start,
  input  encoder_pkg::sample_t mux_data,
  output logic [15:0]          mux_isi_train,
  output logic [15:0]          mux_edge_train,
  output logic                 mux_spike,
  output logic                 mux_valid,
  output logic [15:0]          mux_train,
  output logic                 mux_done,
  output logic                 mux_busy,
  // LSM readout layer
  input  logic                 lsm_step_start,
  input  logic [15:0]          lsm_spike_record,
  input  logic [1:0]           lsm_ct,
  input  logic                 lsm_learn_en,
  input  logic                 lsm_iter_end,
  input  logic [15:0]          lsm_loss [2],
  input  logic [1:0]           lsm_load_we,
  input  logic [3:0]           lsm_load_addr,
  input  lsm_pkg::weight_t     lsm_load_data,
  input  logic                 lsm_count_clear,
  output logic [1:0]           lsm_spikes,
  output logic [15:0]          lsm_counts [2],
  output logic                 lsm_step_done,
  output logic                 lsm_busy,
  output logic [1:0]           lsm_upd_pot,
  output logic [1:0]           lsm_upd_dep,
  output logic [1:0]           lsm_saved,
  output logic [1:0]           lsm_restored
);
  rate_encoder_array u_rate (
    .clk, .rst_n, .start(rate_start), .data(rate_data),
    .spikes(rate_spikes), .valid(rate_valid), .busy(rate_busy)
  );

  rate_encoder_lfsr_array u_rate_base (
    .clk, .rst_n, .start(rate_start), .data(rate_data),
    .spikes(rate_base_spikes), .valid(rate_base_valid), .busy(rate_base_busy)
  );

  ttfs_encoder u_ttfs (
    .clk, .rst_n, .start(ttfs_start), .data(ttfs_data),
    .spike(ttfs_spike), .step_valid(ttfs_step_valid), .step(ttfs_step),
    .done(ttfs_done), .busy(ttfs_busy)
  );

  ttfs_encoder_rom u_ttfs_base (
    .clk, .rst_n, .start(ttfs_start), .data(ttfs_data),
    .spike(ttfs_base_spike), .step_valid(ttfs_base_step_valid), .step(ttfs_base_step),
    .done(ttfs_base_done), .busy(ttfs_base_busy)
  );

  phase_encoder u_phase (
    .clk, .rst_n, .load(phase_load), .data(phase_data), .spike(phase_spike)
  );

  multiplexing_encoder u_mux (
    .clk, .rst_n, .start(mux_start), .data(mux_data),
    .isi_train(mux_isi_train), .edge_train(mux_edge_train),
    .mux_spike, .mux_valid, .mux_train, .done(mux_done), .busy(mux_busy)
  );

  lsm_readout u_lsm (
    .clk, .rst_n, .step_start(lsm_step_start), .spike_record(lsm_spike_record),
    .ct(lsm_ct), .learn_en(lsm_learn_en), .iter_end(lsm_iter_end), .loss(lsm_loss),
    .load_we(lsm_load_we), .load_addr(lsm_load_addr), .load_data(lsm_load_data),
    .count_clear(lsm_count_clear), .spikes(lsm_spikes), .counts(lsm_counts),
    .step_done(lsm_step_done), .busy(lsm_busy),
    .upd_pot(lsm_upd_pot), .upd_dep(lsm_upd_dep), .saved(lsm_saved), .restored(lsm_restored)
  );
endmodule
