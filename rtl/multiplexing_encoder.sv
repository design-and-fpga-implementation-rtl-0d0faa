// multiplexing_encoder: proposed ISI + PWM-phase multiplexing spike encoder.
//
// Multiplexed coding first turns a sample into spikes (here an ISI burst) and then
// moves every spike to the next peak of a reference oscillation. A sinusoidal
// reference is costly in digital logic, so the reference is a PWM square wave and its
// rising edges play the role of the peaks. Three parts run in sequence:
//   1. isi_encoder builds the 16-step ISI train (17 clocks);
//   2. during the same 16 steps pwm_generator and pwm_edge_detect produce the
//      rising edges of the reference, collected into a 16-bit edge train;
//   3. pwm_align moves each ISI spike to the next edge (17 clocks).
//
// Timing: start (ignored while busy) begins a sample; done is high in the 34th
// clock counted from the start clock, after which mux_train holds the multiplexed
// train (bit 15 = step 1). mux_spike/mux_valid give the same train serially. isi_train
// and edge_train are the intermediate trains of the sample. Sample format Q1.15.
// From the document: the three components and the 34-clock latency. This design's
// choice: the parameter values (see the sub-blocks) and the handshake.
// The ISI encoder's serial spike and its Ns/ISI outputs are left unconnected here:
// the alignment stage works on the complete ISI train, so lint reports them unused.
module multiplexing_encoder #(
  parameter int unsigned WINDOW     = 16,
  parameter int unsigned NMAX       = 8,
  parameter int unsigned TMAX       = 6,
  parameter int unsigned TMIN       = 2,
  parameter int unsigned PWM_PERIOD = 4,
  parameter int unsigned PWM_HIGH   = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  encoder_pkg::sample_t data,
  output logic [WINDOW-1:0]    isi_train,
  output logic [WINDOW-1:0]    edge_train,
  output logic                 mux_spike,
  output logic                 mux_valid,
  output logic [WINDOW-1:0]    mux_train,
  output logic                 done,
  output logic                 busy
);
  logic isi_spike, isi_step, isi_done, isi_busy;
  logic pwm, pwm_init, rise;
  logic align_load_q, align_busy;
  logic [4:0] ns;
  logic [7:0] isi;
  logic       go;

  assign go = start && !busy;

  isi_encoder #(.WINDOW(WINDOW), .NMAX(NMAX), .TMAX(TMAX), .TMIN(TMIN)) u_isi (
    .clk, .rst_n, .start(go), .data,
    .spike(isi_spike), .step_valid(isi_step), .train(isi_train),
    .ns, .isi, .done(isi_done), .busy(isi_busy)
  );

  pwm_generator #(.PERIOD(PWM_PERIOD), .HIGH(PWM_HIGH)) u_pwm (
    .clk, .rst_n, .restart(go), .step(isi_step), .pwm, .pwm_init
  );

  pwm_edge_detect u_edge (
    .clk, .rst_n, .restart(go), .prev_level(pwm_init), .step(isi_step), .pwm, .rise
  );

  // edge train, same time base as the ISI train
  always_ff @(posedge clk) begin
    if (!rst_n)        edge_train <= '0;
    else if (go)       edge_train <= '0;
    else if (isi_step) edge_train <= {edge_train[WINDOW-2:0], rise};
  end

  // start the alignment once both trains are complete
  always_ff @(posedge clk) begin
    if (!rst_n) align_load_q <= 1'b0;
    else        align_load_q <= isi_done;
  end

  pwm_align #(.WINDOW(WINDOW)) u_align (
    .clk, .rst_n, .load(align_load_q), .isi_train, .edge_train,
    .spike(mux_spike), .step_valid(mux_valid), .train(mux_train),
    .done, .busy(align_busy)
  );

  assign busy = isi_busy || align_load_q || align_busy;
endmodule
