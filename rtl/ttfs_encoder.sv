// ttfs_encoder: proposed time-to-first-spike encoder.
//
// A sample is encoded by the time of its spike: the larger the sample, the earlier it
// crosses an exponentially decaying threshold theta*exp(-t/tau_th), theta = 1.
// A time counter, advancing by X_STEP = 1024/tau_th per clock in Q6.10, drives the
// exponential approximation unit; its result is registered and compared with the
// sample. A second path enforces a refractory period: a register cleared at the
// start of each sample grows by T_REF on every spike, and a spike is only allowed
// while the counter has reached that register. With T_REF beyond the window (the
// default) the encoder fires at most once per sample, at the first crossing.
//
// Timing: start (ignored while busy) latches data and loads the threshold register
// with exp(0). Step k = 0..T_WINDOW-1 is evaluated in clock k+1 after start, with
// step_valid high, step = k and spike = (data > exp(-k*X_STEP/1024)) and not
// refractory. done marks the last step, so a sample takes T_WINDOW = 40 clocks.
// From the document: counter, exponential unit, threshold register, the two
// comparators and the AND, the T_ref adder loop and the 40-cycle window. This
// design's choice: tau_th, T_REF, the Q1.15 sample format and the handshake.
module ttfs_encoder #(
  parameter int unsigned T_WINDOW = 40,
  parameter logic [15:0] X_STEP   = 16'd128,
  parameter logic [15:0] T_REF    = 16'(40 * 128)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  encoder_pkg::sample_t data,
  output logic                 spike,
  output logic                 step_valid,
  output logic [5:0]           step,
  output logic                 done,
  output logic                 busy
);
  import encoder_pkg::*;

  sample_t     data_q;
  logic [15:0] cnt;       // time of the next threshold to compute (Q6.10)
  logic [15:0] t_cur;     // time of the threshold held in thr_q
  logic [15:0] thr_q;     // threshold register
  logic [16:0] refr_q;    // refractory register (one guard bit)
  logic [15:0] exp_x, exp_y;
  logic        fire_ok, above;

  assign exp_x = (start && !busy) ? 16'h0 : cnt;
  exp_approx u_exp (.x(exp_x), .y(exp_y));

  assign above      = data_q > thr_q;
  assign fire_ok    = {1'b0, t_cur} >= refr_q;
  assign step_valid = busy;
  assign spike      = busy && above && fire_ok;
  assign done       = busy && (step == 6'(T_WINDOW - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      data_q <= '0;
      cnt    <= '0;
      t_cur  <= '0;
      thr_q  <= '0;
      refr_q <= '0;
      step   <= '0;
    end else if (start && !busy) begin
      busy   <= 1'b1;
      data_q <= data;
      thr_q  <= exp_y;          // exp(0)
      t_cur  <= '0;
      cnt    <= X_STEP;
      refr_q <= '0;             // mux input 0: new sample
      step   <= '0;
    end else if (busy) begin
      thr_q <= exp_y;
      t_cur <= cnt;
      cnt   <= cnt + X_STEP;
      if (spike) refr_q <= refr_q + {1'b0, T_REF};
      step  <= step + 1'b1;
      if (done) busy <= 1'b0;
    end
  end
endmodule
