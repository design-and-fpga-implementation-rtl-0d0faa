// pwm_generator: periodic PWM reference for the multiplexing encoder.
//
// The PWM reference is a divided clock: a phase counter counts time steps modulo
// PERIOD and the output is high for the first HIGH phases of each period. The counter
// is restarted for every sample so that each encoding window sees the same waveform.
// With the defaults (PERIOD 4, HIGH 2) the level is high at steps 0,1,4,5,8,9,...
// and its rising edges fall at steps 4, 8, 12 and 16.
//
// Interface: restart sets the phase of step 1 (the level of step 0 is given on
// pwm_init); each clock with step high moves to the next step. pwm is the level of
// the current step. pwm_init is a constant (HIGH > 0) that depends only on the
// parameters; it is brought out for the edge detector's start-of-window state.
// From the document: a PWM signal produced from the clock. This design's choice:
// period, duty cycle and phase.
module pwm_generator #(
  parameter int unsigned PERIOD = 4,
  parameter int unsigned HIGH   = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic restart,
  input  logic step,
  output logic pwm,
  output logic pwm_init
);
  localparam int unsigned PH_W = (PERIOD > 1) ? $clog2(PERIOD) : 1;

  logic [PH_W-1:0] ph;

  assign pwm      = 32'(ph) < HIGH;
  assign pwm_init = HIGH > 0;

  always_ff @(posedge clk) begin
    if (!rst_n)       ph <= PH_W'(1 % PERIOD);
    else if (restart) ph <= PH_W'(1 % PERIOD);
    else if (step)    ph <= (32'(ph) == PERIOD - 1) ? '0 : ph + 1'b1;
  end
endmodule
