// pwm_edge_detect: rising-edge detector of the PWM reference.
//
// A register keeps the PWM level of the previous time step; the edge is the AND of
// the current level with the inverted previous level (a NOT and an AND gate).
//
// Interface: restart loads the register with prev_level, the level just before the
// first step of a window; every clock with step high registers the current level.
// rise is combinational and valid while step is high.
module pwm_edge_detect (
  input  logic clk,
  input  logic rst_n,
  input  logic restart,
  input  logic prev_level,
  input  logic step,
  input  logic pwm,
  output logic rise
);
  logic prev_q;

  assign rise = step && pwm && !prev_q;

  always_ff @(posedge clk) begin
    if (!rst_n)       prev_q <= 1'b0;
    else if (restart) prev_q <= prev_level;
    else if (step)    prev_q <= pwm;
  end
endmodule
