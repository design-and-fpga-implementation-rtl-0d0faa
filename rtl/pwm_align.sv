// pwm_align: aligns an ISI spike train with the rising edges of the PWM reference.
//
// Both 16-step trains are loaded into shift registers and shifted left one step per
// clock, so the MSBs always hold the current step. A one-bit pending register
// remembers an ISI spike that has not yet met an edge. At every step
//   out     = (isi_msb | pending) & edge_msb
//   pending = (isi_msb | pending) & ~edge_msb
// so each spike moves forward to the next rising edge, and spikes that wait for the
// same edge merge into a single spike. The result is shifted into an output
// (concatenation) register. A spike still pending after the last edge of the window
// is dropped.
//
// Timing: load (ignored while busy) takes both trains; the next WINDOW clocks are
// the steps (step_valid high, spike = out). train holds the aligned train after the
// clock where done is high, 17 clocks after load by default.
// From the document: the shift registers, pending register, AND/OR gates and
// concatenation. This design's choice: spikes coinciding with an edge leave at it,
// and pending spikes at the window end are dropped.
module pwm_align #(
  parameter int unsigned WINDOW = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [WINDOW-1:0] isi_train,
  input  logic [WINDOW-1:0] edge_train,
  output logic              spike,
  output logic              step_valid,
  output logic [WINDOW-1:0] train,
  output logic              done,
  output logic              busy
);
  localparam int unsigned STEP_W = $clog2(WINDOW + 1);

  logic [WINDOW-1:0] isi_q, edge_q;
  logic              pend_q, waiting;
  logic [STEP_W-1:0] t;

  assign waiting    = isi_q[WINDOW-1] | pend_q;
  assign step_valid = busy;
  assign spike      = busy && waiting && edge_q[WINDOW-1];
  assign done       = busy && (t == STEP_W'(WINDOW));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      isi_q  <= '0;
      edge_q <= '0;
      pend_q <= 1'b0;
      t      <= '0;
      train  <= '0;
    end else if (load && !busy) begin
      busy   <= 1'b1;
      isi_q  <= isi_train;
      edge_q <= edge_train;
      pend_q <= 1'b0;
      t      <= STEP_W'(1);
      train  <= '0;
    end else if (busy) begin
      isi_q  <= isi_q << 1;
      edge_q <= edge_q << 1;
      pend_q <= waiting && !edge_q[WINDOW-1];
      train  <= {train[WINDOW-2:0], spike};
      t      <= t + 1'b1;
      if (done) busy <= 1'b0;
    end
  end
endmodule
