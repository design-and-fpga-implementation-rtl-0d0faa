// readout_unit: one LIF readout neuron of the LSM with on-chip R-STDP learning.
//
// A time step runs as a fixed sequence:
//   INTEG  N_PRE+1 clocks: the weights are read one per clock through the learning
//          engine's memory and the weights of the synapses whose spike-record bit is
//          set are summed (sum W_i * S_i);
//   FIRE   1 clock: the spike generator applies the leak, the sum and the adaptive
//          threshold;
//   SHIFT  1 clock: the new output spike and the spike-record bits enter the spike
//          histories; if learn_en is high a learning sweep is started;
//   LEARN  N_PRE+1 clocks: the learning engine updates every weight under the
//          teacher signal ct.
// step_done pulses at the end; spike then holds the output of this step until the
// next FIRE. Counting the step_start clock and the step_done clock, a step takes
// N_PRE+6 clocks without learning and 2*N_PRE+7 with it (22 and 39 for N_PRE=16),
// the extra clocks being the start, the memory read latency and the handshakes.
//
// Interface: step_start (accepted while idle) latches pre_spikes, ct and learn_en.
// iter_end/loss and the weight load port are passed to the learning engine and must
// be used while idle (busy low).
// From the document: the split into learning engine and spike generator and the
// shared weight memory addressed together with the mux. This design's choice: the
// sequencing and cycle counts.
module readout_unit #(
  parameter int unsigned  N_PRE    = lsm_pkg::N_PRE,
  parameter logic [15:0]  RNG_SEED = 16'hB5A3,
  localparam int unsigned AW       = $clog2(N_PRE)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              step_start,
  input  logic [N_PRE-1:0]  pre_spikes,
  input  logic              ct,
  input  logic              learn_en,
  input  logic              iter_end,
  input  logic [15:0]       loss,
  input  logic              load_we,
  input  logic [AW-1:0]     load_addr,
  input  lsm_pkg::weight_t  load_data,
  output logic              spike,
  output logic              step_done,
  output logic              busy,
  output logic signed [15:0] vmem,
  output logic signed [15:0] vth,
  output logic              upd_pot,
  output logic              upd_dep,
  output logic              saved,
  output logic              restored
);
  import lsm_pkg::*;

  typedef enum logic [2:0] {R_IDLE, R_INTEG, R_FIRE, R_SHIFT, R_LEARN} rstate_t;

  rstate_t            state;
  logic [N_PRE-1:0]   spk_q;
  logic               ct_q, learn_q;
  logic [AW:0]        a;
  logic               a_valid_q;
  logic [AW-1:0]      a_q;
  logic signed [19:0] isum;
  weight_t            rd_data;
  logic               le_busy, le_learn_start, le_idle_q;

  assign le_learn_start = (state == R_SHIFT) && learn_q;

  ru_learning_engine #(.N_PRE(N_PRE), .RNG_SEED(RNG_SEED)) u_le (
    .clk, .rst_n,
    .hist_shift(state == R_SHIFT), .pre_spikes(spk_q), .post_spike(spike),
    .learn_start(le_learn_start), .ct(ct_q),
    .rd_addr(a[AW-1:0]), .rd_data,
    .load_we(load_we && state == R_IDLE), .load_addr, .load_data,
    .iter_end(iter_end && state == R_IDLE), .loss,
    .busy(le_busy), .upd_pot, .upd_dep, .saved, .restored
  );

  ru_spike_generator u_sg (
    .clk, .rst_n, .clear(1'b0), .fire(state == R_FIRE), .isum,
    .spike, .vmem, .vth
  );

  assign busy      = (state != R_IDLE) || le_busy;
  assign step_done = (state == R_LEARN) && !le_busy && le_idle_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= R_IDLE;
      spk_q     <= '0;
      ct_q      <= 1'b0;
      learn_q   <= 1'b0;
      a         <= '0;
      a_valid_q <= 1'b0;
      a_q       <= '0;
      isum      <= '0;
      le_idle_q <= 1'b0;
    end else begin
      a_valid_q <= (state == R_INTEG) && (a < (AW+1)'(N_PRE));
      a_q       <= a[AW-1:0];
      le_idle_q <= 1'b0;
      if (a_valid_q && spk_q[a_q]) isum <= isum + 20'(rd_data);
      unique case (state)
        R_IDLE: if (step_start && !le_busy) begin
          state   <= R_INTEG;
          spk_q   <= pre_spikes;
          ct_q    <= ct;
          learn_q <= learn_en;
          a       <= '0;
          isum    <= '0;
        end
        R_INTEG: begin
          if (a < (AW+1)'(N_PRE)) a <= a + 1'b1;
          else                    state <= R_FIRE;   // last weight added this clock
        end
        R_FIRE:  state <= R_SHIFT;
        R_SHIFT: state <= R_LEARN;
        R_LEARN: begin
          // one idle clock of the engine marks the end of its sweep
          le_idle_q <= !le_busy;
          if (le_idle_q && !le_busy) state <= R_IDLE;
        end
        default: state <= R_IDLE;
      endcase
    end
  end
endmodule
