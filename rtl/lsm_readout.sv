// lsm_readout: readout layer of the liquid state machine.
//
// N_RU readout units (two, one per class: idle or busy sub-carrier) all receive the
// N_PRE spike-record bits of the reservoir at every time step. Unit r learns only
// when its classification teacher bit ct[r] is high, so the target class's unit is
// potentiated towards the current reservoir activity. Each unit's output spikes are
// counted (sum S_out); the class with the larger count is the decision.
//
// Interface: step_start (while busy is low) presents one time step. step_done
// pulses when all units have finished it; spikes then holds their outputs. counts
// are cleared by count_clear. iter_end, loss[r] and the weight load port (load_we[r],
// load_addr, load_data) reach unit r's learning engine and are used while idle.
// From the document: two units, 16 shared inputs, CT1/CT2 and the output spike sums.
// This design's choice: counter width and the host-side ports.
// Each unit's membrane potential and threshold outputs are observation ports for
// unit-level tests and are not used at this level (lint reports them unused).
module lsm_readout #(
  parameter int unsigned  N_RU  = lsm_pkg::N_RU,
  parameter int unsigned  N_PRE = lsm_pkg::N_PRE,
  localparam int unsigned AW    = $clog2(N_PRE)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              step_start,
  input  logic [N_PRE-1:0]  spike_record,
  input  logic [N_RU-1:0]   ct,
  input  logic              learn_en,
  input  logic              iter_end,
  input  logic [15:0]       loss [N_RU],
  input  logic [N_RU-1:0]   load_we,
  input  logic [AW-1:0]     load_addr,
  input  lsm_pkg::weight_t  load_data,
  input  logic              count_clear,
  output logic [N_RU-1:0]   spikes,
  output logic [15:0]       counts [N_RU],
  output logic              step_done,
  output logic              busy,
  output logic [N_RU-1:0]   upd_pot,
  output logic [N_RU-1:0]   upd_dep,
  output logic [N_RU-1:0]   saved,
  output logic [N_RU-1:0]   restored
);
  logic [N_RU-1:0] done_v, busy_v;

  for (genvar r = 0; r < N_RU; r++) begin : g_ru
    logic signed [15:0] vmem, vth;
    readout_unit #(.N_PRE(N_PRE), .RNG_SEED(16'(32'hB5A3 + 32'h3C1 * r))) u_ru (
      .clk, .rst_n, .step_start(step_start && !busy), .pre_spikes(spike_record),
      .ct(ct[r]), .learn_en, .iter_end(iter_end && !busy), .loss(loss[r]),
      .load_we(load_we[r]), .load_addr, .load_data,
      .spike(spikes[r]), .step_done(done_v[r]), .busy(busy_v[r]),
      .vmem, .vth,
      .upd_pot(upd_pot[r]), .upd_dep(upd_dep[r]), .saved(saved[r]), .restored(restored[r])
    );

    always_ff @(posedge clk) begin
      if (!rst_n || count_clear)          counts[r] <= '0;
      else if (done_v[r] && spikes[r] && counts[r] != 16'hFFFF) counts[r] <= counts[r] + 1'b1;
    end
  end

  // the units run in lockstep: every unit takes the same number of clocks per step
  assign step_done = done_v[0];
  assign busy      = |busy_v;
endmodule
