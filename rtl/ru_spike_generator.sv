// ru_spike_generator: leaky integrate-and-fire neuron with adaptive threshold.
//
// Once per time step (fire high) the membrane potential is updated as
//   V <- V - V/tau_mem + sum(W_i * S_i)
// and compared with the threshold Vth. If V > Vth the neuron spikes and V is reset
// to 0. The threshold is VTH0 plus an adaptive part A that rises by C_TH on every
// spike and decays as A <- A - A/tau_th, so a neuron that fires repeatedly becomes
// harder to excite and recovers when silent. Divisions by tau are arithmetic right
// shifts (TAU_MEM_SH, TAU_TH_SH). V saturates at the 16-bit signed range.
//
// Interface: isum is the signed sum of the weights of the synapses that spiked this
// step. spike, vmem and vth are registered and change in the clock after fire.
// clear returns V to 0 and A to 0.
// From the document: the LIF update, reset to 0 and the adaptive threshold. This
// design's choice: the shift constants, VTH0, C_TH, saturation, and adding C_TH only
// on a spike.
module ru_spike_generator #(
  parameter int unsigned TAU_MEM_SH = 3,
  parameter int unsigned TAU_TH_SH  = 4,
  parameter int          VTH0       = 256,
  parameter int          C_TH       = 64
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  input  logic               fire,
  input  logic signed [19:0] isum,
  output logic               spike,
  output logic signed [15:0] vmem,
  output logic signed [15:0] vth
);
  logic signed [15:0] adapt_q;
  logic signed [21:0] v_next;
  logic signed [15:0] v_sat;
  logic signed [16:0] a_next;
  logic               fires;

  always_comb begin
    v_next = 22'(vmem) - 22'(vmem >>> TAU_MEM_SH) + 22'(isum);
    if (v_next > 22'sd32767)       v_sat = 16'sh7FFF;
    else if (v_next < -22'sd32768) v_sat = -16'sh8000;
    else                           v_sat = 16'(v_next);
    fires  = v_sat > vth;
    a_next = 17'(adapt_q) - 17'(adapt_q >>> TAU_TH_SH) + (fires ? 17'(C_TH) : 17'sd0);
  end

  assign vth = 16'(VTH0) + adapt_q;

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      vmem    <= '0;
      adapt_q <= '0;
      spike   <= 1'b0;
    end else if (fire) begin
      vmem    <= fires ? 16'sd0 : v_sat;
      adapt_q <= (a_next > 17'sd16383) ? 16'sd16383 : 16'(a_next);
      spike   <= fires;
    end
  end
endmodule
