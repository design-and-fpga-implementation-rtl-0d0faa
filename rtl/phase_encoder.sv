// phase_encoder: baseline binary phase encoder (periodic weighted-bit spikes).
//
// Phase coding sends the binary representation of the input, one bit per time step,
// and repeats it every N steps. Step t carries weight 2^-(1+mod(t-1,N)), so the
// first step of each period holds the most significant bit: the spike at step t is
// bit N-1-mod(t-1,N) of the sample, and a larger sample gives more, and earlier,
// spikes. The circuit is an N-bit rotating register with parallel load: each stage
// has a 2:1 mux choosing between its input bit (load) and the previous stage, and
// the last stage's output, which is the spike, is fed back to the first stage.
//
// Interface and timing: in a clock with load high, data is loaded (stage N-1 takes
// data[N-1], the MSB). From the next clock on, spike shows the bits MSB first, one
// per clock, and repeats with period N until the next load. There is no handshake;
// load can be given at any clock.
// From the document: the mux-and-register chain, the load signal, the feedback of
// the spike to the first stage, and N = 8 (P0..P7). This design's choice: which end
// holds the MSB (the one read first, matching the weight of step 1) and the reset
// value (all zero, no spikes).
module phase_encoder #(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [N-1:0] data,
  output logic         spike
);
  logic [N-1:0] sr;

  assign spike = sr[N-1];

  always_ff @(posedge clk) begin
    if (!rst_n)    sr <= '0;
    else if (load) sr <= data;
    else           sr <= {sr[N-2:0], sr[N-1]};
  end
endmodule
