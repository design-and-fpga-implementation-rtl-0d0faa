// lsm_pkg: sizes and look-up tables of the LSM readout layer.
//
// The readout layer has N_RU readout units, each with N_PRE afferent synapses from
// the reservoir spike record and HIST-deep spike history registers. Weights and
// membrane potentials are 16-bit signed.
//
// The two R-STDP tables are indexed by k = |dt| (0..HIST-1) and fall off with the
// spike timing difference. The published design calibrates them in software; here
// they follow 2^(-k/2):
//   prob_lut(k) = round(65535 * 2^(-k/2))   update probability, compared with an LFSR
//   stdp_lut(k) = round(STDP_A * 2^(-k/2))  weight change magnitude
// computed from the integer sequence 2^(-k/2) = 2^(-floor(k/2)) * (1 or 1/sqrt2).
package lsm_pkg;
  localparam int unsigned N_RU  = 2;
  localparam int unsigned N_PRE = 16;
  localparam int unsigned HIST  = 12;
  localparam int unsigned W_W   = 16;
  localparam int unsigned STDP_A = 32;

  typedef logic signed [W_W-1:0] weight_t;

  // timing difference produced by the priority encoder
  typedef struct packed {
    logic       valid;   // a spike pair was found
    logic       neg;     // 1: depression (post earlier than pre)
    logic [3:0] mag;     // |dt| in time steps
  } dt_t;

  // 2^(-k/2) in Q0.16 (k even exact, k odd via 1/sqrt2 = 46341/65536)
  function automatic logic [15:0] pow2_half(input int unsigned k);
    int unsigned v;
    v = (k % 2 == 0) ? 65535 : 46341;
    return 16'(v >> (k / 2));
  endfunction

  function automatic logic [15:0] prob_lut(input logic [3:0] k);
    return pow2_half(int'(k));
  endfunction

  function automatic logic [15:0] stdp_lut(input logic [3:0] k);
    return 16'((STDP_A * 32'(pow2_half(int'(k))) + 32768) >> 16);
  endfunction
endpackage
