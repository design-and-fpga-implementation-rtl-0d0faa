// lfsr16_fib: 16-bit Fibonacci linear feedback shift register.
//
// The stages are B0..B15 (q[0]..q[15]). Each enabled clock every stage takes the
// value of the one below it and B0 takes the XOR of the tapped stages B15, B13, B12
// and B10, i.e. the maximal-length polynomial x^16 + x^14 + x^13 + x^11 + 1
// (period 65535). The stage order and tap region follow the Fibonacci half of the
// proposed rate encoder; the exact polynomial and the seed are this design's choice.
//
// Interface: en advances one step per clock; q is the full state, read as a 16-bit
// random number. rst_n (synchronous, active low) loads SEED; a zero seed, which
// would lock the register, is replaced by 1.
module lfsr16_fib #(
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  output logic [15:0] q
);
  localparam logic [15:0] SAFE_SEED = (SEED == 16'h0) ? 16'h1 : SEED;

  logic fb;
  assign fb = ^(q & encoder_pkg::LFSR_TAPS);

  always_ff @(posedge clk) begin
    if (!rst_n)  q <= SAFE_SEED;
    else if (en) q <= {q[14:0], fb};
  end
endmodule
