// lfsr16_galois: 16-bit Galois linear feedback shift register.
//
// The stages shift from B15 towards B0 (q[15] -> q[0]). The bit leaving B0 is fed
// back into B15 and XORed into the inputs of B13, B12 and B10, the positions of the
// XOR gates in the Galois half of the proposed rate encoder. This is the Galois form
// of x^16 + x^14 + x^13 + x^11 + 1 (mask 16'hB400), period 65535. The seed is this
// design's choice.
//
// Interface: en advances one step per clock; q is the full state. rst_n (synchronous,
// active low) loads SEED; a zero seed is replaced by 1.
module lfsr16_galois #(
  parameter logic [15:0] SEED = 16'h1D2B
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  output logic [15:0] q
);
  localparam logic [15:0] SAFE_SEED = (SEED == 16'h0) ? 16'h1 : SEED;

  always_ff @(posedge clk) begin
    if (!rst_n)  q <= SAFE_SEED;
    else if (en) q <= {1'b0, q[15:1]} ^ (q[0] ? encoder_pkg::LFSR_TAPS : 16'h0);
  end
endmodule
