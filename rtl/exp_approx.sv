// exp_approx: shift-and-add approximation of exp(-x) for x >= 0.
//
// exp(-x) = 2^(-x*log2(e)) and log2(e) ~ 1.4375 = 1 + 1/2 - 1/16, so the exponent is
// p = x + (x >> 1) - (x >> 4). Its negation n = -p is split into a signed integer
// field (upper 6 bits) and a fraction f (lower 10 bits) with n = int + f, 0 <= f < 1.
// Then 2^n = 2^int * 2^f ~ 2^int * (1 + f): the mantissa {1'b1, f, 13'b0} is shifted
// right by -int. Because x is never negative, no sign handling is needed.
//
// Interface: purely combinational. x is unsigned Q6.10 (up to 63.999); y is unsigned
// Q1.15, so exp(0) = 16'h8000 = 1.0. Shifts of 24 or more return 0.
// From the document: the 1.4375 shift-and-add, the 6/10-bit split, the leading 1 and
// 13 zero bits and the right shift by the integer part. This design's choice: the Q1.15
// output format and reading the shift distance as the magnitude of the integer field.
module exp_approx (
  input  logic [15:0] x,
  output logic [15:0] y
);
  import encoder_pkg::*;

  logic [16:0] p;      // 1.4375 * x, one guard bit
  logic [16:0] n;      // -p, two's complement; n[16:10] holds the EXP_INT_W-bit
                       // integer field plus the sign extension of the guard bit
  logic [6:0]  shamt;  // -int, 0..64
  logic [23:0] mant;

  always_comb begin
    p     = {1'b0, x} + {2'b0, x[15:1]} - {5'b0, x[15:4]};
    n     = -p;
    // integer field of n is n[16:10] (signed); shift distance = -int
    shamt = 7'(-$signed(n[16:EXP_FRAC_W]));
    mant  = {1'b1, n[EXP_FRAC_W-1:0], 13'b0};
    if (shamt >= 7'd24) y = '0;
    else                y = 16'((mant >> shamt) >> 8);
  end
endmodule
