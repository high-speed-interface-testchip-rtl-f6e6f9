// fpu_round: rounds a 56-bit unrounded mantissa (hidden one at bit 55, then
// 52 fraction bits, guard, round, sticky) to 53 bits in one of the four IEEE
// 754 modes: 0 nearest-even, 1 toward zero, 2 toward +inf, 3 toward -inf.
// A carry out of the mantissa increments the exponent. The exponent is kept
// 13 bits wide and signed so that fpu_exceptions can detect overflow (>= 2047)
// and underflow (<= 0). Combinational.
module fpu_round (
  input  logic               sign,
  input  logic signed [12:0] exp_in,
  input  logic [55:0]        mant_in,
  input  logic [1:0]         rmode,
  output logic signed [12:0] exp_out,
  output logic [51:0]        frac_out,
  output logic               inexact
);
  logic        g, r, s, l, inc;
  logic [53:0] m;

  always_comb begin
    l = mant_in[3]; g = mant_in[2]; r = mant_in[1]; s = mant_in[0];
    inexact = g | r | s;
    unique case (rmode)
      2'd0:    inc = g & (r | s | l);
      2'd1:    inc = 1'b0;
      2'd2:    inc = !sign & inexact;
      default: inc = sign & inexact;
    endcase
    m = {1'b0, mant_in[55:3]} + 54'(inc);
    if (m[53]) begin
      frac_out = m[52:1];
      exp_out  = exp_in + 13'sd1;
    end else begin
      frac_out = m[51:0];
      exp_out  = exp_in;
    end
  end
endmodule
