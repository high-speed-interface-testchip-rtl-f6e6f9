// fpu_add: magnitude addition of two IEEE 754 doubles of equal effective sign.
// The operand with the smaller exponent is shifted right into a 56-bit
// mantissa (hidden one at bit 55, 52 fraction bits, guard, round and a sticky
// LSB that collects every bit shifted out); the sum is renormalised by at most
// one right shift. Output: sign of opa, biased exponent (13 bits, signed, so
// overflow can be seen later) and the unrounded mantissa for fpu_round.
// Combinational. Zero and subnormal inputs are taken as zero (flush to zero).
// The split into add/sub/mul/div/round/exceptions modules follows the
// document's FPU figure; the internal format is this design's.
module fpu_add (
  input  logic [63:0]        opa,
  input  logic [63:0]        opb,
  output logic               sign,
  output logic signed [12:0] exp,
  output logic [55:0]        mant
);
  logic [10:0] ea, eb, eh, el;
  logic [55:0] mh, ml, ml_sh, mask;
  logic [11:0] d;
  logic [56:0] sum;
  logic        sticky;

  always_comb begin
    ea = opa[62:52];
    eb = opb[62:52];
    if (ea >= eb) begin
      eh = ea; el = eb;
      mh = (ea == 0) ? '0 : {1'b1, opa[51:0], 3'b000};
      ml = (eb == 0) ? '0 : {1'b1, opb[51:0], 3'b000};
    end else begin
      eh = eb; el = ea;
      mh = (eb == 0) ? '0 : {1'b1, opb[51:0], 3'b000};
      ml = (ea == 0) ? '0 : {1'b1, opa[51:0], 3'b000};
    end
    mask = '0;
    d = {1'b0, eh} - {1'b0, el};
    if (d >= 12'd56) begin
      ml_sh  = '0;
      sticky = |ml;
    end else begin
      mask   = (56'd1 << d) - 56'd1;
      ml_sh  = ml >> d;
      sticky = |(ml & mask);
    end
    ml_sh[0] = ml_sh[0] | sticky;
    sum  = {1'b0, mh} + {1'b0, ml_sh};
    sign = opa[63];
    if (sum[56]) begin
      mant = {sum[56:2], sum[1] | sum[0]};
      exp  = 13'(eh) + 13'sd1;
    end else begin
      mant = sum[55:0];
      exp  = 13'(eh);
    end
  end
endmodule
