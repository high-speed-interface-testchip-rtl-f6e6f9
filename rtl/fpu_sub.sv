// fpu_sub: magnitude subtraction of two IEEE 754 doubles of opposite
// effective sign. The smaller magnitude is aligned to the larger one (same
// 56-bit format and sticky LSB as fpu_add) and subtracted; the difference is
// normalised by a leading-zero count and left shift. The result takes the sign
// of the larger operand; an exact cancellation gives mantissa 0 (+0).
// Combinational, subnormal inputs flushed to zero.
module fpu_sub (
  input  logic [63:0]        opa,
  input  logic [63:0]        opb,
  output logic               sign,
  output logic signed [12:0] exp,
  output logic [55:0]        mant
);
  logic [10:0] eh, el;
  logic [55:0] mh, ml, ml_sh, mask, diff;
  logic [11:0] d;
  logic        sticky, a_big;
  logic [5:0]  lz;

  always_comb begin
    a_big = opa[62:0] >= opb[62:0];
    if (a_big) begin
      eh = opa[62:52]; el = opb[62:52]; sign = opa[63];
      mh = (opa[62:52] == 0) ? '0 : {1'b1, opa[51:0], 3'b000};
      ml = (opb[62:52] == 0) ? '0 : {1'b1, opb[51:0], 3'b000};
    end else begin
      eh = opb[62:52]; el = opa[62:52]; sign = opb[63];
      mh = (opb[62:52] == 0) ? '0 : {1'b1, opb[51:0], 3'b000};
      ml = (opa[62:52] == 0) ? '0 : {1'b1, opa[51:0], 3'b000};
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
    diff = mh - ml_sh;
    lz = 6'd0;
    for (int i = 0; i < 56; i++) if (diff[i]) lz = 6'(55 - i);
    mant = diff << lz;
    exp  = 13'(eh) - 13'(lz);
    if (diff == '0) begin
      sign = 1'b0;
      exp  = '0;
    end
  end
endmodule
