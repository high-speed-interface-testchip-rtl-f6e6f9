// fpu_mul: IEEE 754 double multiplication core. Multiplies the two 53-bit
// mantissas into a 106-bit product, keeps the top 55 bits plus a sticky bit
// of the rest (one extra right shift when the product is 2 or more) and adds
// the exponents less the bias. Combinational; zero, infinity and NaN operands
// are resolved in fpu_exceptions, subnormals are flushed to zero.
module fpu_mul (
  input  logic [63:0]        opa,
  input  logic [63:0]        opb,
  output logic               sign,
  output logic signed [12:0] exp,
  output logic [55:0]        mant
);
  logic [52:0]  ma, mb;
  logic [105:0] p;

  always_comb begin
    ma   = {opa[62:52] != 0, opa[51:0]};
    mb   = {opb[62:52] != 0, opb[51:0]};
    p    = ma * mb;
    sign = opa[63] ^ opb[63];
    if (p[105]) begin
      mant = {p[105:51], |p[50:0]};
      exp  = 13'(opa[62:52]) + 13'(opb[62:52]) - 13'sd1022;
    end else begin
      mant = {p[104:50], |p[49:0]};
      exp  = 13'(opa[62:52]) + 13'(opb[62:52]) - 13'sd1023;
    end
  end
endmodule
