// fpu_exceptions: special operands and out-of-range results of the FPU.
// NaN operands give a quiet NaN; inf-inf, 0*inf, 0/0 and inf/inf give a quiet
// NaN and 'invalid'; x/0 gives a signed infinity and 'divide_by_zero'. An
// exponent of 2047 or more after rounding is an overflow (infinity, or the
// largest finite number when the rounding mode points the other way); an
// exponent of 0 or less is an underflow and gives a signed zero (no
// subnormal results). 'exception' is the OR of all flags. op: 0 add, 1 sub,
// 2 mul, 3 div; opb_eff is opb with its sign flipped for a subtraction.
module fpu_exceptions (
  input  logic [63:0]        opa,
  input  logic [63:0]        opb_eff,
  input  logic [2:0]         op,
  input  logic [1:0]         rmode,
  input  logic               sign,
  input  logic signed [12:0] exp,
  input  logic [51:0]        frac,
  input  logic               zero_res,
  input  logic               inexact_in,
  output logic [63:0]        out,
  output logic               invalid,
  output logic               overflow,
  output logic               underflow,
  output logic               divide_by_zero,
  output logic               inexact,
  output logic               exception
);
  localparam logic [63:0] QNAN = 64'h7FF8_0000_0000_0000;
  logic a_nan, b_nan, a_inf, b_inf, a_zero, b_zero, s_ab, ovf_inf;

  always_comb begin
    a_nan  = opa[62:52] == 11'h7FF && opa[51:0] != 0;
    b_nan  = opb_eff[62:52] == 11'h7FF && opb_eff[51:0] != 0;
    a_inf  = opa[62:52] == 11'h7FF && opa[51:0] == 0;
    b_inf  = opb_eff[62:52] == 11'h7FF && opb_eff[51:0] == 0;
    a_zero = opa[62:52] == 11'h000;
    b_zero = opb_eff[62:52] == 11'h000;
    s_ab   = opa[63] ^ opb_eff[63];
    ovf_inf = rmode == 2'd0 || (rmode == 2'd2 && !sign) || (rmode == 2'd3 && sign);
    invalid = 1'b0; overflow = 1'b0; underflow = 1'b0; divide_by_zero = 1'b0;
    inexact = 1'b0;
    out = QNAN;
    if (a_nan || b_nan) begin
      out = QNAN;
    end else if (op <= 3'd1 && (a_inf || b_inf)) begin
      if (a_inf && b_inf && s_ab) invalid = 1'b1;
      else out = a_inf ? opa : opb_eff;
    end else if (op == 3'd2 && (a_inf || b_inf)) begin
      if (a_zero || b_zero) invalid = 1'b1;
      else out = {s_ab, 11'h7FF, 52'd0};
    end else if (op == 3'd2 && (a_zero || b_zero)) begin
      out = {s_ab, 63'd0};
    end else if (op == 3'd3 && ((a_inf && b_inf) || (a_zero && b_zero))) begin
      invalid = 1'b1;
    end else if (op == 3'd3 && a_inf) begin
      out = {s_ab, 11'h7FF, 52'd0};
    end else if (op == 3'd3 && b_zero) begin
      out = {s_ab, 11'h7FF, 52'd0};
      divide_by_zero = 1'b1;
    end else if (op == 3'd3 && (a_zero || b_inf)) begin
      out = {s_ab, 63'd0};
    end else if (zero_res) begin
      out = {sign, 63'd0};
    end else if (exp >= 13'sd2047) begin
      overflow = 1'b1; inexact = 1'b1;
      out = ovf_inf ? {sign, 11'h7FF, 52'd0} : {sign, 11'h7FE, {52{1'b1}}};
    end else if (exp <= 13'sd0) begin
      underflow = 1'b1; inexact = 1'b1;
      out = {sign, 63'd0};
    end else begin
      out = {sign, exp[10:0], frac};
      inexact = inexact_in;
    end
    exception = invalid | overflow | underflow | divide_by_zero | inexact;
  end
endmodule
