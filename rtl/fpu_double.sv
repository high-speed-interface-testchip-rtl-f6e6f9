// fpu_double: double precision floating point unit used to compute the bit
// error rates. fpu_op: 0 add, 1 subtract, 2 multiply, 3 divide; rmode: IEEE
// rounding mode (0 nearest-even, 1 zero, 2 +inf, 3 -inf).
// Timing: the clock edge that samples 'enable' high latches the operands and
// clears a counter, which then counts one per clock; when it reaches the
// operation's count (add 20, subtract 21, multiply 24, divide 71) 'out' and
// the flags are loaded and 'ready' goes high, staying high until the next
// enable. The datapath is fpu_add / fpu_sub (chosen by the effective signs),
// fpu_mul and the iterative fpu_div, followed by fpu_round and
// fpu_exceptions. The operations, their cycle counts and the module structure
// follow the document; the datapath inside each module is this design's
// (the add/sub/mul paths are combinational, the cycle count leaves them many
// clocks to settle).
module fpu_double #(
  parameter int unsigned CYC_ADD = 20,
  parameter int unsigned CYC_SUB = 21,
  parameter int unsigned CYC_MUL = 24,
  parameter int unsigned CYC_DIV = 71
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic [1:0]  rmode,
  input  logic [2:0]  fpu_op,
  input  logic [63:0] opa,
  input  logic [63:0] opb,
  output logic [63:0] out,
  output logic        ready,
  output logic        underflow,
  output logic        overflow,
  output logic        inexact,
  output logic        exception,
  output logic        invalid,
  output logic        divide_by_zero
);
  logic [63:0] a_q, b_q, b_eff;
  logic [2:0]  op_q;
  logic [1:0]  rm_q;
  logic [6:0]  cnt, cnt_end;
  logic        busy, eff_sub;

  logic               s_add, s_sub, s_mul, s_div, s_sel, r_inexact, div_done;
  logic signed [12:0] e_add, e_sub, e_mul, e_div, e_sel, e_rnd;
  logic [55:0]        m_add, m_sub, m_mul, m_div, m_sel;
  logic [51:0]        f_rnd;
  logic [63:0]        x_out;
  logic               x_inv, x_ovf, x_unf, x_dbz, x_inx, x_exc;

  assign b_eff   = (op_q == 3'd1) ? {~b_q[63], b_q[62:0]} : b_q;
  assign eff_sub = a_q[63] ^ b_eff[63];

  fpu_add u_add (.opa(a_q), .opb(b_eff), .sign(s_add), .exp(e_add), .mant(m_add));
  fpu_sub u_sub (.opa(a_q), .opb(b_eff), .sign(s_sub), .exp(e_sub), .mant(m_sub));
  fpu_mul u_mul (.opa(a_q), .opb(b_q),   .sign(s_mul), .exp(e_mul), .mant(m_mul));
  fpu_div u_div (.clk, .rst_n, .start(enable && fpu_op == 3'd3), .opa, .opb,
                 .done(div_done), .sign(s_div), .exp(e_div), .mant(m_div));

  always_comb begin
    unique case (op_q)
      3'd2:    begin s_sel = s_mul; e_sel = e_mul; m_sel = m_mul; end
      3'd3:    begin s_sel = s_div; e_sel = e_div; m_sel = m_div; end
      default: if (eff_sub) begin s_sel = s_sub; e_sel = e_sub; m_sel = m_sub; end
               else         begin s_sel = s_add; e_sel = e_add; m_sel = m_add; end
    endcase
    unique case (op_q)
      3'd0:    cnt_end = 7'(CYC_ADD);
      3'd1:    cnt_end = 7'(CYC_SUB);
      3'd2:    cnt_end = 7'(CYC_MUL);
      default: cnt_end = 7'(CYC_DIV);
    endcase
  end

  fpu_round u_round (.sign(s_sel), .exp_in(e_sel), .mant_in(m_sel), .rmode(rm_q),
                     .exp_out(e_rnd), .frac_out(f_rnd), .inexact(r_inexact));

  fpu_exceptions u_exc (.opa(a_q), .opb_eff(b_eff), .op(op_q), .rmode(rm_q),
    .sign(s_sel), .exp(e_rnd), .frac(f_rnd), .zero_res(m_sel == '0),
    .inexact_in(r_inexact), .out(x_out), .invalid(x_inv), .overflow(x_ovf),
    .underflow(x_unf), .divide_by_zero(x_dbz), .inexact(x_inx), .exception(x_exc));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      a_q <= '0; b_q <= '0; op_q <= '0; rm_q <= '0; cnt <= '0; busy <= 1'b0;
      out <= '0; ready <= 1'b0; underflow <= 1'b0; overflow <= 1'b0;
      inexact <= 1'b0; exception <= 1'b0; invalid <= 1'b0; divide_by_zero <= 1'b0;
    end else if (enable) begin
      a_q <= opa; b_q <= opb; op_q <= (fpu_op > 3'd3) ? 3'd3 : fpu_op; rm_q <= rmode;
      cnt <= '0; busy <= 1'b1; ready <= 1'b0;
    end else if (busy) begin
      cnt <= cnt + 1'b1;
      if (cnt + 1'b1 == cnt_end) begin
        busy <= 1'b0; ready <= 1'b1;
        out <= x_out; underflow <= x_unf; overflow <= x_ovf; inexact <= x_inx;
        exception <= x_exc; invalid <= x_inv; divide_by_zero <= x_dbz;
      end
    end

  // the divider must have finished before the result is taken
  a_div_ready: assert property (@(posedge clk) disable iff (!rst_n)
    busy && op_q == 3'd3 && cnt + 1'b1 == cnt_end |-> !u_div.busy);
  wire unused_done = div_done;
endmodule
