// tc_ber: bit error rate unit. On 'trig' it takes the counts of the pattern
// checker and computes, one after the other,
//   total BER  = total wrong bits / total received bits
//   period BER = wrong bits in the period / bits received in the period
// Each count is first normalised from a 48-bit integer to an IEEE 754 double
// (exact), then divided on the shared fpu_double. The quotient is kept as a
// double and also de-normalised to a decimal number mant * 10^exp with a
// 40-bit integer mantissa and an 8-bit signed exponent: it is multiplied by
// 10.0 on the FPU until it is at least 10^(DIGITS-1), then truncated to an
// integer. A BER of 0 (or no bits received) gives 0 / mant 0, exp 0.
// 'upd' pulses when both results are new, 'valid' stays high from then on.
// Triggers that arrive while a computation runs are ignored. One computation
// takes about 2 x (71 + k x 25) clocks for k decimal scaling steps.
// What is computed and the float/decimal representations follow the
// document; the scaling-by-ten procedure is this design's.
module tc_ber
  import tc_pkg::*;
#(
  parameter int unsigned DIGITS = 5
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        trig,
  input  ber_in_t     cnt,
  output logic [63:0] ber_tot,
  output logic [63:0] ber_per,
  output dec_t        dec_tot,
  output dec_t        dec_per,
  output logic        valid,
  output logic        upd
);
  localparam logic [63:0] TEN = 64'h4024_0000_0000_0000;

  function automatic logic [CNT_W-1:0] pow10(input int unsigned n);
    logic [CNT_W-1:0] p = 1;
    for (int unsigned i = 0; i < n; i++) p = p * 10;
    return p;
  endfunction
  localparam logic [63:0] THRESH = u2d(pow10(DIGITS - 1));

  typedef enum logic [2:0] {S_IDLE, S_DIV, S_DIVW, S_CHK, S_MULW, S_NEXT} st_e;
  st_e st;
  ber_in_t     c_q;
  logic        job;               // 0 total, 1 period
  logic [63:0] v;
  logic signed [7:0] e;

  logic        f_en, f_rdy;
  logic [2:0]  f_op;
  logic [63:0] f_a, f_b, f_out;

  fpu_double u_fpu (
    .clk, .rst_n, .enable(f_en), .rmode(2'd0), .fpu_op(f_op), .opa(f_a), .opb(f_b),
    .out(f_out), .ready(f_rdy), .underflow(), .overflow(), .inexact(), .exception(),
    .invalid(), .divide_by_zero());

  // truncate a positive double below 2^40 to an integer
  function automatic logic [39:0] d2u(input logic [63:0] d);
    int signed sh;
    logic [52:0] m;
    sh = int'(d[62:52]) - 1023;
    m  = {1'b1, d[51:0]};
    if (d[62:52] == 0 || sh < 0) return '0;
    if (sh > 39) return '1;
    return 40'(m >> (52 - sh));
  endfunction

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st <= S_IDLE; c_q <= '0; job <= 1'b0; v <= '0; e <= '0;
      f_en <= 1'b0; f_op <= '0; f_a <= '0; f_b <= '0;
      ber_tot <= '0; ber_per <= '0; dec_tot <= '0; dec_per <= '0;
      valid <= 1'b0; upd <= 1'b0;
    end else begin
      f_en <= 1'b0;
      upd  <= 1'b0;
      unique case (st)
        S_IDLE: if (trig) begin
          c_q <= cnt; job <= 1'b0; st <= S_DIV;
        end
        S_DIV: begin
          f_a <= u2d(job ? c_q.per_wrong : c_q.tot_wrong);
          f_b <= u2d(job ? c_q.per_bits  : c_q.tot_bits);
          e   <= '0;
          if ((job ? c_q.per_bits : c_q.tot_bits) == '0 ||
              (job ? c_q.per_wrong : c_q.tot_wrong) == '0) begin
            v  <= '0;
            st <= S_CHK;
          end else begin
            f_op <= 3'd3; f_en <= 1'b1; st <= S_DIVW;
          end
        end
        S_DIVW: if (f_rdy && !f_en) begin
          v <= f_out;
          if (job) ber_per <= f_out; else ber_tot <= f_out;
          st <= S_CHK;
        end
        S_CHK: begin
          if (v == '0) begin
            if (job) ber_per <= '0; else ber_tot <= '0;
            if (job) dec_per <= '0; else dec_tot <= '0;
            st <= S_NEXT;
          end else if (v[62:0] < THRESH[62:0] && e > -8'sd120) begin
            f_a <= v; f_b <= TEN; f_op <= 3'd2; f_en <= 1'b1;
            st  <= S_MULW;
          end else begin
            if (job) dec_per <= '{mant: d2u(v), exp: e};
            else     dec_tot <= '{mant: d2u(v), exp: e};
            st <= S_NEXT;
          end
        end
        S_MULW: if (f_rdy && !f_en) begin
          v  <= f_out;
          e  <= e - 8'sd1;
          st <= S_CHK;
        end
        default: begin   // S_NEXT
          if (!job) begin
            job <= 1'b1; st <= S_DIV;
          end else begin
            valid <= 1'b1; upd <= 1'b1; st <= S_IDLE;
          end
        end
      endcase
    end
endmodule
