// fpu_div: IEEE 754 double division core, restoring division one quotient bit
// per clock. 'start' loads the operands; 57 cycles later 'done' pulses and the
// quotient of the mantissas Q = floor(ma * 2^56 / mb) is packed, with a sticky
// bit for a non-zero remainder, into the 56-bit unrounded mantissa; the
// exponent is ea - eb + bias (less one if the quotient is below 1).
// A zero divisor or dividend is resolved in fpu_exceptions.
module fpu_div (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [63:0]        opa,
  input  logic [63:0]        opb,
  output logic               done,
  output logic               sign,
  output logic signed [12:0] exp,
  output logic [55:0]        mant
);
  logic [54:0] rem;
  logic [52:0] dvs;
  logic [56:0] q;
  logic [5:0]  bitn;
  logic        busy;
  logic signed [12:0] e0;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rem <= '0; dvs <= '0; q <= '0; bitn <= '0; busy <= 1'b0; done <= 1'b0;
      e0 <= '0; sign <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        rem  <= 55'({opa[62:52] != 0, opa[51:0]});
        dvs  <= {opb[62:52] != 0, opb[51:0]};
        q    <= '0;
        bitn <= 6'd56;
        busy <= 1'b1;
        sign <= opa[63] ^ opb[63];
        e0   <= 13'(opa[62:52]) - 13'(opb[62:52]) + 13'sd1023;
      end else if (busy) begin
        if (rem >= 55'(dvs)) begin
          q[bitn] <= 1'b1;
          rem     <= (rem - 55'(dvs)) << 1;
        end else begin
          rem     <= rem << 1;
        end
        if (bitn == 6'd0) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else bitn <= bitn - 1'b1;
      end
    end

  always_comb begin
    if (q[56]) begin
      mant = {q[56:2], |q[1:0] | (rem != 0)};
      exp  = e0;
    end else begin
      mant = {q[55:1], q[0] | (rem != 0)};
      exp  = e0 - 13'sd1;
    end
  end
endmodule
