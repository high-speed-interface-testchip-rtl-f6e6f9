// lcd_bin2bcd: sequential binary to BCD converter (shift and add 3).
// 'start' loads a W-bit unsigned number; W clocks later 'done' pulses and
// 'bcd' holds its ND decimal digits, digit 0 in bits 3:0.
module lcd_bin2bcd #(
  parameter int unsigned W  = 40,
  parameter int unsigned ND = 13
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [W-1:0]  bin,
  output logic          done,
  output logic [4*ND-1:0] bcd
);
  logic [W-1:0]          sh;
  logic [$clog2(W+1)-1:0] n;
  logic                  busy;
  logic [4*ND-1:0]       adj;

  always_comb begin
    adj = bcd;
    for (int unsigned k = 0; k < ND; k++)
      if (adj[4*k +: 4] >= 4'd5) adj[4*k +: 4] = adj[4*k +: 4] + 4'd3;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      sh <= '0; n <= '0; busy <= 1'b0; done <= 1'b0; bcd <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        sh <= bin; bcd <= '0; n <= '0; busy <= 1'b1;
      end else if (busy) begin
        bcd <= {adj[4*ND-2:0], sh[W-1]};
        sh  <= sh << 1;
        n   <= n + 1'b1;
        if (n == ($clog2(W+1))'(W - 1)) begin
          busy <= 1'b0; done <= 1'b1;
        end
      end
    end
endmodule
