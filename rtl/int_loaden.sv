// int_loaden: load-enable control of the deserializer.
// Samples the PLL low-speed clock with the high-speed clock, finds its rising
// edge and from it runs a modulo-RATIO bit counter. 'loaden' is high for one
// high-speed cycle per low-speed cycle, 'phase' high-speed cycles after the
// detected edge; changing 'phase' moves the word boundary one bit at a time.
// The document gives the block's purpose (load enable from HS and LS clocks);
// the edge detector and the programmable phase are this design's realisation.
module int_loaden #(
  parameter int unsigned RATIO = 7
) (
  input  logic                     hs_clk,
  input  logic                     rst_n,
  input  logic                     ls_clk,
  input  logic [$clog2(RATIO)-1:0] phase,
  output logic                     loaden
);
  logic ls_q, ls_qq;
  logic [$clog2(RATIO)-1:0] cnt;

  always_ff @(posedge hs_clk or negedge rst_n)
    if (!rst_n) begin
      ls_q <= 1'b0; ls_qq <= 1'b0; cnt <= '0; loaden <= 1'b0;
    end else begin
      ls_q  <= ls_clk;
      ls_qq <= ls_q;
      if (ls_q && !ls_qq)               cnt <= '0;
      else if (cnt == ($clog2(RATIO))'(RATIO - 1)) cnt <= '0;
      else                              cnt <= cnt + 1'b1;
      loaden <= (cnt == phase);
    end
endmodule
