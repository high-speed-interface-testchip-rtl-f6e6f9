// int_rx: serial-to-parallel converter of one LVDS channel.
// The serial bit, after the programmable delay line, is shifted into a RATIO
// bit shift register on every high-speed clock. On load enable the shift
// register is copied to the holding register, from which the core reads.
// The first bit received of a word lands in the MSB (bit RATIO-1), matching
// the RA6..RA0 transmission order of the serializer. The delay line is a
// tap-selectable chain of 0..RATIO-1 high-speed cycles, a digital stand-in
// for the analog delay element of the pad.
module int_rx #(
  parameter int unsigned RATIO = 7
) (
  input  logic                     hs_clk,
  input  logic                     rst_n,
  input  logic                     sdata,
  input  logic [$clog2(RATIO)-1:0] delay,
  input  logic                     loaden,
  output logic [RATIO-1:0]         pdata
);
  logic [RATIO-1:0] dline;   // dline[0] = current bit, dline[k] = k cycles old
  logic [RATIO-1:0] shreg;
  logic             dbit;

  assign dbit = dline[delay];

  always_ff @(posedge hs_clk or negedge rst_n)
    if (!rst_n) begin
      dline <= '0; shreg <= '0; pdata <= '0;
    end else begin
      dline <= {dline[RATIO-2:0], sdata};
      shreg <= {shreg[RATIO-2:0], dbit};
      if (loaden) pdata <= shreg;
    end
endmodule
