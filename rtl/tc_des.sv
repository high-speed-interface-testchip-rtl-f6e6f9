// tc_des: tcDes, the CHANNELS x RATIO:1 LVDS deserializer of the testchip.
// Every channel has a programmable delay and an int_rx serial-to-parallel
// converter; one int_loaden, clocked like them by the PLL high-speed clock,
// marks the word boundary from the PLL low-speed clock. The holding registers
// are then captured on the core clock (same frequency as the low-speed clock)
// into the 35-bit word 'data', channel c in bits 7c+6..7c (bit 7c+6 first on
// the wire). 'locked' is the PLL lock signal synchronised to the core clock;
// it is the enable given to the pattern generator.
// Structure (PLL, int_loaden, int_rx per channel, delay per channel) follows
// the document's receiver figure; the analog parts (pads, PLL) are outside.
module tc_des
  import tc_pkg::*;
#(
  parameter int unsigned CH = CHANNELS,
  parameter int unsigned R  = RATIO,
  localparam int unsigned PW = $clog2(R)
) (
  input  logic              hs_clk,
  input  logic              ls_clk,
  input  logic              clk,
  input  logic              rst_n,
  input  logic              pll_locked,
  input  logic [CH-1:0]     sdata,
  input  logic [PW-1:0]     phase,
  input  logic [CH*PW-1:0]  delay,
  output logic [CH*R-1:0]   data,
  output logic              locked
);
  logic             loaden;
  logic [CH*R-1:0]  hold;
  logic [1:0]       lock_sync;

  int_loaden #(.RATIO(R)) u_loaden (
    .hs_clk, .rst_n, .ls_clk, .phase, .loaden);

  for (genvar c = 0; c < CH; c++) begin : g_ch
    int_rx #(.RATIO(R)) u_rx (
      .hs_clk, .rst_n, .sdata(sdata[c]), .delay(delay[c*PW +: PW]),
      .loaden, .pdata(hold[c*R +: R]));
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      data <= '0; lock_sync <= '0;
    end else begin
      data      <= hold;
      lock_sync <= {lock_sync[0], pll_locked};
    end

  assign locked = lock_sync[1];
endmodule
