// tc_ram: block RAM with one byte-masked write port and two synchronous read
// ports, all on one clock. Used for the two error memories (expected and
// received word at every error) and for the DDR transmit and receive memories.
// A write lane k covers data bits 8k..8k+7 (the last lane may be narrower).
// Read data appears one clock after ren. A read of the address being written
// returns the old contents. The memories are written as arrays so synthesis
// can map them to block RAMs; the one-write/two-read organisation is this
// design's choice (the document uses dual-port block RAMs).
module tc_ram #(
  parameter int unsigned W     = 35,
  parameter int unsigned DEPTH = 512,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned NB   = (W + 7) / 8
) (
  input  logic          clk,
  input  logic [NB-1:0] we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          ren_a,
  input  logic [AW-1:0] raddr_a,
  output logic [W-1:0]  rdata_a,
  input  logic          ren_b,
  input  logic [AW-1:0] raddr_b,
  output logic [W-1:0]  rdata_b
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    for (int unsigned b = 0; b < W; b++)
      if (we[b/8]) mem[waddr][b] <= wdata[b];
  end

  always_ff @(posedge clk) if (ren_a) rdata_a <= mem[raddr_a];
  always_ff @(posedge clk) if (ren_b) rdata_b <= mem[raddr_b];
endmodule
