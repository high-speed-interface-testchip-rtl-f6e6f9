// tc_lfsr: pseudo random word generator used as TxLFSR and RxLFSR.
// A LEN-bit Fibonacci LFSR (x^35 + x^33 + 1 by default, maximal length) is
// advanced W steps per enabled clock, so every output word consists of W new
// bits of the sequence. 'init' loads SEED, 'en' advances; 'word' is the
// current state and is valid in the same cycle. Using the same structure with
// the same seed on both sides lets the receiver regenerate the expected stream,
// as the document describes; polynomial and seed are this design's choice.
module tc_lfsr #(
  parameter int unsigned     W    = 35,
  parameter int unsigned     LEN  = 35,
  parameter int unsigned     TAP  = 33,
  parameter logic [LEN-1:0]  SEED = LEN'(1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         init,
  input  logic         en,
  output logic [W-1:0] word
);
  logic [LEN-1:0] state, nxt;

  always_comb begin
    nxt = state;
    for (int unsigned i = 0; i < W; i++)
      nxt = {nxt[LEN-2:0], nxt[LEN-1] ^ nxt[TAP-1]};
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)    state <= SEED;
    else if (init) state <= SEED;
    else if (en)   state <= nxt;

  assign word = W'(state);

  initial assert (W <= LEN && SEED != '0);
endmodule
