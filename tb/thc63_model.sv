// thc63_model: behavioural model of the external 5-channel 7:1 LVDS
// serializer with per-channel error generators, for testbenches only.
// Words on 'data' are captured at each rising edge of 'clk' and, LAT clocks
// later, sent on the five lanes, bit 7c+6 of a word first on lane c, one bit
// per high-speed clock (changed on its falling edge, so the receiver samples
// in the middle of the bit). 'skew' delays each lane by 0..3 extra bits.
// The error generator of lane c flips a bit when a 16-bit random number is
// below err_thr[c]; the variable 'flips' counts the flipped bits.
module thc63_model #(
  parameter int LAT = 2
) (
  input  logic        clk,
  input  logic        hs_clk,
  input  logic [34:0] data,
  input  logic [7:0]  skew [5],
  input  logic [15:0] err_thr [5],
  output logic [4:0]  lane
);
  int flips = 0;      // bits flipped so far (read hierarchically)
  logic [34:0] pipe [LAT];
  logic [34:0] stage = '0, cur = '0;
  int          bitn = 0;
  logic [7:0]  hist [5];

  initial begin
    lane = '0;
    for (int c = 0; c < 5; c++) hist[c] = '0;
    for (int i = 0; i < LAT; i++) pipe[i] = '0;
  end

  always @(posedge clk) begin
    for (int i = LAT - 1; i > 0; i--) pipe[i] <= pipe[i-1];
    pipe[0] <= data;
  end

  always @(negedge clk) stage <= pipe[LAT-1];

  always @(negedge hs_clk) begin
    logic        b;
    logic [15:0] r;
    if (bitn == 6) begin
      bitn = 0;
      cur  = stage;
    end else bitn++;
    for (int c = 0; c < 5; c++) begin
      b = cur[7*c + 6 - bitn];
      r = 16'($urandom);              // one draw per bit, taken once
      if (err_thr[c] != 0 && r < err_thr[c]) begin
        b     = ~b;
        flips = flips + 1;
      end
      hist[c] = {hist[c][6:0], b};
      lane[c] = hist[c][skew[c]];
    end
  end
endmodule
