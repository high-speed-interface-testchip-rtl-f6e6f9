// tc_ber_tb: hands tc_ber sets of error and bit counts and checks both bit
// error rates as doubles (against the simulator's division) and as decimal
// mantissa/exponent (against the same scale-by-ten procedure done in real
// arithmetic), including a zero BER and a BER near 1e-12.
module tc_ber_tb;
  import tc_pkg::*;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask
  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  logic clk = 0, rst_n = 0, trig = 0;
  ber_in_t c;
  logic [63:0] bt, bp;
  dec_t dt, dp;
  logic valid, upd;

  tc_ber dut (.clk, .rst_n, .trig, .cnt(c), .ber_tot(bt), .ber_per(bp), .dec_tot(dt),
    .dec_per(dp), .valid, .upd);
  always #5 clk = ~clk;

  task automatic ref_dec(input longint w, input longint n, output logic [39:0] m,
                         output int e);
    real v;
    e = 0;
    if (w == 0 || n == 0) begin m = 0; return; end
    v = real'(w) / real'(n);
    while (v < 10000.0) begin v = v * 10.0; e--; end
    m = 40'(longint'($floor(v)));
  endtask

  task automatic one(input longint tw, input longint tb_, input longint pw, input longint pb);
    logic [39:0] m; int e; int t = 0;
    c.tot_wrong = 48'(tw); c.tot_bits = 48'(tb_); c.per_wrong = 48'(pw); c.per_bits = 48'(pb);
    @(negedge clk); trig = 1;
    @(negedge clk); trig = 0;
    c = '0;                              // counts must have been latched
    while (!upd && t < 20000) begin @(negedge clk); t++; end
    chk(upd, "update pulse");
    chk(bt == ((tw == 0) ? 64'd0 : $realtobits(real'(tw) / real'(tb_))),
        $sformatf("total BER %h", bt));
    chk(bp == ((pw == 0) ? 64'd0 : $realtobits(real'(pw) / real'(pb))),
        $sformatf("period BER %h", bp));
    ref_dec(tw, tb_, m, e);
    chk(dt.mant == m && int'(dt.exp) == e, $sformatf("total dec %0d e%0d vs %0d e%0d",
        dt.mant, dt.exp, m, e));
    ref_dec(pw, pb, m, e);
    chk(dp.mant == m && int'(dp.exp) == e, $sformatf("period dec %0d e%0d vs %0d e%0d",
        dp.mant, dp.exp, m, e));
  endtask

  initial begin
    #10000000; failures++; $display("watchdog"); finish_tb();
  end

  initial begin
    c = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    chk(!valid, "not valid after reset");
    one(3, 7000, 1, 1750);
    chk(valid, "valid after first computation");
    one(0, 35000, 0, 3500);
    one(123456, 35 * 1000000, 17, 350);
    one(1, 48'd35_000_000_000_000, 35, 35);
    one(5, 7, 2, 2);
    finish_tb();
  end
endmodule
