// fpu_double_tb: drives fpu_double with random normal doubles for all four
// operations (round to nearest even) and compares every result bit-exactly
// with the simulator's own IEEE 754 double arithmetic. It also checks the
// cycle count from enable to ready (20 / 21 / 24 / 71) and the special cases
// x/0, 0/0, inf-inf, 0*x, overflow and underflow.
module fpu_double_tb;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask
  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  logic clk = 0, rst_n = 0, enable = 0;
  logic [1:0] rmode = 0;
  logic [2:0] op = 0;
  logic [63:0] a = 0, b = 0, out;
  logic ready, unf, ovf, inx, exc, inv, dbz;

  fpu_double dut (.clk, .rst_n, .enable, .rmode, .fpu_op(op), .opa(a), .opb(b), .out,
    .ready, .underflow(unf), .overflow(ovf), .inexact(inx), .exception(exc),
    .invalid(inv), .divide_by_zero(dbz));
  always #5 clk = ~clk;

  int lat;
  task automatic do_op(input logic [2:0] o, input logic [63:0] x, input logic [63:0] y);
    @(negedge clk); op = o; a = x; b = y; enable = 1;
    @(negedge clk); enable = 0;
    lat = 0;   // clock edges after the one that sampled enable
    while (!ready && lat < 200) begin @(negedge clk); lat++; end
  endtask

  function automatic logic [63:0] rnd_d();
    logic [10:0] e;
    e = 11'(1023 - 60 + $urandom_range(0, 120));
    return {1'($urandom), e, 20'($urandom), 32'($urandom)};
  endfunction

  initial begin
    #5000000; failures++; $display("watchdog"); finish_tb();
  end

  int cyc [4] = '{20, 21, 24, 71};
  real ra, rb, rr;
  logic [63:0] exp_v;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      logic [2:0] o;
      logic [63:0] x, y;
      o = 3'(n % 4);
      x = rnd_d(); y = rnd_d();
      if (n % 16 == 5) y = {~x[63], x[62:0]};          // exact cancellation
      if (n % 16 == 9) y = {x[63], x[62:52], y[51:0]};  // same exponent
      ra = $bitstoreal(x); rb = $bitstoreal(y);
      unique case (o)
        3'd0: rr = ra + rb;
        3'd1: rr = ra - rb;
        3'd2: rr = ra * rb;
        default: rr = ra / rb;
      endcase
      exp_v = $realtobits(rr);
      if (exp_v[62:0] == 0) exp_v = 64'd0;
      do_op(o, x, y);
      chk(out == exp_v, $sformatf("op %0d %h %h: got %h expected %h", o, x, y, out, exp_v));
      if (n < 8) chk(lat == cyc[o], $sformatf("op %0d latency %0d expected %0d", o, lat, cyc[o]));
    end
    do_op(3, $realtobits(1.0), 64'd0);
    chk(out == 64'h7FF0_0000_0000_0000 && dbz, "1/0 = inf, divide by zero");
    do_op(3, 64'd0, 64'd0);
    chk(out[62:52] == 11'h7FF && out[51:0] != 0 && inv, "0/0 = NaN, invalid");
    do_op(1, 64'h7FF0_0000_0000_0000, 64'h7FF0_0000_0000_0000);
    chk(inv, "inf - inf invalid");
    do_op(2, 64'd0, $realtobits(3.5));
    chk(out == 64'd0 && !exc, "0 * x = 0");
    do_op(2, $realtobits(1.0e300), $realtobits(1.0e300));
    chk(out == 64'h7FF0_0000_0000_0000 && ovf, "overflow to infinity");
    do_op(2, $realtobits(1.0e-300), $realtobits(1.0e-300));
    chk(out == 64'd0 && unf, "underflow to zero");
    do_op(3, $realtobits(7.0), $realtobits(350.0));
    chk(out == $realtobits(0.02) && lat == 71, "7/350");
    finish_tb();
  end
endmodule
