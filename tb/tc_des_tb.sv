// tc_des_tb: feeds tc_des from the serializer model and checks that
// (1) exactly one load-enable phase of the seven reassembles the words sent,
// (2) at that phase 200 random words come out unchanged at a fixed latency,
// (3) a one-bit skew on one lane corrupts the words and the per-lane delay
//     (with a phase search) compensates it, and
// (4) the PLL lock input reaches 'locked' through the 2-flop synchroniser.
module tc_des_tb;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask
  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  logic hs_clk = 0, clk = 1, rst_n = 0, pll_locked = 0;
  logic [2:0]  phase = 0;
  logic [14:0] delay = '0;
  logic [34:0] data, tx = '0;
  logic [4:0]  lane;
  logic        locked;
  logic [7:0]  skew [5];
  logic [15:0] thr [5];
  logic [34:0] hist [64];
  int          n = 0;

  always #1 hs_clk = ~hs_clk;
  always #7 clk = ~clk;

  thc63_model #(.LAT(1)) u_tx (.clk, .hs_clk, .data(tx), .skew, .err_thr(thr),
    .lane);
  tc_des dut (.hs_clk, .ls_clk(clk), .clk, .rst_n, .pll_locked, .sdata(lane),
    .phase, .delay, .data, .locked);

  always @(posedge clk) begin
    tx <= {$urandom, $urandom};
    hist[n % 64] <= tx;
    n <= n + 1;
  end

  logic [34:0] outh [64];
  always @(posedge clk) outh[n % 64] <= data;

  function automatic int find_lat();
    for (int l = 0; l < 12; l++) begin
      bit ok = 1;
      for (int k = 2; k < 30; k++)
        if (outh[(n - k + 256) % 64] != hist[(n - k - l + 256) % 64]) ok = 0;
      if (ok) return l;
    end
    return -1;
  endfunction

  initial begin
    #200000; failures++; $display("watchdog"); finish_tb();
  end

  int good_phase, lat0, cnt_good, l;
  initial begin
    for (int c = 0; c < 5; c++) begin skew[c] = 0; thr[c] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    #1 pll_locked = 1;
    @(posedge clk); #1;
    chk(!locked, "locked not before two core clocks");
    @(posedge clk); #1;
    chk(locked, "locked after two core clocks");
    // (1) phase sweep
    cnt_good = 0; good_phase = -1;
    for (int p = 0; p < 7; p++) begin
      phase = 3'(p);
      repeat (40) @(posedge clk);
      #1;
      l = find_lat();
      if (l >= 0) begin cnt_good++; good_phase = p; lat0 = l; end
    end
    chk(cnt_good == 1, $sformatf("exactly one phase aligns, got %0d", cnt_good));
    // (2) long run at the good phase
    phase = 3'(good_phase);
    repeat (40) @(posedge clk);
    for (int r = 0; r < 7; r++) begin
      repeat (30) @(posedge clk);
      #1;
      chk(find_lat() == lat0, "stream intact at aligned phase");
    end
    // (3) skew lane 2 by one bit: misaligned, then compensate
    skew[2] = 1;
    repeat (40) @(posedge clk); #1;
    chk(find_lat() < 0, "one-bit skew on lane 2 corrupts words");
    delay = '0;
    for (int c = 0; c < 5; c++) if (c != 2) delay[3*c +: 3] = 3'd1;
    cnt_good = 0;
    for (int p = 0; p < 7; p++) begin
      phase = 3'(p);
      repeat (40) @(posedge clk); #1;
      if (find_lat() >= 0) cnt_good++;
    end
    chk(cnt_good == 1, "per-lane delay compensates the skew");
    pll_locked = 0;
    repeat (3) @(posedge clk); #1;
    chk(!locked, "lock loss propagates");
    finish_tb();
  end
endmodule
