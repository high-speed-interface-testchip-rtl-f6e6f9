// tc_pattgen_tb: closes tc_pattgen's transmit output onto its receive input
// through an L-word delay line in which single bits can be flipped, and checks
//  - zeros before start, then the three training words, then the LFSR stream
//    (compared with a bit-serial model of x^35 + x^33 + 1);
//  - the automatic latency search returns L, an error-free run ends 'done'
//    with exact word/bit counters and one BER hand-over per period;
//  - injected errors are counted bit-exactly and both error memories hold the
//    expected and the received word of each erroneous word;
//  - stop-at-error, manual latency (right and wrong) and the latency error
//    when the loop is longer than the maximum latency.
module tc_pattgen_tb;
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

  logic clk = 0, rst_n = 0, locked = 0;
  pg_cfg_t  cfg;
  pg_stat_t stat;
  ber_in_t  bc;
  logic     trig;
  word_t    tx, rx, dexp, drec, mexp, mrec, flip = '0;
  logic     mren = 0;
  logic [8:0] mra = '0;
  int       L = 5;
  word_t    dl [16];
  int       ntrig;
  ber_in_t  last_bc;

  always #5 clk = ~clk;

  tc_pattgen dut (.clk, .rst_n, .cfg, .locked, .tx_data(tx), .rx_data(rx), .stat,
    .ber_cnt(bc), .ber_trig(trig), .dbg_exp(dexp), .dbg_rec(drec),
    .mem_ren(mren), .mem_raddr(mra), .mem_exp(mexp), .mem_rec(mrec));

  always @(posedge clk) begin
    for (int i = 15; i > 0; i--) dl[i] <= dl[i-1];
    dl[0] <= tx;
    if (trig) begin ntrig++; last_bc = bc; end
  end
  assign rx = dl[L-1] ^ flip;

  function automatic word_t step(input word_t s);
    for (int i = 0; i < 35; i++) s = {s[33:0], s[34] ^ s[32]};
    return s;
  endfunction

  task automatic run(input bit auto_l, input int man, input int maxl, input int num,
                     input int stop_e, input int per);
    cfg.start = 0;
    repeat (3) @(posedge clk);
    cfg.auto_lat = auto_l; cfg.man_lat = 8'(man); cfg.max_lat = 8'(maxl);
    cfg.num_pat = num; cfg.stop_err = stop_e; cfg.period = per;
    ntrig = 0;
    @(negedge clk); cfg.start = 1;
  endtask

  task automatic wait_end();
    int t = 0;
    repeat (2) @(posedge clk);
    #1;
    while (!(stat.done || stat.stopped || stat.lat_err) && t < 5000) begin
      @(posedge clk); #1; t++;
    end
  endtask

  initial begin
    #2000000; failures++; $display("watchdog"); finish_tb();
  end

  word_t m;
  int nbits;
  initial begin
    for (int i = 0; i < 16; i++) dl[i] = '0;
    cfg = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---- zeros until started and locked
    cfg.start = 1; cfg.auto_lat = 1; cfg.max_lat = 20; cfg.num_pat = 200; cfg.period = 50;
    repeat (5) @(negedge clk);
    chk(tx == '0, "zeros while PLL not locked");
    cfg.start = 0;
    @(negedge clk);
    locked = 1;
    run(1, 0, 20, 200, 0, 50);
    @(negedge clk);
    chk(tx == TRAIN0, "training word 0");
    @(negedge clk);
    chk(tx == TRAIN1, "training word 1");
    @(negedge clk);
    chk(tx == TRAIN2, "training word 2");
    m = 35'd1;
    for (int k = 0; k < 20; k++) begin
      @(negedge clk);
      chk(tx == m, $sformatf("tx lfsr word %0d", k));
      m = step(m);
    end
    wait_end();
    chk(stat.done && !stat.stopped && !stat.lat_err, "error-free run ends done");
    chk(stat.latency == 8'(L), $sformatf("latency %0d expected %0d", stat.latency, L));
    chk(stat.err_words == 0 && stat.wrong_bits == 0, "no errors counted");
    chk(stat.tot_bits == 200 * 35, "bit counter");
    @(posedge clk); @(posedge clk);
    chk(ntrig == 4, $sformatf("BER hand-overs %0d", ntrig));
    chk(last_bc.per_bits == 50 * 35 && last_bc.tot_bits == 200 * 35, "BER counts");
    // ---- longer loop, injected errors
    L = 9;
    run(1, 0, 20, 300, 0, 0);
    repeat (60) @(negedge clk);
    chk(stat.lat_found && stat.latency == 8'(L), "latency 9 found");
    nbits = 0;
    for (int e = 0; e < 6; e++) begin
      repeat (7) @(negedge clk);
      flip = '0;
      for (int b = 0; b <= e; b++) flip[(b * 5 + e) % 35] = 1'b1;
      nbits += e + 1;
      m = dl[L-1];
      @(negedge clk);
      flip = '0;
    end
    wait_end();
    chk(stat.done, "run with errors ends done");
    chk(stat.err_words == 6, $sformatf("error words %0d", stat.err_words));
    chk(stat.wrong_bits == 48'(nbits), $sformatf("wrong bits %0d vs %0d", stat.wrong_bits, nbits));
    chk(stat.err_ptr == 6, "six error memory entries");
    for (int e = 0; e < 6; e++) begin
      @(negedge clk); mren = 1; mra = 9'(e);
      @(negedge clk); mren = 0;
      chk($countones(mexp ^ mrec) == e + 1, $sformatf("error memory entry %0d", e));
    end
    // ---- stop at error: every word corrupted
    run(1, 0, 20, 300, 3, 0);
    repeat (40) @(negedge clk);
    flip = 35'h1;
    wait_end();
    flip = '0;
    chk(stat.stopped && !stat.done && stat.err_words == 3, "stop at third error");
    // ---- manual latency, right then wrong
    run(0, L, 20, 100, 0, 0);
    wait_end();
    chk(stat.done && stat.err_words == 0, "manual latency = loop latency");
    run(0, L + 1, 20, 100, 0, 0);
    wait_end();
    chk(stat.done && stat.err_words > 90, "manual latency off by one gives errors");
    // ---- latency error
    run(1, 0, 6, 100, 0, 0);
    wait_end();
    chk(stat.lat_err && !stat.done, "latency error when loop exceeds max latency");
    finish_tb();
  end
endmodule
