// tc_top_tb: end-to-end test of the testchip with shortened LCD timing.
// The serializer model closes the LVDS loop and injects errors; all control
// goes through JTAG -> OCP -> tcReg as software would do it. It covers, and
// counts: zeros sent before PLL lock, the phase alignment search (wrong
// phases end with a latency error, one phase finds the training pattern),
// an error-free run, a run with injected errors (wrong bits counted exactly,
// error memories read back, total BER double and LCD text checked against
// values computed here), stop-at-error, manual latency, the debug port, the
// bypass loop and a DDR script with read-back of the received data.
module tc_top_tb;
`include "tc_top_env.svh"

  tc_top #(.T_PWRUP(200), .T_EXEC(20), .T_CLEAR(50)) dut (
    .sys_clk(clk), .rst_ni(rst_n), .rx_hs_clk(hs_clk), .rx_ls_clk(clk), .pll_locked,
    .rx_lane(lane), .srd_clk, .srd_data, .bypass, .data_sel, .exp_data_o(exp_o),
    .rec_data_o(rec_o), .tck, .tms, .tdi, .trst_n, .tdo, .tdo_en,
    .lcd_e, .lcd_rs, .lcd_rw, .lcd_db,
    .dfi_address(dfi_a), .dfi_bank(dfi_ba), .dfi_cs_n(dfi_cs), .dfi_ras_n(dfi_ras),
    .dfi_cas_n(dfi_cas), .dfi_we_n(dfi_we), .dfi_cke(dfi_cke), .dfi_wrdata_en(dfi_wen),
    .dfi_wrdata(dfi_wd), .dfi_wrdata_mask(dfi_wm), .dfi_rddata_en(dfi_ren),
    .dfi_rddata(dfi_rd), .dfi_rddata_valid(dfi_rvalid));

  // mechanism counters
  int n_zero_prelock = 0, n_lat_err = 0, n_lat_found = 0, n_done = 0, n_err_inj = 0,
      n_err_mem = 0, n_stop = 0, n_manual = 0, n_ber = 0, n_lcd = 0, n_dbg = 0,
      n_bypass = 0, n_ddr = 0;

  function automatic string ber_text(input real v);
    int e = 0;
    longint m;
    if (v == 0.0) return "0.0000e+00";
    while (v < 10000.0) begin v = v * 10.0; e--; end
    m = longint'($floor(v));
    e = e + 4;
    return $sformatf("%0d.%04de%s%02d", m / 10000, m % 10000, (e < 0) ? "-" : "+",
                     (e < 0) ? -e : e);
  endfunction

  initial begin
    #40ms; failures++; $display("watchdog"); finish_tb();
  end

  int good = -1, lat, nfound;
  logic [63:0] ex, rc;
  real ber;
  initial begin
    for (int c = 0; c < 5; c++) begin skew[c] = 0; thr[c] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    jt_reset();
    jt_dr(32, 0, jq);
    chk(jq == 32'h1A5C_0001, $sformatf("IDCODE %h", jq));

    // ---- start before PLL lock: only zeros go out
    wr8(A_CTRL, 8'h03);
    begin
      bit allz = 1;
      repeat (50) begin @(negedge clk); if (srd_data != '0) allz = 0; end
      chk(allz, "zeros before PLL lock");
      if (allz) n_zero_prelock++;
    end
    rdn(A_STATUS, 1, rq);
    chk(rq[0] == 1'b0, "status shows PLL not locked");
    wr8(A_CTRL, 8'h02);
    pll_locked = 1;
    wrn(A_NUMPAT, 64'd3000, 4);
    wrn(A_PERIOD, 64'd1000, 4);
    wr8(A_MAXLAT, 8'd40);

    // ---- phase alignment search
    nfound = 0;
    for (int p = 0; p < 7; p++) begin
      wr8(A_PHASE, 8'(p));
      wr8(A_CTRL, 8'h03);
      wait_status(8'h06, 20);
      if (rq[1]) begin nfound++; good = p; n_lat_found++; end
      if (rq[2]) n_lat_err++;
      wr8(A_CTRL, 8'h02);
    end
    chk(nfound == 1, $sformatf("exactly one phase finds the training pattern (%0d)", nfound));
    chk(n_lat_err == 6, "the other phases end with a latency error");

    // ---- error-free run
    wr8(A_PHASE, 8'(good));
    wr8(A_CTRL, 8'h03);
    wait_status(8'h08, 400);
    chk(rq[3], "error-free run done");
    if (rq[3]) n_done++;
    rdn(A_LATENCY, 1, rq); lat = int'(rq[7:0]);
    rdn(A_ERRWORDS, 6, rq); chk(rq == 0, "no erroneous words");
    rdn(A_TOTBITS, 6, rq);  chk(rq == 64'd3000 * 35, "bits compared");
    rdn(A_STATUS, 1, rq);   chk(rq[6], "BER valid");
    repeat (3000) @(posedge clk);
    chk(lcd_line(0) == "0.0000e+00" && lcd_line(64) == "0.0000e+00", "LCD shows zero BER");
    if (lcd_line(0) == "0.0000e+00") n_lcd++;

    // ---- debug port during a run
    wrn(A_NUMPAT, 64'd20000, 4);
    wr8(A_CTRL, 8'h02);
    wr8(A_CTRL, 8'h03);
    wait_status(8'h02, 20);
    for (int c = 0; c < 5; c++) begin
      bit same = 1, nz = 0;
      data_sel = 3'(c);
      repeat (20) begin
        @(negedge clk);
        if (exp_o != rec_o) same = 0;
        if (exp_o != 0) nz = 1;
      end
      chk(same && nz, $sformatf("debug port channel %0d", c));
      if (same && nz) n_dbg++;
    end

    // ---- injected errors on lane D
    thr[3] = 16'd300;
    repeat (3000) @(posedge clk);
    thr[3] = 16'd0;
    n_err_inj = u_thine.flips;
    wait_status(8'h08, 800);
    chk(rq[3], "run with errors done");
    rdn(A_WRONGBITS, 6, rq);
    chk(rq == 64'(u_thine.flips), $sformatf("wrong bits %0d, injected %0d", rq, u_thine.flips));
    rdn(A_ERRPTR, 2, rq);
    chk(rq > 0, "error memory entries written");
    rdn(W_ERREXP, 5, ex);
    rdn(W_ERRREC, 5, rc);
    chk((ex ^ rc) != 0 && ((ex ^ rc) & ~(64'h7F << 21)) == 0,
        $sformatf("error memory: difference only in lane D (%h vs %h)", ex, rc));
    if ((ex ^ rc) != 0) n_err_mem++;
    repeat (1000) @(posedge clk);
    ber = real'(u_thine.flips) / (20000.0 * 35.0);
    rdn(A_BERTOT, 8, rq);
    chk(rq == $realtobits(ber), $sformatf("total BER %h expected %h", rq, $realtobits(ber)));
    if (rq != 0) n_ber++;
    repeat (3000) @(posedge clk);
    chk(lcd_line(0) == ber_text(ber), $sformatf("LCD line 1 '%s' expected '%s'",
        lcd_line(0), ber_text(ber)));
    if (lcd_line(0) == ber_text(ber)) n_lcd++;

    // ---- stop at error
    wrn(A_STOPERR, 64'd5, 4);
    wr8(A_CTRL, 8'h02);
    wr8(A_CTRL, 8'h03);
    wait_status(8'h02, 20);
    thr[0] = 16'd4000;
    wait_status(8'h18, 800);
    thr[0] = 16'd0;
    chk(rq[4] && !rq[3], "stopped at error");
    rdn(A_ERRWORDS, 6, rq);
    chk(rq == 5, $sformatf("stopped after 5 erroneous words (%0d)", rq));
    if (rq == 5) n_stop++;
    wrn(A_STOPERR, 64'd0, 4);

    // ---- manual latency
    wrn(A_NUMPAT, 64'd3000, 4);
    wr8(A_MANLAT, 8'(lat));
    wr8(A_CTRL, 8'h00);
    wr8(A_CTRL, 8'h01);
    wait_status(8'h18, 400);
    rdn(A_ERRWORDS, 6, ex);
    chk(rq[3] && ex == 0, "manual latency run error free");
    if (rq[3] && ex == 0) n_manual++;
    wr8(A_CTRL, 8'h02);

    // ---- bypass loop: deserialized words go straight back out
    bypass = 1;
    begin
      bit ok = 1;
      repeat (30) begin @(negedge clk); if (srd_data != dut.rx_word) ok = 0; end
      chk(ok, "bypass loops received words back");
      if (ok) n_bypass++;
    end
    bypass = 0;

    // ---- DDR: activate, write 0x5, read 0x5
    wrn(W_DDRTX + 16'h00, {8'h00, 4'b0011, 1'b1, 2'd0, 14'h0100, 33'd0, 16'd1} >> 0, 8);
    wrn(W_DDRTX + 16'h08, 64'h0, 8);
    wrn(W_DDRTX + 16'h10, {8'h00, 4'b0100, 1'b1, 2'd0, 14'h0005, 1'b1, 1'b0, 17'd0, 16'd0}, 8);
    wrn(W_DDRTX + 16'h18, 64'h0123_4567_89AB_CDEF, 8);
    wrn(W_DDRTX + 16'h20, {8'h00, 4'b0101, 1'b1, 2'd0, 14'h0005, 1'b0, 1'b1, 17'd0, 16'd4}, 8);
    wrn(W_DDRTX + 16'h28, 64'h0, 8);
    wrn(A_DDRTXS, 64'h0002_0000, 4);     // first 0, last 2
    wrn(A_DDRRXS, 64'h0, 2);
    wr8(A_DDRCTRL, 8'h01);
    rdn(A_DDRSTAT, 1, rq);
    chk(rq[1], "DDR script done");
    rdn(A_DDRRXC, 2, rq);
    chk(rq == 1, $sformatf("DDR words received %0d", rq));
    rdn(W_DDRRX, 8, rq);
    chk(rq == 64'h0123_4567_89AB_CDEF, $sformatf("DDR read-back %h", rq));
    if (rq == 64'h0123_4567_89AB_CDEF) n_ddr++;
    wr8(A_DDRCTRL, 8'h00);

    $display("mechanisms: zeros-before-lock %0d, latency found %0d, latency error %0d, done %0d,",
             n_zero_prelock, n_lat_found, n_lat_err, n_done);
    $display("  injected bits %0d, error memory %0d, stop-at-error %0d, manual latency %0d,",
             n_err_inj, n_err_mem, n_stop, n_manual);
    $display("  BER %0d, LCD %0d, debug port %0d, bypass %0d, DDR %0d",
             n_ber, n_lcd, n_dbg, n_bypass, n_ddr);
    chk(n_zero_prelock > 0, "mechanism: zeros before lock");
    chk(n_lat_found > 0 && n_lat_err > 0, "mechanism: latency search and latency error");
    chk(n_done > 0 && n_err_inj > 0 && n_err_mem > 0, "mechanism: errors counted and logged");
    chk(n_stop > 0 && n_manual > 0, "mechanism: stop at error, manual latency");
    chk(n_ber > 0 && n_lcd > 1, "mechanism: BER on FPU and LCD");
    chk(n_dbg > 0 && n_bypass > 0 && n_ddr > 0, "mechanism: debug port, bypass, DDR");
    finish_tb();
  end
endmodule
