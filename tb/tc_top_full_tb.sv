// tc_top_full_tb: one complete bit-error-rate measurement on the testchip
// with every parameter of tc_top at its default value.
// The LVDS loop is closed by the serializer model. Over JTAG -> OCP -> tcReg
// the test reads the IDCODE, locks the PLL, sweeps the seven sampling phases
// (one finds the training pattern, the others end with a latency error), then
// runs 60000 words with random bit errors on lane B. It checks the wrong-bit
// count against the errors the model injected, the erroneous-word count
// against the error-memory pointer, and the total BER double computed on the
// FPU against the value worked out here. Finally it waits out the LCD's
// default power-up and clear times (about two million core cycles) and checks
// that line 1 of the display shows the same total BER as decimal text.
module tc_top_full_tb;
`include "tc_top_env.svh"

  tc_top dut (
    .sys_clk(clk), .rst_ni(rst_n), .rx_hs_clk(hs_clk), .rx_ls_clk(clk), .pll_locked,
    .rx_lane(lane), .srd_clk, .srd_data, .bypass, .data_sel, .exp_data_o(exp_o),
    .rec_data_o(rec_o), .tck, .tms, .tdi, .trst_n, .tdo, .tdo_en,
    .lcd_e, .lcd_rs, .lcd_rw, .lcd_db,
    .dfi_address(dfi_a), .dfi_bank(dfi_ba), .dfi_cs_n(dfi_cs), .dfi_ras_n(dfi_ras),
    .dfi_cas_n(dfi_cas), .dfi_we_n(dfi_we), .dfi_cke(dfi_cke), .dfi_wrdata_en(dfi_wen),
    .dfi_wrdata(dfi_wd), .dfi_wrdata_mask(dfi_wm), .dfi_rddata_en(dfi_ren),
    .dfi_rddata(dfi_rd), .dfi_rddata_valid(dfi_rvalid));

  localparam int unsigned NWORDS = 60000;

  int n_lat_found = 0, n_lat_err = 0, n_done = 0, n_ber = 0, n_lcd = 0;

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
    #60ms; failures++; $display("watchdog"); finish_tb();
  end

  int good = -1, nfound;
  int unsigned words;
  logic [63:0] ew, ptr;
  real ber;
  initial begin
    for (int c = 0; c < 5; c++) begin skew[c] = 0; thr[c] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    jt_reset();
    jt_dr(32, 0, jq);
    chk(jq == 32'h1A5C_0001, $sformatf("IDCODE %h", jq));
    pll_locked = 1;
    wrn(A_NUMPAT, 64'(NWORDS), 4);
    wrn(A_PERIOD, 64'd10000, 4);
    wr8(A_MAXLAT, 8'd40);

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

    wr8(A_PHASE, 8'(good));
    wr8(A_CTRL, 8'h03);
    wait_status(8'h02, 20);
    thr[1] = 16'd100;
    repeat (NWORDS - 2000) @(posedge clk);   // stop injecting before the run ends
    thr[1] = 16'd0;
    wait_status(8'h08, 400);
    chk(rq[3], "measurement done");
    if (rq[3]) n_done++;
    rdn(A_TOTBITS, 6, rq);
    chk(rq == 64'(NWORDS) * 35, $sformatf("bits compared %0d", rq));
    rdn(A_WRONGBITS, 6, rq);
    chk(rq == 64'(u_thine.flips) && rq != 0,
        $sformatf("wrong bits %0d, injected %0d", rq, u_thine.flips));
    rdn(A_ERRWORDS, 6, ew);
    rdn(A_ERRPTR, 2, ptr);
    chk(ew != 0 && ptr == ((ew > 512) ? 64'd512 : ew),
        $sformatf("error memory pointer %0d for %0d erroneous words", ptr, ew));
    repeat (1000) @(posedge clk);
    ber = real'(u_thine.flips) / (real'(NWORDS) * 35.0);
    rdn(A_BERTOT, 8, rq);
    chk(rq == $realtobits(ber), $sformatf("total BER %h expected %h", rq, $realtobits(ber)));
    if (rq == $realtobits(ber)) n_ber++;

    // LCD: power-up wait, init, clear, then the two BER lines
    for (int i = 0; i < 2200 && lcd_line(0) != ber_text(ber); i++)
      repeat (1000) @(posedge clk);
    chk(lcd_line(0) == ber_text(ber), $sformatf("LCD line 1 '%s' expected '%s'",
        lcd_line(0), ber_text(ber)));
    if (lcd_line(0) == ber_text(ber)) n_lcd++;

    $display("mechanisms: latency found %0d, latency error %0d, done %0d, BER %0d, LCD %0d",
             n_lat_found, n_lat_err, n_done, n_ber, n_lcd);
    chk(n_lat_found > 0 && n_lat_err > 0 && n_done > 0 && n_ber > 0 && n_lcd > 0,
        "mechanisms all seen");
    finish_tb();
  end
endmodule
