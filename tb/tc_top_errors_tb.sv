// tc_top_errors_tb: error-injection regression on the whole testchip.
// Lane E is skewed by two bit times in the serializer model, so no sampling
// phase works until the per-lane delay registers of lanes A..D are set to the
// same two bit times. After the phase sweep finds the working phase, the test
// makes one run with random bit errors on each lane in turn (A to E) and one
// with errors on all five lanes at once. For every run it checks that the wrong-bit count read
// over JTAG equals the number of bits the serializer model flipped, that the
// first error-memory entry differs from the expected word only in the
// disturbed lanes, and that the total BER double equals wrong bits divided by
// compared bits. LCD waits are shortened; other parameters are defaults.
module tc_top_errors_tb;
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

  localparam int unsigned NWORDS = 4000;

  initial begin
    #40ms; failures++; $display("watchdog"); finish_tb();
  end

  int good = -1, base, n_runs = 0;
  logic [63:0] ex, rc, lanes_mask;
  real ber;
  initial begin
    for (int c = 0; c < 5; c++) begin skew[c] = 0; thr[c] = 0; end
    skew[4] = 2;                       // lane E arrives two bit times late
    repeat (3) @(posedge clk);
    rst_n = 1;
    jt_reset();
    pll_locked = 1;
    wrn(A_NUMPAT, 64'(NWORDS), 4);
    wrn(A_PERIOD, 64'd1000, 4);
    wr8(A_MAXLAT, 8'd40);
    for (int p = 0; p < 7 && good < 0; p++) begin
      wr8(A_PHASE, 8'(p));
      wr8(A_CTRL, 8'h03);
      wait_status(8'h06, 20);
      if (rq[1]) good = p;
      wr8(A_CTRL, 8'h02);
    end
    chk(good < 0, "with lane E skewed no phase finds the training pattern");
    // compensate: delay lanes A..D by the same two bit times
    for (int c = 0; c < 4; c++) wr8(A_DELAY + 16'(c), 8'd2);
    for (int p = 0; p < 7 && good < 0; p++) begin
      wr8(A_PHASE, 8'(p));
      wr8(A_CTRL, 8'h03);
      wait_status(8'h06, 20);
      if (rq[1]) good = p;
      wr8(A_CTRL, 8'h02);
    end
    chk(good >= 0, "phase found once the lane delays match the skew");
    wr8(A_PHASE, 8'(good));

    // runs 0..4: one lane each; run 5: all lanes
    for (int r = 0; r < 6; r++) begin
      lanes_mask = '0;
      wr8(A_CTRL, 8'h02);
      wr8(A_CTRL, 8'h03);
      wait_status(8'h02, 20);
      base = u_thine.flips;
      for (int c = 0; c < 5; c++)
        if (r == 5 || r == c) begin
          thr[c] = 16'd150;
          lanes_mask |= 64'h7F << (7 * c);
        end
      repeat (NWORDS - 1500) @(posedge clk);
      for (int c = 0; c < 5; c++) thr[c] = 16'd0;
      wait_status(8'h08, 400);
      chk(rq[3], $sformatf("run %0d done", r));
      rdn(A_WRONGBITS, 6, rq);
      chk(rq == 64'(u_thine.flips - base) && rq != 0,
          $sformatf("run %0d: wrong bits %0d, injected %0d", r, rq, u_thine.flips - base));
      rdn(W_ERREXP, 5, ex);
      rdn(W_ERRREC, 5, rc);
      chk((ex ^ rc) != 0 && ((ex ^ rc) & ~lanes_mask) == 0,
          $sformatf("run %0d: error memory differs only in the disturbed lanes (%h vs %h)",
                    r, ex, rc));
      repeat (1000) @(posedge clk);
      ber = real'(u_thine.flips - base) / (real'(NWORDS) * 35.0);
      rdn(A_BERTOT, 8, rq);
      chk(rq == $realtobits(ber), $sformatf("run %0d: total BER %h expected %h",
          r, rq, $realtobits(ber)));
      if (rq == $realtobits(ber)) n_runs++;
    end
    $display("error runs checked: %0d of 6", n_runs);
    chk(n_runs == 6, "every lane and all lanes together");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
