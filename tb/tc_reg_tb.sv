// tc_reg_tb: acts as OCP master towards tc_reg. Checks reset values, that
// every writable register reaches its output and reads back, that status,
// counter and BER fields read back byte by byte, that the four memory windows
// read the right word and byte lane (memories modelled in the testbench),
// that DDR transmit-memory writes raise the right byte strobe, and that
// writes to read-only locations change nothing. Every response must come
// exactly one clock after its command.
module tc_reg_tb;
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

  logic clk = 0, rst_n = 0;
  ocp_if ocp (.clk, .rst_n);
  pg_cfg_t cfg;
  logic [2:0] phase;
  logic [14:0] delay;
  pg_stat_t stat;
  logic [63:0] bt = 64'h3F1A_36E2_EB1C_432D, bp = 64'h3EB0_C6F7_A0B5_ED8D;
  dec_t dt = '{mant: 40'd12345, exp: -8'sd9}, dp = '{mant: 40'd99999, exp: -8'sd12};
  logic eren, dren, tren, ddr_start;
  logic [8:0] era;
  logic [10:0] dra, tra;
  word_t eexp, erec;
  logic [15:0] txf, txl, rxf, twe;
  logic [127:0] twd, trd;
  logic [63:0] rrd;

  tc_reg dut (.ocp(ocp.slave), .cfg, .phase, .delay, .locked(1'b1), .stat,
    .ber_tot(bt), .ber_per(bp), .dec_tot(dt), .dec_per(dp), .ber_valid(1'b1),
    .err_ren(eren), .err_raddr(era), .err_exp(eexp), .err_rec(erec),
    .ddr_start, .ddr_tx_first(txf), .ddr_tx_last(txl), .ddr_rx_first(rxf),
    .ddr_busy(1'b0), .ddr_done(1'b1), .ddr_rx_count(16'h0456),
    .txm_we(twe), .txm_addr(tra), .txm_wdata(twd), .txm_ren(tren), .txm_rdata(trd),
    .rxm_ren(dren), .rxm_addr(dra), .rxm_rdata(rrd));
  always #5 clk = ~clk;

  // memory models: word contents are functions of the address
  always @(posedge clk) begin
    if (eren) begin eexp <= 35'h1_0000_0000 | 35'(era); erec <= 35'h2_0000_0000 | 35'(era); end
    if (dren) rrd <= {32'hCAFE0000 | 32'(dra), 32'h0};
    if (tren) trd <= {16'(tra), 112'h0} | 128'h0A;
  end

  task automatic ocp_wr(input logic [15:0] a, input logic [7:0] d);
    @(negedge clk); ocp.MCmd = OCP_WR; ocp.MAddr = a; ocp.MData = d;
    @(negedge clk); ocp.MCmd = OCP_IDLE;
    chk(ocp.SResp == OCP_DVA, "write response after one clock");
  endtask
  task automatic ocp_rd(input logic [15:0] a, output logic [7:0] d);
    @(negedge clk); ocp.MCmd = OCP_RD; ocp.MAddr = a;
    @(negedge clk); ocp.MCmd = OCP_IDLE;
    chk(ocp.SResp == OCP_DVA, "read response after one clock");
    d = ocp.SRespData;
  endtask

  initial begin
    #1000000; failures++; $display("watchdog"); finish_tb();
  end

  logic [7:0] r;
  logic [63:0] f;
  initial begin
    ocp.MCmd = OCP_IDLE; ocp.MAddr = '0; ocp.MData = '0;
    stat = '0;
    stat.latency = 8'd17; stat.lat_found = 1; stat.done = 1;
    stat.err_words = 48'h0000_0102_0304; stat.wrong_bits = 48'hA0B0_C0D0_E0F0;
    stat.tot_bits = 48'h1122_3344_5566; stat.err_ptr = 16'd7;
    repeat (2) @(posedge clk);
    rst_n = 1;
    chk(phase == 3'd2 && cfg.auto_lat && !cfg.start && cfg.max_lat == 8'd64, "reset values");
    ocp_wr(A_CTRL, 8'h01);
    chk(cfg.start && !cfg.auto_lat, "control register");
    ocp_wr(A_MAXLAT, 8'd33); ocp_wr(A_MANLAT, 8'd12); ocp_wr(A_PHASE, 8'd5);
    for (int c = 0; c < 5; c++) ocp_wr(A_DELAY + 16'(c), 8'(c + 2));
    for (int k = 0; k < 4; k++) begin
      ocp_wr(A_NUMPAT + 16'(k), 8'(8'h10 + k));
      ocp_wr(A_STOPERR + 16'(k), 8'(8'h20 + k));
      ocp_wr(A_PERIOD + 16'(k), 8'(8'h30 + k));
    end
    ocp_wr(A_DDRTXS, 8'h05); ocp_wr(A_DDRTXE + 1, 8'h01); ocp_wr(A_DDRRXS, 8'h09);
    ocp_wr(A_DDRCTRL, 8'h01);
    chk(cfg.max_lat == 33 && cfg.man_lat == 12 && phase == 5, "latency/phase registers");
    chk(delay == {3'd6, 3'd5, 3'd4, 3'd3, 3'd2}, "delay registers");
    chk(cfg.num_pat == 32'h13121110 && cfg.stop_err == 32'h23222120 && cfg.period == 32'h33323130,
        "32-bit registers");
    chk(txf == 16'h0005 && txl == 16'h0100 && rxf == 16'h0009 && ddr_start, "DDR registers");
    ocp_rd(A_CTRL, r);    chk(r == 8'h01, "read control");
    ocp_rd(A_STATUS, r);  chk(r == 8'b0100_1011, $sformatf("read status %b", r));
    ocp_rd(A_LATENCY, r); chk(r == 8'd17, "read latency");
    ocp_rd(A_DELAY + 4, r); chk(r == 8'd6, "read delay E");
    ocp_rd(A_NUMPAT + 2, r); chk(r == 8'h12, "read num patterns");
    for (int k = 0; k < 6; k++) begin
      ocp_rd(A_WRONGBITS + 16'(k), r); f[8*k +: 8] = r;
    end
    chk(f[47:0] == stat.wrong_bits, "read wrong bits");
    ocp_rd(A_TOTBITS + 5, r); chk(r == 8'h11, "read total bits");
    for (int k = 0; k < 8; k++) begin ocp_rd(A_BERTOT + 16'(k), r); f[8*k +: 8] = r; end
    chk(f == bt, "read total BER double");
    ocp_rd(A_DECPER, r); chk(r == 8'(dp.exp), "read period decimal exponent");
    ocp_rd(A_DECPER + 1, r); chk(r == 8'h9F, "read period decimal mantissa low byte");
    ocp_rd(A_DDRRXC, r); chk(r == 8'h56, "read DDR rx count");
    ocp_rd(A_DDRSTAT, r); chk(r == 8'h02, "read DDR status");
    // read-only locations ignore writes
    ocp_wr(A_LATENCY, 8'hFF); ocp_rd(A_LATENCY, r); chk(r == 8'd17, "latency is read only");
    // memory windows
    ocp_rd(W_ERREXP + 16'h0004 * 8 + 4, r); chk(r == 8'h01 && era == 9'd4, "error memory expected");
    ocp_rd(W_ERRREC + 16'd9 * 8 + 0, r);   chk(r == 8'd9, "error memory received byte 0");
    ocp_rd(W_ERRREC + 16'd9 * 8 + 4, r);   chk(r == 8'h02, "error memory received byte 4");
    ocp_rd(W_DDRRX + 16'd3 * 8 + 4, r);    chk(r == 8'h03, "DDR rx memory byte 4");
    ocp_rd(W_DDRRX + 16'd3 * 8 + 7, r);    chk(r == 8'hCA, "DDR rx memory byte 7");
    ocp_rd(W_DDRTX + 16'd7 * 16 + 14, r);  chk(r == 8'h07, "DDR tx memory byte 14");
    ocp_rd(W_DDRTX + 16'd7 * 16 + 0, r);   chk(r == 8'h0A, "DDR tx memory byte 0");
    @(negedge clk); ocp.MCmd = OCP_WR; ocp.MAddr = W_DDRTX + 16'd2 * 16 + 5; ocp.MData = 8'h77;
    #1;
    chk(twe == 16'h0020 && tra == 11'd2 && twd[47:40] == 8'h77, "DDR tx memory byte write strobe");
    @(negedge clk); ocp.MCmd = OCP_IDLE;
    finish_tb();
  end
endmodule
