// Shared environment of the testchip end-to-end testbenches, included inside
// the testbench module: clocks, the serializer model with error generators,
// a DFI memory model, an LCD model, and JTAG tasks that reach the OCP
// address space (register/memory reads and writes) by bit-banging TCK.
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

  // clocks: high-speed bit clock 7x the core clock; core rising edges fall
  // between high-speed rising edges
  logic hs_clk = 0, clk = 1, rst_n = 0, pll_locked = 0, bypass = 0;
  always #1 hs_clk = ~hs_clk;
  always #7 clk = ~clk;

  logic        srd_clk;
  word_t       srd_data;
  logic [4:0]  lane;
  logic [2:0]  data_sel = 0;
  logic [6:0]  exp_o, rec_o;
  logic tck = 0, tms = 1, tdi = 0, trst_n = 1, tdo, tdo_en;
  logic lcd_e, lcd_rs, lcd_rw;
  logic [7:0] lcd_db;
  logic [13:0] dfi_a; logic [1:0] dfi_ba;
  logic dfi_cs, dfi_ras, dfi_cas, dfi_we, dfi_cke, dfi_wen, dfi_ren, dfi_rvalid = 0;
  logic [63:0] dfi_wd, dfi_rd = '0;
  logic [7:0] dfi_wm;
  logic [7:0]  skew [5];
  logic [15:0] thr [5];

  thc63_model #(.LAT(2)) u_thine (.clk(srd_clk), .hs_clk, .data(srd_data), .skew,
    .err_thr(thr), .lane);

  // ---- DFI memory model: write data one clock after wrdata_en command,
  // read data two clocks after rddata_en
  logic [63:0] dram [logic [13:0]];
  logic [13:0] last_a;
  logic [63:0] rp0 = 0, rp1 = 0;
  logic        vp0 = 0, vp1 = 0;
  always @(posedge clk) begin
    if (!dfi_cs && dfi_ras && !dfi_cas) last_a = dfi_a;
    if (dfi_wen) dram[last_a] = dfi_wd;
    dfi_rd <= rp1; dfi_rvalid <= vp1;
    rp1 <= rp0; vp1 <= vp0;
    rp0 <= dram.exists(dfi_a) ? dram[dfi_a] : 64'hDEAD_BEEF_0000_0000; vp0 <= dfi_ren;
  end

  // ---- LCD model
  byte        ddram [128];
  logic [6:0] ac = 0;
  int         lcd_writes = 0;
  initial for (int i = 0; i < 128; i++) ddram[i] = 8'h20;
  always @(negedge lcd_e) begin
    lcd_writes++;
    if (lcd_rs) begin ddram[ac] = lcd_db; ac++; end
    else if (lcd_db[7]) ac = lcd_db[6:0];
  end
  function automatic string lcd_line(input int base);
    string s = "";
    for (int i = 0; i < 10; i++) s = {s, string'(ddram[base + i])};
    return s;
  endfunction

  // ---- JTAG
  logic dum;
  task automatic tick(input logic m, input logic d, output logic o);
    tms = m; tdi = d;
    repeat (4) @(posedge clk);
    o = tdo;
    tck = 1;
    repeat (4) @(posedge clk);
    tck = 0;
  endtask
  task automatic jt_reset();
    repeat (6) tick(1, 0, dum);
    tick(0, 0, dum);
  endtask
  task automatic jt_ir(input logic [3:0] ir);
    tick(1, 0, dum); tick(1, 0, dum); tick(0, 0, dum); tick(0, 0, dum);
    for (int i = 0; i < 4; i++) tick(i == 3, ir[i], dum);
    tick(1, 0, dum); tick(0, 0, dum);
  endtask
  task automatic jt_dr(input int n, input logic [31:0] din, output logic [31:0] dout);
    logic o;
    tick(1, 0, dum); tick(0, 0, dum); tick(0, 0, dum);
    dout = '0;
    for (int i = 0; i < n; i++) begin
      tick(i == n - 1, din[i], o);
      dout[i] = o;
    end
    tick(1, 0, dum); tick(0, 0, dum);
  endtask
  logic [31:0] jq;
  task automatic wr8(input logic [15:0] a, input logic [7:0] d);
    jt_ir(4'h8); jt_dr(16, 32'(a), jq);
    jt_ir(4'h9); jt_dr(8, 32'(d), jq);
  endtask
  task automatic wrn(input logic [15:0] a, input logic [63:0] d, input int n);
    jt_ir(4'h8); jt_dr(16, 32'(a), jq);
    jt_ir(4'h9);
    for (int i = 0; i < n; i++) jt_dr(8, 32'(d[8*i +: 8]), jq);
  endtask
  task automatic rdn(input logic [15:0] a, input int n, output logic [63:0] d);
    jt_ir(4'h8); jt_dr(16, 32'(a), jq);
    jt_ir(4'hA);
    jt_dr(9, 0, jq);
    d = '0;
    for (int i = 0; i < n; i++) begin
      jt_dr(9, 0, jq);
      d[8*i +: 8] = jq[7:0];
    end
  endtask
  logic [63:0] rq;
  task automatic wait_status(input logic [7:0] mask, input int tries);
    for (int i = 0; i < tries; i++) begin
      rdn(A_STATUS, 1, rq);
      if ((rq[7:0] & mask) != 0) return;
    end
  endtask
