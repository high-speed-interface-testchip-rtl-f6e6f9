// jtag_ctrl_tb: bit-bangs TCK/TMS/TDI at 1/8 of the system clock into
// jtag_ctrl, with a byte memory behind its OCP port (answering one or three
// clocks later). Checks the IDCODE after reset, the IR capture value, the
// one-bit BYPASS path, OCP writes with address auto-increment, reads back
// through OCP_READ, the boundary-scan strobes for SAMPLE, and TRST.
module jtag_ctrl_tb;
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
  logic tck = 0, tms = 1, tdi = 0, trst_n = 1, tdo, tdo_en;
  logic bsel, bcap, bsh, bupd, btdi;
  int   ncap = 0, nsh = 0;
  ocp_if ocp (.clk, .rst_n);

  jtag_ctrl #(.IDCODE(32'h1A5C_0001)) dut (.tck, .tms, .tdi, .trst_n, .tdo, .tdo_en,
    .bsr_sel(bsel), .bsr_capture(bcap), .bsr_shift(bsh), .bsr_update(bupd), .bsr_tdi(btdi),
    .bsr_tdo(1'b1), .ocp(ocp.master));
  always #5 clk = ~clk;

  // OCP slave model
  logic [7:0] mem [logic [15:0]];
  int   delay_cnt = 0, nwr = 0;
  logic pend = 0;
  logic [7:0] rdat;
  assign ocp.SCmdAccept = 1'b1;
  initial begin ocp.SResp = OCP_NULL; ocp.SRespData = 8'h00; end
  always @(posedge clk) begin
    ocp.SResp <= OCP_NULL;
    if (!rst_n) pend = 0;
    else if (ocp.MCmd == OCP_WR) begin mem[ocp.MAddr] = ocp.MData; nwr++; end
    if (rst_n && ocp.MCmd != OCP_IDLE) begin
      pend = 1; delay_cnt = (ocp.MAddr[0]) ? 3 : 1;
      rdat = mem.exists(ocp.MAddr) ? mem[ocp.MAddr] : 8'hEE;
    end else if (pend) begin
      delay_cnt--;
      if (delay_cnt == 0) begin pend = 0; ocp.SResp <= OCP_DVA; ocp.SRespData <= rdat; end
    end
    if (bcap) ncap++;
    if (bsh) nsh++;
  end

  task automatic tick(input logic m, input logic d, output logic o);
    tms = m; tdi = d;
    repeat (4) @(posedge clk);
    tck = 1;
    o = tdo;
    repeat (4) @(posedge clk);
    tck = 0;
  endtask

  logic dum;
  task automatic reset_tap();
    repeat (6) tick(1, 0, dum);
    tick(0, 0, dum);                    // run-test/idle
  endtask

  task automatic shift_ir(input logic [3:0] ir, output logic [3:0] cap);
    tick(1, 0, dum); tick(1, 0, dum); tick(0, 0, dum); tick(0, 0, dum); // to shift-IR
    for (int i = 0; i < 4; i++) begin
      tick(i == 3, ir[i], dum);
      repeat (0) ;
    end
    cap = 'x;
    tick(1, 0, dum); tick(0, 0, dum);   // update-IR, idle
  endtask

  // shift n bits of DR (LSB first) and return the n bits that came out
  task automatic shift_dr(input int n, input logic [39:0] din, output logic [39:0] dout);
    logic o;
    tick(1, 0, dum); tick(0, 0, dum); tick(0, 0, dum);                  // capture, shift
    dout = '0;
    for (int i = 0; i < n; i++) begin
      // TDO changes on falling TCK, sample before the rising edge
      tms = (i == n - 1); tdi = din[i];
      repeat (4) @(posedge clk);
      dout[i] = tdo;
      tck = 1; repeat (4) @(posedge clk); tck = 0;
    end
    tick(1, 0, dum); tick(0, 0, dum);                                   // update, idle
  endtask

  // IR capture: shift out the captured IR while shifting in BYPASS
  task automatic ir_capture(output logic [3:0] cap);
    tick(1, 0, dum); tick(1, 0, dum); tick(0, 0, dum); tick(0, 0, dum);
    for (int i = 0; i < 4; i++) begin
      tms = (i == 3); tdi = 1'b1;
      repeat (4) @(posedge clk);
      cap[i] = tdo;
      tck = 1; repeat (4) @(posedge clk); tck = 0;
    end
    tick(1, 0, dum); tick(0, 0, dum);
  endtask

  initial begin
    #20000000; failures++; $display("watchdog"); finish_tb();
  end

  logic [39:0] q;
  logic [3:0]  c;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    reset_tap();
    shift_dr(32, 40'h0, q);
    chk(q[31:0] == 32'h1A5C_0001, $sformatf("IDCODE after reset %h", q[31:0]));
    ir_capture(c);
    chk(c == 4'b0001, $sformatf("IR capture %b", c));
    // BYPASS (now loaded): 1-bit register, data comes out one bit later
    shift_dr(8, 40'hA5, q);
    chk(q[0] == 1'b0 && q[7:1] == 7'h25, $sformatf("bypass %h", q));
    // OCP writes
    shift_ir(4'h8, c);
    shift_dr(16, 40'h1230, q);
    shift_ir(4'h9, c);
    shift_dr(8, 40'h11, q);
    shift_dr(8, 40'h22, q);
    shift_dr(8, 40'h33, q);
    chk(nwr == 3, "three OCP writes");
    chk(mem.exists(16'h1230) && mem[16'h1230] == 8'h11, "write 0x1230");
    chk(mem.exists(16'h1232) && mem[16'h1232] == 8'h33, "write 0x1232 (auto increment)");
    // OCP reads
    shift_ir(4'h8, c);
    shift_dr(16, 40'h1230, q);
    shift_ir(4'hA, c);
    shift_dr(9, 40'h0, q);            // starts read of 0x1230
    shift_dr(9, 40'h0, q);            // captures it, starts 0x1231
    chk(q[8:0] == {1'b1, 8'h11}, $sformatf("read 0x1230 %h", q[8:0]));
    shift_dr(9, 40'h0, q);
    chk(q[8:0] == {1'b1, 8'h22}, $sformatf("read 0x1231 %h", q[8:0]));
    shift_dr(9, 40'h0, q);
    chk(q[8:0] == {1'b1, 8'h33}, $sformatf("read 0x1232 %h", q[8:0]));
    // SAMPLE selects the boundary-scan register
    shift_ir(4'h1, c);
    shift_dr(4, 40'h0, q);
    chk(ncap == 1 && nsh == 4 && q[3:0] == 4'hF, "boundary-scan capture/shift strobes");
    // TRST returns to IDCODE
    trst_n = 0; repeat (8) @(posedge clk); trst_n = 1;
    tick(0, 0, dum);
    shift_dr(32, 40'h0, q);
    chk(q[31:0] == 32'h1A5C_0001, "IDCODE after TRST");
    finish_tb();
  end
endmodule
