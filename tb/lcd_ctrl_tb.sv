// lcd_ctrl_tb: models a character LCD (latching RS/DB on the falling edge
// of E, with a DDRAM address counter) behind lcd_ctrl run with short timing
// parameters. Checks the initialisation command sequence, the minimum E pulse
// width and the spacing of writes, and the text of both lines for several
// mantissa/exponent pairs, e.g. 10253 x 10^-11 shown as "1.0253e-07".
module lcd_ctrl_tb;
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

  logic clk = 0, rst_n = 0, upd = 0;
  dec_t dt = '0, dp = '0;
  logic e, rs, rw, ready;
  logic [7:0] db;

  lcd_ctrl #(.T_PWRUP(50), .T_EXEC(10), .T_CLEAR(40), .T_PW(4)) dut (.clk, .rst_n,
    .dec_tot(dt), .dec_per(dp), .upd, .lcd_e(e), .lcd_rs(rs), .lcd_rw(rw), .lcd_db(db),
    .ready);
  always #5 clk = ~clk;

  // LCD model
  byte    ddram [128];
  logic [6:0] ac = 0;
  byte    cmds [$];
  int     ehigh = 0, minw = 1000, since = 1000, mingap = 1000, nwr = 0;
  always @(posedge clk) begin
    if (e) ehigh++;
    else since++;
  end
  always @(negedge e) begin
    if (ehigh < minw) minw = ehigh;
    ehigh = 0;
    nwr++;
    if (rs) begin ddram[ac] = db; ac++; end
    else begin
      cmds.push_back(db);
      if (db[7]) ac = db[6:0];
    end
  end
  always @(posedge e) begin
    if (nwr > 0 && since < mingap) mingap = since;
    since = 0;
  end

  function automatic string line(input int base);
    string s = "";
    for (int i = 0; i < 10; i++) s = {s, string'(ddram[base + i])};
    return s;
  endfunction

  task automatic show(input logic [39:0] m1, input int e1, input logic [39:0] m2, input int e2,
                      input string l1, input string l2);
    int t = 0;
    @(negedge clk);
    dt = '{mant: m1, exp: 8'(e1)}; dp = '{mant: m2, exp: 8'(e2)}; upd = 1;
    @(negedge clk); upd = 0;
    dt = '0; dp = '0;
    repeat (3) @(negedge clk);
    while (!ready && t < 100000) begin @(negedge clk); t++; end
    chk(line(0) == l1, $sformatf("line 1 '%s' expected '%s'", line(0), l1));
    chk(line(64) == l2, $sformatf("line 2 '%s' expected '%s'", line(64), l2));
  endtask

  initial begin
    #5000000; failures++; $display("watchdog"); finish_tb();
  end

  initial begin
    for (int i = 0; i < 128; i++) ddram[i] = 8'h20;
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (ready);
    chk(cmds.size() == 4 && cmds[0] == 8'h38 && cmds[1] == 8'h0C && cmds[2] == 8'h01
        && cmds[3] == 8'h06, "initialisation sequence");
    chk(rw == 1'b0, "write only");
    show(40'd10253, -11, 40'd12345678, -15, "1.0253e-07", "1.2345e-08");
    show(40'd0, 0, 40'd5, 0, "0.0000e+00", "5.0000e+00");
    show(40'd99999, -4, 40'd100000, -19, "9.9999e+00", "1.0000e-14");
    chk(minw >= 4, $sformatf("E pulse width %0d", minw));
    chk(mingap >= 10, $sformatf("gap between writes %0d", mingap));
    finish_tb();
  end
endmodule
