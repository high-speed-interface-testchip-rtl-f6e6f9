// ddr_ctrl_tb: loads a command script into ddr_ctrl's transmit memory
// through the host port (byte writes), starts it and records the DFI outputs
// every clock. Checks that each entry appears for one clock in order, that
// 'idle' inserts exactly that many NOP cycles, that 'done' is set after the
// last entry, and that read data returned by a small DFI model (memory
// written on wrdata_en, read back two clocks after rddata_en) lands in the
// receive memory from rx_first on, with the right rx_count.
module ddr_ctrl_tb;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask
  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  localparam int D = 64;
  logic clk = 0, rst_n = 0, start = 0;
  logic [15:0] txf = 16'd4, txl = 16'd11, rxf = 16'd20, rxc;
  logic busy, done;
  logic [15:0] twe = '0;
  logic [5:0]  taddr = '0, raddr = '0;
  logic [127:0] twd = '0, trd;
  logic tren = 0, rren = 0;
  logic [63:0] rrd;
  logic [13:0] a; logic [1:0] ba;
  logic cs, ras, cas, we, cke, wen, ren, rvalid = 0;
  logic [63:0] wd, rdata = '0;
  logic [7:0] wm;

  ddr_ctrl #(.DEPTH(D)) dut (.clk, .rst_n, .start, .tx_first(txf), .tx_last(txl),
    .rx_first(rxf), .busy, .done, .rx_count(rxc), .txm_we(twe), .txm_addr(taddr),
    .txm_wdata(twd), .txm_ren(tren), .txm_rdata(trd), .rxm_ren(rren), .rxm_addr(raddr),
    .rxm_rdata(rrd), .dfi_address(a), .dfi_bank(ba), .dfi_cs_n(cs), .dfi_ras_n(ras),
    .dfi_cas_n(cas), .dfi_we_n(we), .dfi_cke(cke), .dfi_wrdata_en(wen), .dfi_wrdata(wd),
    .dfi_wrdata_mask(wm), .dfi_rddata_en(ren), .dfi_rddata(rdata),
    .dfi_rddata_valid(rvalid));
  always #5 clk = ~clk;

  function automatic logic [127:0] ent(input logic [63:0] d, input logic [3:0] cmd,
      input logic [13:0] ad, input logic w, input logic r, input logic [15:0] idle);
    return {d, 8'h00, cmd, 1'b1, 2'd1, ad, w, r, 17'd0, idle};
  endfunction

  logic [127:0] script [12];
  // DFI model
  logic [63:0] dram [logic [13:0]];
  logic [13:0] last_a;
  logic [63:0] rpipe [2];
  logic        vpipe [2];
  always @(posedge clk) begin
    if (!cs && ras == 1'b1 && cas == 1'b0) last_a = a;
    if (wen) dram[last_a] = wd;
    rdata  <= rpipe[1]; rvalid <= vpipe[1];
    rpipe[1] <= rpipe[0]; vpipe[1] <= vpipe[0];
    rpipe[0] <= dram.exists(a) ? dram[a] : 64'hDEAD; vpipe[0] <= ren;
  end

  // record DFI cycles
  logic [127:0] seen [$];
  always @(posedge clk) if (rst_n && (!cs || busy)) seen.push_back(
    {wd, wm, cs, ras, cas, we, cke, ba, a, wen, ren, 33'd0});

  initial begin
    #100000; failures++; $display("watchdog"); finish_tb();
  end

  int k;
  initial begin
    vpipe[0] = 0; vpipe[1] = 0; rpipe[0] = 0; rpipe[1] = 0;
    script[4]  = ent(64'h0, 4'b0011, 14'h100, 0, 0, 0);                 // activate
    script[5]  = ent(64'h1111_2222_3333_4444, 4'b0100, 14'h010, 1, 0, 0); // write
    script[6]  = ent(64'h5555_6666_7777_8888, 4'b0100, 14'h011, 1, 0, 3); // write + 3 idle
    script[7]  = ent(64'h0, 4'b0101, 14'h010, 0, 1, 0);                 // read
    script[8]  = ent(64'h0, 4'b0101, 14'h011, 0, 1, 2);                 // read + 2 idle
    script[9]  = ent(64'h0, 4'b0101, 14'h012, 0, 1, 0);                 // read unwritten
    script[10] = ent(64'h0, 4'b0111, 14'h000, 0, 0, 0);                 // nop
    script[11] = ent(64'h0, 4'b0010, 14'h400, 0, 0, 0);                 // precharge
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int e = 4; e < 12; e++)
      for (int b = 0; b < 16; b++) begin
        @(negedge clk); taddr = 6'(e); twe = 16'(1) << b; twd = {16{script[e][8*b +: 8]}};
      end
    @(negedge clk); twe = '0; tren = 1; taddr = 6'd6;
    @(negedge clk); tren = 0;
    chk(trd == script[6], "host read-back of transmit memory");
    @(negedge clk); start = 1;
    k = 0;
    while (!done && k < 200) begin @(negedge clk); k++; end
    chk(done && !busy, "done after the script");
    repeat (6) @(negedge clk);
    // expected DFI sequence (only cs_n = 0 cycles recorded, plus NOPs while busy)
    begin
      int idx = 0;
      for (int e = 4; e < 12; e++) begin
        while (idx < seen.size() && seen[idx][55]) idx++;
        chk(idx < seen.size() && seen[idx][127:33] == script[e][127:33],
            $sformatf("entry %0d on DFI", e));
        idx++;
      end
    end
    // 8 entries, 3 + 2 idle NOPs, 2 NOPs while the first entry is fetched
    chk(seen.size() == 8 + 3 + 2 + 2, $sformatf("NOP cycles inserted: %0d cycles", seen.size()));
    chk(rxc == 16'd3, $sformatf("rx count %0d", rxc));
    for (int i = 0; i < 3; i++) begin
      @(negedge clk); rren = 1; raddr = 6'(20 + i);
      @(negedge clk); rren = 0;
      chk(rrd == ((i == 0) ? 64'h1111_2222_3333_4444 : (i == 1) ? 64'h5555_6666_7777_8888
                  : 64'hDEAD), $sformatf("rx memory word %0d = %h", i, rrd));
    end
    start = 0;
    @(negedge clk); @(negedge clk);
    chk(!done, "done cleared with start");
    finish_tb();
  end
endmodule
