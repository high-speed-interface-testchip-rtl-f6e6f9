// tc_ram_tb: writes random words with random byte masks into a small tc_ram
// and reads them back on both read ports, comparing with a reference array;
// also checks the one-clock read latency.
module tc_ram_tb;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask
  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  localparam int W = 35, D = 64;
  logic clk = 0;
  logic [4:0] we = '0;
  logic [5:0] waddr = '0, ra = '0, rb = '0;
  logic [W-1:0] wdata = '0, rda, rdb;
  logic ren_a = 0, ren_b = 0;
  logic [W-1:0] ref_mem [D];

  tc_ram #(.W(W), .DEPTH(D)) dut (.clk, .we, .waddr, .wdata, .ren_a, .raddr_a(ra),
    .rdata_a(rda), .ren_b, .raddr_b(rb), .rdata_b(rdb));
  always #5 clk = ~clk;

  initial begin
    #100000; failures++; $display("watchdog"); finish_tb();
  end

  initial begin
    for (int i = 0; i < D; i++) begin
      ref_mem[i] = {$urandom, $urandom};
      @(negedge clk); we = '1; waddr = 6'(i); wdata = ref_mem[i];
    end
    for (int n = 0; n < 300; n++) begin
      logic [W-1:0] d;
      logic [4:0] m;
      int a;
      a = $urandom_range(0, D - 1); d = {$urandom, $urandom}; m = 5'($urandom);
      @(negedge clk); we = m; waddr = 6'(a); wdata = d;
      for (int b = 0; b < W; b++) if (m[b/8]) ref_mem[a][b] = d[b];
    end
    @(negedge clk); we = '0;
    for (int i = 0; i < D; i++) begin
      ren_a = 1; ren_b = 1; ra = 6'(i); rb = 6'(D - 1 - i);
      @(posedge clk); #1;
      chk(rda == ref_mem[i], $sformatf("port a addr %0d", i));
      chk(rdb == ref_mem[D-1-i], $sformatf("port b addr %0d", D - 1 - i));
    end
    finish_tb();
  end
endmodule
