// tc_lfsr_tb: checks tc_lfsr against a bit-serial model of the polynomial
// x^35 + x^33 + 1: after init the word equals the seed, every enabled clock
// advances the sequence by 35 bits, a disabled clock holds it, init reloads.
module tc_lfsr_tb;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask
  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  logic clk = 0, rst_n = 0, init = 0, en = 0;
  logic [34:0] word, model;

  tc_lfsr dut (.clk, .rst_n, .init, .en, .word);
  always #5 clk = ~clk;

  function automatic logic [34:0] step(input logic [34:0] s, input int n);
    for (int i = 0; i < n; i++) s = {s[33:0], s[34] ^ s[32]};
    return s;
  endfunction

  initial begin
    #20000; failures++; $display("watchdog"); finish_tb();
  end

  initial begin
    model = 35'd1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(word == 35'd1, "seed after reset");
    en = 1;
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      model = step(model, 35);
      chk(word == model, $sformatf("word %0d: %h vs %h", k, word, model));
    end
    en = 0;
    repeat (3) @(negedge clk);
    chk(word == model, "hold when disabled");
    init = 1; @(negedge clk); init = 0;
    chk(word == 35'd1, "init reloads the seed");
    finish_tb();
  end
endmodule
