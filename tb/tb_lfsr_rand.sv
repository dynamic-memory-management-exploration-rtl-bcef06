// tb_lfsr_rand: checks RandMinMaxSyn in hardware against a software model of
// the 16-bit LFSR (seed 0xACE1, taps 16,14,13,11) for growing and random
// ranges, and checks that each value arrives 34 clock edges after start.
module tb_lfsr_rand;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic        start, done;
  logic [31:0] min_v, max_v, value;
  lfsr_rand dut (.clk, .rst_n, .start, .min_v, .max_v, .done, .value);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] l;
    int lo, hi, lat;
    longint expv;
    start = 0; min_v = 0; max_v = 0;
    l = 16'hACE1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      if (t < 100) begin lo = 1; hi = t + 1; end
      else begin lo = int'($urandom % 50); hi = lo + int'($urandom % 1000); end
      l = {l[0] ^ l[2] ^ l[3] ^ l[5], l[15:1]};
      expv = longint'(lo) + longint'(l) % longint'(hi - lo + 1);
      @(negedge clk);
      start = 1; min_v = 32'(lo); max_v = 32'(hi);
      @(posedge clk); #1;
      start = 0;
      lat = 0;
      while (!done && lat < 100) begin @(posedge clk); #1; lat++; end
      check(value == 32'(expv), $sformatf("value %0d expected %0d (range %0d..%0d)", value, expv, lo, hi));
      check(lat == 34, $sformatf("latency %0d", lat));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
