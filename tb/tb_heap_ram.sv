// tb_heap_ram: checks the heap's block-RAM bank.
// Writes a pattern from $urandom to every word, reads it back and checks the
// one-cycle read latency, that a disabled cycle changes neither the memory nor
// rdata, and that a read and write to the same address returns the old word.
module tb_heap_ram;
  localparam int DEPTH = 256;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic        en, we;
  logic [7:0]  addr;
  logic [31:0] wdata, rdata;
  logic [31:0] model [DEPTH];

  heap_ram #(.DEPTH(DEPTH), .WIDTH(32)) dut (.clk, .en, .we, .addr, .wdata, .rdata);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] held;
    en = 0; we = 0; addr = 0; wdata = 0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      en = 1; we = 1; addr = 8'(a); wdata = $urandom; model[a] = wdata;
    end
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      en = 1; we = 0; addr = 8'(a);
      @(posedge clk); #1;
      check(rdata == model[a], $sformatf("read %0d", a));
    end
    // disabled cycle: nothing changes
    @(negedge clk);
    held = rdata;
    en = 0; we = 1; addr = 8'd5; wdata = ~model[5];
    @(posedge clk); #1;
    check(rdata == held, "rdata held while disabled");
    @(negedge clk);
    en = 1; we = 0; addr = 8'd5;
    @(posedge clk); #1;
    check(rdata == model[5], "no write while disabled");
    // read-first on a write
    @(negedge clk);
    en = 1; we = 1; addr = 8'd7; wdata = 32'hDEAD_BEEF;
    @(posedge clk); #1;
    check(rdata == model[7], "old data returned on write");
    @(negedge clk);
    en = 1; we = 0;
    @(posedge clk); #1;
    check(rdata == 32'hDEAD_BEEF, "new data after write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
