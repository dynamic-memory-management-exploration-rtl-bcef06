// tb_acc_histogram: runs the Histogram accelerator against a real DMM heap.
//
// Case 1: a 1024-word heap. The expected bins are computed here from an
// independent model of the 16-bit LFSR and compared with the heap's RAM after
// the run (free does not erase data). The return value, the error flag and an
// empty freelist afterwards are checked too.
// Case 2: a 512-word heap, too small for the arrays: the accelerator must report
// err, and must leave the freelist empty again.
module tb_acc_histogram;
  import dmm_pkg::*;

  localparam int N = 48;

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

  // two accelerator + heap pairs
  logic [1:0] start, busy, done, err, rv, rr, sv;
  logic [31:0] result [2];
  dmm_req_t    rq [2];
  dmm_rsp_t    rs [2];

  acc_histogram #(.HEAP_ID(0), .N(N)) u_acc0 (
    .clk, .rst_n, .start(start[0]), .busy(busy[0]), .done(done[0]), .err(err[0]),
    .result(result[0]), .req_valid(rv[0]), .req_ready(rr[0]), .req(rq[0]),
    .rsp_valid(sv[0]), .rsp(rs[0]));
  dmm_heap #(.DEPTH(1024), .FL_WIDTH(32)) u_heap0 (
    .clk, .rst_n, .req_valid(rv[0]), .req_ready(rr[0]), .req(rq[0]),
    .rsp_valid(sv[0]), .rsp(rs[0]));

  acc_histogram #(.HEAP_ID(0), .N(N)) u_acc1 (
    .clk, .rst_n, .start(start[1]), .busy(busy[1]), .done(done[1]), .err(err[1]),
    .result(result[1]), .req_valid(rv[1]), .req_ready(rr[1]), .req(rq[1]),
    .rsp_valid(sv[1]), .rsp(rs[1]));
  dmm_heap #(.DEPTH(512), .FL_WIDTH(8)) u_heap1 (
    .clk, .rst_n, .req_valid(rv[1]), .req_ready(rr[1]), .req(rq[1]),
    .rsp_valid(sv[1]), .rsp(rs[1]));

  // reference model
  int exp_bins [3][256];
  initial begin
    logic [15:0] l;
    int v;
    int pix [N];
    l = 16'hACE1;
    for (int i = 0; i < N; i++) begin
      l = {l[0] ^ l[2] ^ l[3] ^ l[5], l[15:1]};
      v = 1 + int'(l) % (i + 1);
      pix[i] = v & 255;
    end
    for (int c = 0; c < 3; c++) for (int b = 0; b < 256; b++) exp_bins[c][b] = 0;
    for (int i = 0; i < N; i += 3)
      for (int c = 0; c < 3; c++) exp_bins[c][pix[i + c]]++;
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int mism, used_bits;
    start = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    start = 2'b11;
    @(posedge clk);
    start = 2'b00;
    fork
      wait (done[0]);
      wait (done[1]);
    join
    @(posedge clk);
    check(err[0] == 1'b0, "case 1 err");
    check(result[0] == 32'(N), $sformatf("case 1 result %0d", result[0]));
    mism = 0;
    for (int c = 0; c < 3; c++)
      for (int b = 0; b < 256; b++)
        if (int'(u_heap0.u_ram.mem[N + c * 256 + b]) != exp_bins[c][b]) mism++;
    check(mism == 0, $sformatf("case 1 bins, %0d mismatches", mism));
    used_bits = 0;
    for (int r = 0; r < 1024 / 32; r++) used_bits += $countones(u_heap0.u_alloc.used[r]);
    check(used_bits == 0, "case 1 heap empty after run");
    check(err[1] == 1'b1, "case 2 err on out-of-memory");
    used_bits = 0;
    for (int r = 0; r < 512 / 8; r++) used_bits += $countones(u_heap1.u_alloc.used[r]);
    check(used_bits == 0, "case 2 heap empty after failed run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
