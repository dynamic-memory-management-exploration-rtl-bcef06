// tb_acc_mmul: runs the matrix-multiplication accelerator against a real DMM
// heap. The returned sum and the product matrix left in the heap's RAM are
// compared with a software model (same LFSR, 32-bit wrap-around arithmetic).
// A second run on a heap too small for the three matrices must end with err
// and an empty freelist.
module tb_acc_mmul;
  import dmm_pkg::*;
  localparam int D = 5, GRID = 100;

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

  logic [1:0] start, busy, done, err, rv, rr, sv;
  logic [31:0] result [2];
  dmm_req_t    rq [2];
  dmm_rsp_t    rs [2];

  acc_mmul #(.DIM(D), .GRID(GRID)) u_acc0 (
    .clk, .rst_n, .start(start[0]), .busy(busy[0]), .done(done[0]), .err(err[0]),
    .result(result[0]), .req_valid(rv[0]), .req_ready(rr[0]), .req(rq[0]),
    .rsp_valid(sv[0]), .rsp(rs[0]));
  dmm_heap #(.DEPTH(128), .FL_WIDTH(32)) u_heap0 (
    .clk, .rst_n, .req_valid(rv[0]), .req_ready(rr[0]), .req(rq[0]),
    .rsp_valid(sv[0]), .rsp(rs[0]));
  acc_mmul #(.DIM(D), .GRID(GRID)) u_acc1 (
    .clk, .rst_n, .start(start[1]), .busy(busy[1]), .done(done[1]), .err(err[1]),
    .result(result[1]), .req_valid(rv[1]), .req_ready(rr[1]), .req(rq[1]),
    .rsp_valid(sv[1]), .rsp(rs[1]));
  dmm_heap #(.DEPTH(64), .FL_WIDTH(8)) u_heap1 (
    .clk, .rst_n, .req_valid(rv[1]), .req_ready(rr[1]), .req(rq[1]),
    .rsp_valid(sv[1]), .rsp(rs[1]));

  int a [D][D], b [D][D], c [D][D], exp_result;
  initial begin
    logic [15:0] l;
    l = 16'hACE1;
    for (int i = 0; i < D; i++) for (int j = 0; j < D; j++) begin
      l = {l[0] ^ l[2] ^ l[3] ^ l[5], l[15:1]};
      a[i][j] = 1 + int'(l) % GRID;
    end
    for (int i = 0; i < D; i++) for (int j = 0; j < D; j++) begin
      l = {l[0] ^ l[2] ^ l[3] ^ l[5], l[15:1]};
      b[i][j] = 1 + int'(l) % GRID;
    end
    exp_result = 0;
    for (int i = 0; i < D; i++) for (int j = 0; j < D; j++) begin
      c[i][j] = 0;
      for (int k = 0; k < D; k++) c[i][j] += a[i][k] * b[k][j];
      exp_result += c[i][j];
    end
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
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
    check(!err[0], "no error");
    check(result[0] == 32'(exp_result), $sformatf("result %0d expected %0d", int'(result[0]), exp_result));
    mism = 0;
    for (int i = 0; i < D; i++) for (int j = 0; j < D; j++)
      if (int'(u_heap0.u_ram.mem[2 * D * D + i * D + j]) != c[i][j]) mism++;
    check(mism == 0, $sformatf("product matrix, %0d mismatches", mism));
    used_bits = 0;
    for (int r = 0; r < 4; r++) used_bits += $countones(u_heap0.u_alloc.used[r]);
    check(used_bits == 0, "heap empty after run");
    check(err[1], "out-of-memory run reports err");
    used_bits = 0;
    for (int r = 0; r < 8; r++) used_bits += $countones(u_heap1.u_alloc.used[r]);
    check(used_bits == 0, "small heap empty after failed run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
