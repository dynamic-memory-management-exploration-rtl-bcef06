// tb_acc_kmeans: runs the k-means accelerator against a real DMM heap and
// compares its result (sum of the final means) and its number of iterations
// with the reference model. A run with a two-dimensional, three-cluster
// problem on a roomy heap must succeed and leave the heap empty; a run on a
// heap too small for its three arrays must end with err and an empty freelist.
module tb_acc_kmeans;
  import dmm_pkg::*;
  import dmm_ref_pkg::*;
  localparam int NP = 24, D = 2, NC = 3, GRID = 100, MI = 16;

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

  acc_kmeans #(.NPTS(NP), .DIM(D), .NCLUST(NC), .GRID(GRID), .MAX_ITER(MI)) u_acc0 (
    .clk, .rst_n, .start(start[0]), .busy(busy[0]), .done(done[0]), .err(err[0]),
    .result(result[0]), .req_valid(rv[0]), .req_ready(rr[0]), .req(rq[0]),
    .rsp_valid(sv[0]), .rsp(rs[0]));
  dmm_heap #(.DEPTH(128), .FL_WIDTH(32)) u_heap0 (
    .clk, .rst_n, .req_valid(rv[0]), .req_ready(rr[0]), .req(rq[0]),
    .rsp_valid(sv[0]), .rsp(rs[0]));
  acc_kmeans #(.NPTS(NP), .DIM(D), .NCLUST(NC), .GRID(GRID), .MAX_ITER(MI)) u_acc1 (
    .clk, .rst_n, .start(start[1]), .busy(busy[1]), .done(done[1]), .err(err[1]),
    .result(result[1]), .req_valid(rv[1]), .req_ready(rr[1]), .req(rq[1]),
    .rsp_valid(sv[1]), .rsp(rs[1]));
  dmm_heap #(.DEPTH(64), .FL_WIDTH(8)) u_heap1 (
    .clk, .rst_n, .req_valid(rv[1]), .req_ready(rr[1]), .req(rq[1]),
    .rsp_valid(sv[1]), .rsp(rs[1]));

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_result, exp_iter, used_bits;
    exp_result = kmeans_model(NP, D, NC, GRID, MI, exp_iter);
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
    check(result[0] == 32'(exp_result), $sformatf("result %0d expected %0d", result[0], exp_result));
    check(int'(u_acc0.iter) == exp_iter, $sformatf("iterations %0d expected %0d", u_acc0.iter, exp_iter));
    check(exp_iter > 1, "more than one iteration ran");
    used_bits = 0;
    for (int r = 0; r < 4; r++) used_bits += $countones(u_heap0.u_alloc.used[r]);
    check(used_bits == 0, "heap empty after run");
    check(err[1], "out-of-memory run reports err");
    used_bits = 0;
    for (int r = 0; r < 8; r++) used_bits += $countones(u_heap1.u_alloc.used[r]);
    check(used_bits == 0, "small heap empty after failed run");
    $display("iterations %0d result %0d", exp_iter, exp_result);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
