// tb_dmm_system: end-to-end test of the DMM many-accelerator system in two
// configurations that run side by side.
//
//   u_sep:    four accelerators (Histogram, PCA, MMUL, Kmeans), one heap
//             each, 8-bit freelists, INLINE=1. Allocator calls to different
//             heaps must overlap in time.
//   u_shared: the same four accelerators on two heaps (0 and 2 share heap 0,
//             1 and 3 share heap 1), 64-bit freelists, INLINE=0. Heap 0 is
//             too small for the Histogram and MMUL arrays at once, so one of
//             the two must see a failed malloc (out of memory),
//             free what it held and report err; it is then started again
//             after its partner has finished and must now succeed. PCA and
//             Kmeans fit in heap 1 together and must both succeed. Sharing
//             makes requests wait for one another (conflicts), and INLINE=0
//             makes allocator calls to different heaps wait (serialisation).
//
// Each mechanism is counted and a failure is counted for any that never
// happened: allocator overlap, conflict, serialisation, out of memory, retry
// after out of memory, malloc and free. Every result is compared with the
// reference models, and every freelist must be empty at the end.
module tb_dmm_system;
  import dmm_pkg::*;
  import dmm_ref_pkg::*;

  localparam int NA = 4;

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

  logic [NA-1:0]       s_start, s_busy, s_done, s_err;
  logic [NA-1:0][31:0] s_result;
  logic [3:0]          s_evc, s_evs;
  logic [NA-1:0]       h_start, h_busy, h_done, h_err;
  logic [NA-1:0][31:0] h_result;
  logic [1:0]          h_evc, h_evs;

  dmm_system #(.FL_WIDTH(8)) u_sep (
    .clk, .rst_n, .start(s_start), .busy(s_busy), .done(s_done), .err(s_err),
    .result(s_result), .ev_conflict(s_evc), .ev_serial(s_evs));
  dmm_system #(.NUM_HEAPS(2), .INLINE(1'b0), .FL_WIDTH(64)) u_shared (
    .clk, .rst_n, .start(h_start), .busy(h_busy), .done(h_done), .err(h_err),
    .result(h_result), .ev_conflict(h_evc), .ev_serial(h_evs));

  // ---- mechanism counters ----
  logic [3:0] sep_al_busy;
  assign sep_al_busy = {!u_sep.g_heap[3].u_heap.u_alloc.cmd_ready, !u_sep.g_heap[2].u_heap.u_alloc.cmd_ready,
                        !u_sep.g_heap[1].u_heap.u_alloc.cmd_ready, !u_sep.g_heap[0].u_heap.u_alloc.cmd_ready};
  int n_overlap = 0, n_conflict = 0, n_serial = 0, n_oom = 0, n_retry_ok = 0;
  int n_malloc = 0, n_free = 0, n_sep_conflict = 0, n_sep_serial = 0;
  always @(posedge clk) if (rst_n) begin
    if ($countones(sep_al_busy) > 1) n_overlap++;
    n_conflict     += $countones(h_evc);
    n_serial       += $countones(h_evs);
    n_sep_conflict += $countones(s_evc);
    n_sep_serial   += $countones(s_evs);
    n_oom          += $countones(h_done & h_err);
    for (int h = 0; h < 2; h++)
      if (u_shared.h_req_valid[h] && u_shared.h_req_ready[h]) begin
        if (u_shared.h_req[h].op == OP_MALLOC) n_malloc++;
        if (u_shared.h_req[h].op == OP_FREE)   n_free++;
      end
  end

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sep_used();
    int n = 0;
    for (int r = 0; r < 128; r++)
      n += $countones(u_sep.g_heap[0].u_heap.u_alloc.used[r]) + $countones(u_sep.g_heap[1].u_heap.u_alloc.used[r])
         + $countones(u_sep.g_heap[2].u_heap.u_alloc.used[r]) + $countones(u_sep.g_heap[3].u_heap.u_alloc.used[r]);
    return n;
  endfunction

  function automatic int shared_used();
    int n = 0;
    for (int r = 0; r < 16; r++)
      n += $countones(u_shared.g_heap[0].u_heap.u_alloc.used[r])
         + $countones(u_shared.g_heap[1].u_heap.u_alloc.used[r]);
    return n;
  endfunction

  int expect_res [NA];

  task automatic check_results(string who, logic [NA-1:0][31:0] res, logic [NA-1:0] mask);
    for (int a = 0; a < NA; a++)
      if (mask[a])
        check(res[a] == 32'(expect_res[a]),
              $sformatf("%s acc%0d result %0d expected %0d", who, a, res[a], expect_res[a]));
  endtask

  initial begin
    int hbin [3][256];
    int hres, kit;
    logic [NA-1:0] s_seen, h_seen, h_fail, h_ok;
    hist_model(192, hbin, hres);
    expect_res = '{hres, pca_model(8, 8, 100, 64), mmul_model(8, 100), kmeans_model(64, 3, 4, 100, 16, kit)};
    s_start = '0;
    h_start = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    s_start = '1;
    h_start = '1;
    @(posedge clk);
    s_start = '0;
    h_start = '0;
    s_seen = '0; h_seen = '0; h_fail = '0; h_ok = '0;
    while (s_seen != '1 || h_seen != '1) begin
      @(posedge clk);
      s_seen |= s_done;
      h_seen |= h_done;
      h_fail |= h_done & h_err;
      h_ok   |= h_done & ~h_err;
      for (int a = 0; a < NA; a++)
        if (h_done[a] && !h_err[a])
          check(h_result[a] == 32'(expect_res[a]),
                $sformatf("shared acc%0d result %0d expected %0d", a, h_result[a], expect_res[a]));
    end
    @(posedge clk);
    // separate heaps: everything succeeds
    check(s_err == '0, "separate heaps: no malloc failed");
    check_results("separate", s_result, '1);
    check(sep_used() == 0, "separate heaps: freelists empty");
    check(n_sep_conflict == 0 && n_sep_serial == 0, "separate heaps: no conflict, no serialisation");
    // shared heaps: heap 0 ran out of memory, heap 1 did not
    check(h_fail[0] ^ h_fail[2], $sformatf("heap 0: one of acc0/acc2 out of memory (fail=%b)", h_fail));
    check(!h_fail[1] && !h_fail[3], $sformatf("heap 1: acc1/acc3 fit together (fail=%b)", h_fail));
    check(shared_used() == 0, "shared heaps: freelists empty after the first round");
    // retry the ones that failed, now that their partners are done
    h_start = h_fail;
    @(posedge clk);
    h_start = '0;
    h_seen = '0;
    while (h_seen != h_fail) begin
      @(posedge clk);
      h_seen |= h_done;
      for (int a = 0; a < NA; a++)
        if (h_done[a]) begin
          check(!h_err[a], $sformatf("retry of acc%0d succeeds", a));
          if (!h_err[a]) n_retry_ok++;
        end
    end
    @(posedge clk);
    check_results("shared retry", h_result, h_fail);
    check(shared_used() == 0, "shared heaps: freelists empty at the end");
    // every mechanism happened
    check(n_overlap > 0,  $sformatf("INLINE=1 allocator overlap seen (%0d cycles)", n_overlap));
    check(n_conflict > 0, $sformatf("heap conflicts seen (%0d)", n_conflict));
    check(n_serial > 0,   $sformatf("INLINE=0 serialisation seen (%0d)", n_serial));
    check(n_oom > 0,      $sformatf("out of memory seen (%0d)", n_oom));
    check(n_retry_ok > 0, $sformatf("retry after out of memory succeeded (%0d)", n_retry_ok));
    check(n_malloc > 0 && n_free > 0, $sformatf("malloc %0d / free %0d calls seen", n_malloc, n_free));
    $display("overlap %0d conflict %0d serial %0d oom %0d retry %0d malloc %0d free %0d",
             n_overlap, n_conflict, n_serial, n_oom, n_retry_ok, n_malloc, n_free);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
