// tb_dmm_system_full: one complete run of dmm_system at its default parameters
// (four accelerators - Histogram, PCA, MMUL, Kmeans - each on its own
// 1024-word heap, 32-bit freelists, INLINE=1).
//
// All four accelerators are started together. The testbench checks every
// result against the reference models, the number of Kmeans iterations, the
// three histogram bin arrays left in the heap of accelerator 0 (the heap is
// fresh, so first fit places the pixel array at word 0 and the bins right
// after it), that no malloc failed,
// that every freelist is empty at the end, that allocator calls on different
// heaps overlapped in time (INLINE=1) and that no heap saw a conflict (one
// accelerator per heap).
module tb_dmm_system_full;
  import dmm_pkg::*;
  import dmm_ref_pkg::*;

  localparam int NA = 4, NH = 4, HN = 192;

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

  logic [NA-1:0]        start, busy, done, err;
  logic [NA-1:0][31:0]  result;
  logic [NH-1:0]        ev_conflict, ev_serial;

  dmm_system dut (.clk, .rst_n, .start, .busy, .done, .err, .result, .ev_conflict, .ev_serial);

  // allocator activity per heap
  logic [NH-1:0] al_busy;
  assign al_busy = {!dut.g_heap[3].u_heap.u_alloc.cmd_ready, !dut.g_heap[2].u_heap.u_alloc.cmd_ready,
                    !dut.g_heap[1].u_heap.u_alloc.cmd_ready, !dut.g_heap[0].u_heap.u_alloc.cmd_ready};
  int n_overlap = 0, n_conflict = 0, n_serial = 0, n_cycles = 0;
  always @(posedge clk) if (rst_n) begin
    n_cycles++;
    if ($countones(al_busy) > 1) n_overlap++;
    n_conflict += $countones(ev_conflict);
    n_serial   += $countones(ev_serial);
  end

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int used_words(int h);
    int n = 0;
    case (h)
      0: for (int r = 0; r < 32; r++) n += $countones(dut.g_heap[0].u_heap.u_alloc.used[r]);
      1: for (int r = 0; r < 32; r++) n += $countones(dut.g_heap[1].u_heap.u_alloc.used[r]);
      2: for (int r = 0; r < 32; r++) n += $countones(dut.g_heap[2].u_heap.u_alloc.used[r]);
      default: for (int r = 0; r < 32; r++) n += $countones(dut.g_heap[3].u_heap.u_alloc.used[r]);
    endcase
    return n;
  endfunction

  function automatic int bin_word(int h, int addr);
    return (h == 0) ? int'(dut.g_heap[0].u_heap.u_ram.mem[addr])
                    : int'(dut.g_heap[3].u_heap.u_ram.mem[addr]);
  endfunction

  initial begin
    int hbin [3][256];
    int hres, pres, mres, kres, kit, mism;
    bit [NA-1:0] seen;
    hist_model(HN, hbin, hres);
    pres = pca_model(8, 8, 100, 64);
    mres = mmul_model(8, 100);
    kres = kmeans_model(64, 3, 4, 100, 16, kit);
    start = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    start = '1;
    @(posedge clk);
    start = '0;
    seen = '0;
    while (seen != '1) begin
      @(posedge clk);
      seen |= done;
    end
    @(posedge clk);
    check(err == '0, "no malloc failed");
    check(result[0] == 32'(hres), $sformatf("acc0 histogram result %0d", result[0]));
    check(result[1] == 32'(pres), $sformatf("acc1 PCA result %0d expected %0d", result[1], pres));
    check(result[2] == 32'(mres), $sformatf("acc2 MMUL result %0d expected %0d", result[2], mres));
    check(result[3] == 32'(kres), $sformatf("acc3 Kmeans result %0d expected %0d", result[3], kres));
    check(int'(dut.g_acc[3].g_kmeans.u_acc.iter) == kit, $sformatf("acc3 Kmeans iterations, expected %0d", kit));
    foreach (seen[a]) begin
      if (a == 0) begin
        mism = 0;
        for (int c = 0; c < 3; c++)
          for (int v = 0; v < 256; v++)
            if (bin_word(a, HN + 256 * c + v) != hbin[c][v]) mism++;
        check(mism == 0, $sformatf("acc%0d histogram hbin, %0d mismatches", a, mism));
      end
    end
    for (int h = 0; h < NH; h++) check(used_words(h) == 0, $sformatf("heap %0d empty", h));
    check(n_overlap > 0, "allocator calls on different heaps overlapped");
    check(n_conflict == 0, "no conflicts with one accelerator per heap");
    check(n_serial == 0, "no serialisation with INLINE=1");
    $display("cycles %0d, allocator overlap cycles %0d", n_cycles, n_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
