// tb_dmm_allocator: checks the first-fit freelist allocator against a software
// model, for a 32-bit and an 8-bit freelist.
//
// Both allocators receive the same sequence: directed cases (exact fit,
// word padding, first fit skipping a hole that is too small, zero size,
// oversize, free of an unallocated word, filling the heap) and then random
// malloc/free traffic. For every command the returned pointer and ok flag are
// compared with the model, and the latency with the schedule the allocator
// promises: SCAN one freelist row per cycle up to the row where the run is
// complete, then MARK one row per cycle; a failing search scans every row; a
// free clears one row per cycle.
module tb_dmm_allocator;
  localparam int DEPTH = 256;

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

  logic        cmd_valid, cmd_malloc;
  logic [31:0] cmd_bytes;
  logic [7:0]  cmd_ptr;
  logic [1:0]  rdy, dv, dok;
  logic [7:0]  dptr [2];

  dmm_allocator #(.DEPTH(DEPTH), .FL_WIDTH(32)) u_w32 (
    .clk, .rst_n, .cmd_valid, .cmd_ready(rdy[0]), .cmd_malloc, .cmd_bytes, .cmd_ptr,
    .done_valid(dv[0]), .done_ok(dok[0]), .done_ptr(dptr[0]));
  dmm_allocator #(.DEPTH(DEPTH), .FL_WIDTH(8)) u_w8 (
    .clk, .rst_n, .cmd_valid, .cmd_ready(rdy[1]), .cmd_malloc, .cmd_bytes, .cmd_ptr,
    .done_valid(dv[1]), .done_ok(dok[1]), .done_ptr(dptr[1]));

  // ---- model ----
  bit model_used [DEPTH];
  int model_len  [DEPTH];   // length of the allocation starting here, 0 if none
  int widths [2] = '{32, 8};

  function automatic int first_fit(int n);
    int run = 0;
    for (int p = 0; p < DEPTH; p++) begin
      if (!model_used[p]) begin
        run++;
        if (run == n) return p - n + 1;
      end else run = 0;
    end
    return -1;
  endfunction

  task automatic issue(bit is_malloc, int bytes, int ptr, output int lat [2],
                       output bit ok [2], output int rp [2]);
    bit seen [2];
    int cyc;
    @(negedge clk);
    cmd_valid  = 1'b1;
    cmd_malloc = is_malloc;
    cmd_bytes  = 32'(bytes);
    cmd_ptr    = 8'(ptr);
    @(posedge clk);
    #1;
    cmd_valid = 1'b0;
    seen = '{0, 0};
    cyc  = 0;
    while (!(seen[0] && seen[1]) && cyc < 1000) begin
      for (int u = 0; u < 2; u++)
        if (!seen[u] && dv[u]) begin
          seen[u] = 1; lat[u] = cyc; ok[u] = dok[u]; rp[u] = int'(dptr[u]);
        end
      if (seen[0] && seen[1]) break;
      @(posedge clk);
      #1;
      cyc++;
    end
  endtask

  task automatic do_malloc(int bytes);
    int lat [2], rp [2];
    bit ok [2];
    int n, s, e;
    n = (bytes + 3) / 4;
    s = (n == 0 || n > DEPTH) ? -1 : first_fit(n);
    issue(1'b1, bytes, 0, lat, ok, rp);
    for (int u = 0; u < 2; u++) begin
      int w = widths[u];
      int exp_lat;
      if (n == 0 || n > DEPTH) exp_lat = 0;
      else if (s < 0) exp_lat = DEPTH / w;
      else begin
        e = s + n - 1;
        exp_lat = (e / w + 1) + (e / w - s / w + 1);
      end
      check(ok[u] == (s >= 0), $sformatf("w%0d malloc(%0d) ok=%0d", w, bytes, ok[u]));
      if (s >= 0) check(rp[u] == s, $sformatf("w%0d malloc(%0d) ptr %0d exp %0d", w, bytes, rp[u], s));
      check(lat[u] == exp_lat,
            $sformatf("w%0d malloc(%0d) latency %0d exp %0d", w, bytes, lat[u], exp_lat));
    end
    if (s >= 0) begin
      for (int p = s; p < s + n; p++) model_used[p] = 1;
      model_len[s] = n;
    end
  endtask

  task automatic do_free(int ptr);
    int lat [2], rp [2];
    bit ok [2];
    bit exp_ok;
    exp_ok = (ptr < DEPTH) && model_len[ptr] > 0;
    issue(1'b0, 0, ptr, lat, ok, rp);
    for (int u = 0; u < 2; u++) begin
      int w = widths[u];
      int exp_lat = exp_ok ? ((ptr + model_len[ptr] - 1) / w - ptr / w + 1) : 0;
      check(ok[u] == exp_ok, $sformatf("w%0d free(%0d) ok", w, ptr));
      check(lat[u] == exp_lat, $sformatf("w%0d free(%0d) latency %0d exp %0d", w, ptr, lat[u], exp_lat));
    end
    if (exp_ok) begin
      for (int p = ptr; p < ptr + model_len[ptr]; p++) model_used[p] = 0;
      model_len[ptr] = 0;
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int live [$];
    cmd_valid = 1'b0; cmd_malloc = 1'b0; cmd_bytes = '0; cmd_ptr = '0;
    for (int p = 0; p < DEPTH; p++) begin model_used[p] = 0; model_len[p] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    // directed
    do_malloc(100);          // 25 words at 0
    do_malloc(4);            // 1 word at 25
    do_malloc(1);            // padded to 1 word at 26
    do_free(0);              // hole of 25 words at 0
    do_malloc(80);           // 20 words: first fit into the hole
    do_malloc(24);           // 6 words: the 5-word hole is skipped
    do_malloc(0);            // zero size fails
    do_malloc(DEPTH * 4 + 4);// oversize fails
    do_free(200);            // not allocated
    do_malloc(220 * 4);      // larger than any free run: full scan, fails
    do_malloc(200 * 4);      // fits after the allocations so far
    do_free(0); do_free(25); do_free(26); do_free(33);
    // free whatever is still live
    for (int p = 0; p < DEPTH; p++) if (model_len[p] > 0) do_free(p);
    // random traffic
    for (int t = 0; t < 300; t++) begin
      if (($urandom % 3 != 0) || live.size() == 0) begin
        int bytes = 1 + int'($urandom % 160);
        int n = (bytes + 3) / 4;
        int s = first_fit(n);
        do_malloc(bytes);
        if (s >= 0) live.push_back(s);
      end else begin
        int idx = int'($urandom % live.size());
        do_free(live[idx]);
        live.delete(idx);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
