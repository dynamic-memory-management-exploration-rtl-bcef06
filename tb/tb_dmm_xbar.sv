// tb_dmm_xbar: checks the accelerator-to-heap interconnect with real heaps.
//
// Two systems of 4 accelerator ports and 2 heaps (accelerator a uses heap
// a mod 2) are driven identically, one with INLINE=1 and one with INLINE=0.
// Phase 1: all four ports write and read back their own words at once; the data
// must come back to the right port, and the two ports sharing a heap must
// cause conflict events. Phase 2: ports 0 and 1 call malloc on heaps 0 and 1 in
// the same cycle. With INLINE=1 both are accepted in that cycle; with INLINE=0
// the second is accepted only after the first has been answered, and a
// serialisation event is seen.
module tb_dmm_xbar;
  import dmm_pkg::*;

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

  logic     [3:0] a_rv [2], a_rr [2], a_sv [2];
  dmm_req_t [3:0] a_rq [2];
  dmm_rsp_t [3:0] a_rs [2];
  logic     [1:0] h_rv [2], h_rr [2], h_sv [2], evc [2], evs [2];
  dmm_req_t [1:0] h_rq [2];
  dmm_rsp_t [1:0] h_rs [2];

  for (genvar s = 0; s < 2; s++) begin : g_sys
    dmm_xbar #(.NUM_ACC(4), .NUM_HEAPS(2), .INLINE(s == 0)) u_xbar (
      .clk, .rst_n,
      .acc_req_valid(a_rv[s]), .acc_req_ready(a_rr[s]), .acc_req(a_rq[s]),
      .acc_rsp_valid(a_sv[s]), .acc_rsp(a_rs[s]),
      .heap_req_valid(h_rv[s]), .heap_req_ready(h_rr[s]), .heap_req(h_rq[s]),
      .heap_rsp_valid(h_sv[s]), .heap_rsp(h_rs[s]),
      .ev_conflict(evc[s]), .ev_serial(evs[s]));
    for (genvar h = 0; h < 2; h++) begin : g_heap
      dmm_heap #(.DEPTH(256), .FL_WIDTH(8)) u_heap (
        .clk, .rst_n, .req_valid(h_rv[s][h]), .req_ready(h_rr[s][h]), .req(h_rq[s][h]),
        .rsp_valid(h_sv[s][h]), .rsp(h_rs[s][h]));
    end
  end

  int n_conflict [2], n_serial [2];
  always @(posedge clk) if (rst_n) for (int s = 0; s < 2; s++) begin
    n_conflict[s] += $countones(evc[s]);
    n_serial[s]   += $countones(evs[s]);
  end

  longint t_acc [2][4], t_rsp [2][4];
  dmm_rsp_t last_rsp [2][4];

  task automatic call(int s, int a, dmm_op_e op, int addr, int data);
    @(negedge clk);
    a_rv[s][a] = 1'b1;
    a_rq[s][a].op = op; a_rq[s][a].heap = HEAP_ID_W'(a % 2);
    a_rq[s][a].addr = ADDR_W'(addr); a_rq[s][a].data = 32'(data);
    @(posedge clk);
    while (!a_rr[s][a]) @(posedge clk);
    t_acc[s][a] = longint'($time);
    #1 a_rv[s][a] = 1'b0;
    while (!a_sv[s][a]) begin @(posedge clk); #1; end
    t_rsp[s][a] = longint'($time);
    last_rsp[s][a] = a_rs[s][a];
  endtask

  task automatic port_traffic(int s, int a);
    for (int w = 0; w < 8; w++) call(s, a, OP_WRITE, 16 * a + w, 1000 * a + w);
    for (int w = 0; w < 8; w++) begin
      call(s, a, OP_READ, 16 * a + w, 0);
      check(last_rsp[s][a].ok && last_rsp[s][a].data == 32'(1000 * a + w),
            $sformatf("sys %0d port %0d word %0d read back %0d", s, a, w, last_rsp[s][a].data));
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 2; s++) begin
      a_rv[s] = '0; a_rq[s] = '0; n_conflict[s] = 0; n_serial[s] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // phase 1: concurrent data traffic
    for (int s = 0; s < 2; s++) begin
      fork
        port_traffic(s, 0);
        port_traffic(s, 1);
        port_traffic(s, 2);
        port_traffic(s, 3);
      join
      check(n_conflict[s] > 0, $sformatf("sys %0d: conflicts seen on shared heaps", s));
    end
    // phase 2: two mallocs on different heaps in the same cycle
    for (int s = 0; s < 2; s++) begin
      fork
        call(s, 0, OP_MALLOC, 0, 4 * 100);
        call(s, 1, OP_MALLOC, 0, 4 * 100);
      join
      check(last_rsp[s][0].ok && last_rsp[s][1].ok, $sformatf("sys %0d mallocs ok", s));
      check(last_rsp[s][0].data == 32'd0 && last_rsp[s][1].data == 32'd0,
            $sformatf("sys %0d malloc pointers %0d %0d", s, last_rsp[s][0].data, last_rsp[s][1].data));
    end
    check(t_acc[0][0] == t_acc[0][1], "INLINE=1: both allocator calls accepted together");
    check(t_acc[1][1] >= t_rsp[1][0] || t_acc[1][0] >= t_rsp[1][1],
          "INLINE=0: allocator calls to different heaps do not overlap");
    check(n_serial[1] > 0, "INLINE=0: serialisation event seen");
    check(n_serial[0] == 0, "INLINE=1: no serialisation event");
    $display("conflicts %0d/%0d serial %0d/%0d", n_conflict[0], n_conflict[1], n_serial[0], n_serial[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
