// tb_dmm_heap: checks one heap (RAM plus allocator) through its request channel.
// Data writes and reads against a model, with the one-cycle response; reads
// and writes outside the heap answer ok=0; malloc returns first-fit pointers
// with the allocator's latency and holds req_ready low meanwhile; allocated
// memory keeps its data; free of a live block succeeds and of a free word fails.
module tb_dmm_heap;
  import dmm_pkg::*;
  localparam int DEPTH = 512;

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

  logic     req_valid, req_ready, rsp_valid;
  dmm_req_t req;
  dmm_rsp_t rsp;
  int       ready_low;

  dmm_heap #(.DEPTH(DEPTH), .FL_WIDTH(32)) dut (.clk, .rst_n, .req_valid, .req_ready, .req,
                                               .rsp_valid, .rsp);

  // send one request, return the response and the edges it took
  task automatic call(dmm_op_e op, int addr, int data, output dmm_rsp_t r, output int lat);
    @(negedge clk);
    req_valid = 1'b1;
    req.op = op; req.heap = '0; req.addr = ADDR_W'(addr); req.data = 32'(data);
    while (!req_ready) begin @(negedge clk); end
    @(posedge clk); #1;
    req_valid = 1'b0;
    lat = 1;
    ready_low = 0;
    while (!rsp_valid) begin
      if (!req_ready) ready_low++;
      @(posedge clk); #1;
      lat++;
    end
    r = rsp;
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dmm_rsp_t r;
    int lat, p0, p1, p2;
    logic [31:0] model [64];
    req_valid = 0; req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // data path
    for (int a = 0; a < 64; a++) begin
      model[a] = $urandom;
      call(OP_WRITE, a * 7, int'(model[a]), r, lat);
      check(r.ok && lat == 1, $sformatf("write %0d ok/latency %0d", a, lat));
    end
    for (int a = 0; a < 64; a++) begin
      call(OP_READ, a * 7, 0, r, lat);
      check(r.ok && r.data == model[a] && lat == 1, $sformatf("read %0d", a));
    end
    call(OP_READ, DEPTH + 3, 0, r, lat);
    check(!r.ok, "read outside heap fails");
    call(OP_WRITE, DEPTH, 5, r, lat);
    check(!r.ok, "write outside heap fails");
    // allocator path
    call(OP_MALLOC, 0, 40, r, lat);           // 10 words
    p0 = int'(r.data);
    check(r.ok && p0 == 0, "malloc 40 bytes at 0");
    check(lat == 3, $sformatf("malloc latency %0d, expected 3 (accept + scan + mark)", lat));
    check(ready_low > 0, "req_ready low while the allocator works");
    call(OP_MALLOC, 0, 200, r, lat);          // 50 words at 10: ends in row 1
    p1 = int'(r.data);
    check(r.ok && p1 == 10, "malloc 200 bytes at 10");
    check(lat == 1 + 2 + 2, $sformatf("two-row malloc latency %0d", lat));
    call(OP_MALLOC, 0, 4 * DEPTH, r, lat);    // does not fit any more
    check(!r.ok, "malloc of the whole heap fails when partly used");
    call(OP_WRITE, p1 + 49, 32'h1234, r, lat);
    call(OP_FREE, p0, 0, r, lat);
    check(r.ok, "free first block");
    call(OP_FREE, p0, 0, r, lat);
    check(!r.ok, "double free fails");
    call(OP_MALLOC, 0, 36, r, lat);           // 9 words fit in the 10-word hole
    p2 = int'(r.data);
    check(r.ok && p2 == 0, "first fit reuses the hole");
    call(OP_READ, p1 + 49, 0, r, lat);
    check(r.ok && r.data == 32'h1234, "allocated data kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
