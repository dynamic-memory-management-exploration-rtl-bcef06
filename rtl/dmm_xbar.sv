// dmm_xbar: the interconnect between NUM_ACC accelerators and NUM_HEAPS heaps.
//
// Each accelerator has one request channel and keeps one request outstanding.
// The request's heap field picks the heap. Each heap has a round-robin arbiter
// over the accelerators that want it: it grants one request when the heap has
// nothing outstanding and is ready, remembers the owner, and sends the heap's
// response back to that owner. Accelerators that share a heap therefore wait
// for one another (memory access conflicts); accelerators on different heaps
// proceed in parallel.
//
// INLINE selects how allocator calls (OP_MALLOC/OP_FREE) may overlap:
//   INLINE=1  every heap runs its allocator calls independently;
//   INLINE=0  one allocator call at a time in the whole system, even when the
//             calls go to different heaps; a call to a higher-numbered heap
//             yields to one to a lower-numbered heap in the same cycle.
// Data reads and writes are never serialised across heaps.
//
// Event outputs (one bit per heap and cycle) are for performance counting:
// ev_conflict[h] - a request for heap h waits because another accelerator holds
//                  or wins heap h; ev_serial[h] - an allocator call for heap h
//                  waits only because INLINE=0 lets one call run at a time.
//
// The heaps, the sharing of a heap by several accelerators and the INLINE option
// (whether calls to different heaps may run at once) follow the DMM-HLS system.
// Round-robin arbitration, the serialisation rule for INLINE=0 and the event
// outputs are this design's own choices.
module dmm_xbar
  import dmm_pkg::*;
#(
  parameter int unsigned NUM_ACC   = 4,
  parameter int unsigned NUM_HEAPS = 4,
  parameter bit          INLINE    = 1'b1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // accelerator side
  input  logic     [NUM_ACC-1:0]   acc_req_valid,
  output logic     [NUM_ACC-1:0]   acc_req_ready,
  input  dmm_req_t [NUM_ACC-1:0]   acc_req,
  output logic     [NUM_ACC-1:0]   acc_rsp_valid,
  output dmm_rsp_t [NUM_ACC-1:0]   acc_rsp,
  // heap side
  output logic     [NUM_HEAPS-1:0] heap_req_valid,
  input  logic     [NUM_HEAPS-1:0] heap_req_ready,
  output dmm_req_t [NUM_HEAPS-1:0] heap_req,
  input  logic     [NUM_HEAPS-1:0] heap_rsp_valid,
  input  dmm_rsp_t [NUM_HEAPS-1:0] heap_rsp,
  // performance events
  output logic     [NUM_HEAPS-1:0] ev_conflict,
  output logic     [NUM_HEAPS-1:0] ev_serial
);

  localparam int unsigned AIW = (NUM_ACC > 1) ? $clog2(NUM_ACC) : 1;

  logic [NUM_HEAPS-1:0] busy;                 // heap has a request outstanding
  logic [AIW-1:0]       owner [NUM_HEAPS];
  logic [AIW-1:0]       rr    [NUM_HEAPS];    // last granted accelerator
  logic                 lock;                 // INLINE=0: an allocator call is running
  logic [NUM_HEAPS-1:0] grant_v;
  logic [AIW-1:0]       grant_a [NUM_HEAPS];
  logic [NUM_HEAPS-1:0] grant_alloc;

  always_comb begin
    automatic logic taken;
    automatic logic want, allowed;
    automatic int   a;
    automatic int   nwant;
    taken       = lock;
    grant_v     = '0;
    grant_alloc = '0;
    ev_conflict = '0;
    ev_serial   = '0;
    for (int h = 0; h < NUM_HEAPS; h++) begin
      grant_a[h] = '0;
      nwant      = 0;
      for (int k = 1; k <= NUM_ACC; k++) begin
        a       = (int'(rr[h]) + k) % NUM_ACC;
        want    = acc_req_valid[a] && (int'(acc_req[a].heap) == h);
        allowed = INLINE || !is_alloc_op(acc_req[a].op) || !taken;
        if (want) nwant++;
        if (want && !allowed && !busy[h] && heap_req_ready[h]) ev_serial[h] = 1'b1;
        if (want && allowed && !grant_v[h] && !busy[h] && heap_req_ready[h]) begin
          grant_v[h]     = 1'b1;
          grant_a[h]     = AIW'(a);
          grant_alloc[h] = is_alloc_op(acc_req[a].op);
        end
      end
      if (!INLINE && grant_alloc[h]) taken = 1'b1;
      if ((nwant > 0 && busy[h]) || nwant > 1) ev_conflict[h] = 1'b1;
    end
  end

  always_comb begin
    acc_req_ready = '0;
    for (int h = 0; h < NUM_HEAPS; h++) begin
      heap_req_valid[h] = grant_v[h];
      heap_req[h]       = acc_req[grant_a[h]];
      if (grant_v[h]) acc_req_ready[grant_a[h]] = 1'b1;
    end
  end

  always_comb begin
    acc_rsp_valid = '0;
    for (int a = 0; a < NUM_ACC; a++) acc_rsp[a] = '0;
    for (int h = 0; h < NUM_HEAPS; h++) begin
      if (busy[h] && heap_rsp_valid[h]) begin
        acc_rsp_valid[owner[h]] = 1'b1;
        acc_rsp[owner[h]]       = heap_rsp[h];
      end
    end
  end

  // The running allocator call that holds the lock finishes when its heap
  // answers a request that was an allocator call.
  logic [NUM_HEAPS-1:0] busy_alloc;
  logic                 lock_release;
  always_comb begin
    lock_release = 1'b0;
    for (int h = 0; h < NUM_HEAPS; h++)
      if (busy[h] && busy_alloc[h] && heap_rsp_valid[h]) lock_release = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= '0;
      busy_alloc <= '0;
      lock       <= 1'b0;
      for (int h = 0; h < NUM_HEAPS; h++) begin
        owner[h] <= '0;
        rr[h]    <= AIW'(NUM_ACC - 1);
      end
    end else begin
      for (int h = 0; h < NUM_HEAPS; h++) begin
        if (grant_v[h]) begin
          busy[h]       <= 1'b1;
          busy_alloc[h] <= grant_alloc[h];
          owner[h]      <= grant_a[h];
          rr[h]         <= grant_a[h];
        end else if (heap_rsp_valid[h]) begin
          busy[h]       <= 1'b0;
          busy_alloc[h] <= 1'b0;
        end
      end
      if (!INLINE) begin
        if (|grant_alloc)      lock <= 1'b1;
        else if (lock_release) lock <= 1'b0;
      end
    end
  end

  // A heap answers only what it was given, and a granted request is held until
  // it is answered.
  for (genvar h = 0; h < NUM_HEAPS; h++) begin : g_chk
    a_rsp_owned: assert property (@(posedge clk) disable iff (!rst_n)
      heap_rsp_valid[h] |-> busy[h]);
    a_no_regrant: assert property (@(posedge clk) disable iff (!rst_n)
      busy[h] |-> !grant_v[h]);
  end
  if (!INLINE) begin : g_serial_chk
    a_one_alloc: assert property (@(posedge clk) disable iff (!rst_n)
      $countones(grant_alloc) <= 1);
  end

endmodule
