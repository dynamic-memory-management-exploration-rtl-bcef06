// dmm_heap: one memory heap of the DMM system, a block-RAM bank with its own
// dynamic-memory allocator.
//
// Requests arrive on one channel (dmm_pkg::dmm_req_t with a valid/ready
// handshake) and each gets exactly one response (rsp_valid for one cycle).
// OP_READ and OP_WRITE go to the RAM and answer on the next cycle; an address
// outside the heap answers ok=0 and leaves the RAM alone. OP_MALLOC and OP_FREE
// go to the allocator (dmm_allocator) and answer when it finishes; the heap
// accepts nothing else meanwhile. The pointer malloc returns is a word address
// inside this heap. Because every heap has its own allocator, calls to
// different heaps run in parallel; this follows the DMM-HLS structure of one DM
// allocator per heap. The request format and timing are this design's.
module dmm_heap
  import dmm_pkg::*;
#(
  parameter int unsigned DEPTH    = 1024,  // heap words
  parameter int unsigned FL_WIDTH = 32     // freelist width in bits
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     req_valid,
  output logic     req_ready,
  input  dmm_req_t req,
  output logic     rsp_valid,
  output dmm_rsp_t rsp
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic          al_valid, al_ready, al_done, al_ok;
  logic [AW-1:0] al_ptr;
  logic          alloc_busy;
  logic          mem_pend, mem_ok;
  logic          accept, in_range;
  logic [DATA_W-1:0] ram_rdata;

  assign req_ready = al_ready && !alloc_busy;
  assign accept    = req_valid && req_ready;
  assign in_range  = 32'(req.addr) < DEPTH;
  assign al_valid  = accept && is_alloc_op(req.op);

  dmm_allocator #(.DEPTH(DEPTH), .FL_WIDTH(FL_WIDTH), .WORD_BYTES(WORD_BYTES)) u_alloc (
    .clk, .rst_n,
    .cmd_valid (al_valid),
    .cmd_ready (al_ready),
    .cmd_malloc(req.op == OP_MALLOC),
    .cmd_bytes (req.data),
    .cmd_ptr   (AW'(req.addr)),
    .done_valid(al_done),
    .done_ok   (al_ok),
    .done_ptr  (al_ptr)
  );

  heap_ram #(.DEPTH(DEPTH), .WIDTH(DATA_W)) u_ram (
    .clk,
    .en   (accept && !is_alloc_op(req.op) && in_range),
    .we   (req.op == OP_WRITE),
    .addr (AW'(req.addr)),
    .wdata(req.data),
    .rdata(ram_rdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      alloc_busy <= 1'b0;
      mem_pend   <= 1'b0;
      mem_ok     <= 1'b0;
    end else begin
      mem_pend <= accept && !is_alloc_op(req.op);
      mem_ok   <= in_range;
      if (al_valid)     alloc_busy <= 1'b1;
      else if (al_done) alloc_busy <= 1'b0;
    end
  end

  assign rsp_valid = mem_pend || al_done;
  always_comb begin
    if (al_done) begin
      rsp.ok   = al_ok;
      rsp.data = DATA_W'(al_ptr);
    end else begin
      rsp.ok   = mem_ok;
      rsp.data = mem_ok ? ram_rdata : '0;
    end
  end

endmodule
