// dmm_pkg: types and constants shared by the dynamic-memory-management (DMM)
// many-accelerator system.
//
// Every accelerator talks to the heaps through one request/response channel.
// A request carries one of four operations: a data read or write of one heap
// word, or an allocator call (HlsMalloc / HlsFree). An accelerator keeps at
// most one request outstanding, the way a blocking function call would, so a
// response needs no tag. Word and field widths are this design's choice: the
// heap word is 32 bits (the kernels work on int data) and heap word addresses
// are 16 bits wide, enough for heaps of up to 65536 words.
package dmm_pkg;

  localparam int unsigned DATA_W     = 32;  // heap word length in bits
  localparam int unsigned WORD_BYTES = DATA_W / 8;
  localparam int unsigned ADDR_W     = 16;  // heap word address / pointer width
  localparam int unsigned HEAP_ID_W  = 4;   // up to 16 heaps

  typedef enum logic [1:0] {
    OP_READ   = 2'd0,  // data = heap[addr]
    OP_WRITE  = 2'd1,  // heap[addr] = data
    OP_MALLOC = 2'd2,  // allocate data bytes; response data = word pointer
    OP_FREE   = 2'd3   // free the allocation that starts at addr
  } dmm_op_e;

  typedef struct packed {
    dmm_op_e                op;
    logic [HEAP_ID_W-1:0]   heap;  // heap_id argument
    logic [ADDR_W-1:0]      addr;  // word address, or pointer to free
    logic [DATA_W-1:0]      data;  // write data, or size in bytes for malloc
  } dmm_req_t;

  typedef struct packed {
    logic                   ok;    // 0: malloc found no room / bad free / bad address
    logic [DATA_W-1:0]      data;  // read data, or the pointer malloc returns
  } dmm_rsp_t;

  // Kernel placed in an accelerator slot of the system (dmm_system).
  typedef enum logic [1:0] {
    K_HIST   = 2'd0,  // Histogram
    K_PCA    = 2'd1,  // PCA
    K_MMUL   = 2'd2,  // matrix multiplication
    K_KMEANS = 2'd3   // k-means clustering
  } kernel_e;

  function automatic logic is_alloc_op(dmm_op_e op);
    return (op == OP_MALLOC) || (op == OP_FREE);
  endfunction

endpackage
