// dmm_system: a many-accelerator system whose accelerators share on-chip memory
// through dynamic memory management (DMM).
//
// Instead of reserving each accelerator's worst-case memory for the whole run
// (static allocation), the block RAM is grouped into NUM_HEAPS heaps, each with
// its own allocator (dmm_heap). Accelerators obtain their arrays at run time
// with malloc/free calls to the heap they are bound to, and reach the heaps
// through an interconnect (dmm_xbar) that arbitrates accelerators sharing a
// heap. More heaps mean fewer accelerators per heap and more parallel memory
// traffic; INLINE=1 also lets allocator calls to different heaps overlap.
//
// Accelerator slot a runs the kernel named by KERNELS[2a+1:2a] (dmm_pkg::
// kernel_e: Histogram, PCA, matrix multiplication or k-means) and is bound to
// heap a mod NUM_HEAPS. The default is four accelerators (Histogram, PCA,
// MMUL, Kmeans) with one heap each, a 32-bit freelist and INLINE=1.
//
// Interface: per accelerator a start pulse and busy, done (pulse), err (a malloc
// failed) and a 32-bit result; per heap two event bits for performance counting
// (see dmm_xbar). The system follows the DMM-HLS many-accelerator structure:
// heaps of BRAM, a DM allocator per heap, the INLINE and freelist-width options,
// one heap per accelerator as the favoured binding. The kernel mix, the binding
// rule and all sizes are this design's choices.
module dmm_system
  import dmm_pkg::*;
#(
  parameter int unsigned NUM_ACC    = 4,
  parameter int unsigned NUM_HEAPS  = 4,
  parameter bit          INLINE     = 1'b1,
  parameter int unsigned FL_WIDTH   = 32,
  parameter int unsigned HEAP_DEPTH = 1024,
  parameter logic [2*NUM_ACC-1:0] KERNELS = {K_KMEANS, K_MMUL, K_PCA, K_HIST},
  parameter int unsigned HIST_N     = 192,
  parameter int unsigned PCA_ROWS   = 8,
  parameter int unsigned PCA_COLS   = 8,
  parameter int unsigned MMUL_DIM   = 8,
  parameter int unsigned KM_NPTS    = 64,
  parameter int unsigned KM_DIM     = 3,
  parameter int unsigned KM_CLUST   = 4,
  parameter int unsigned GRID       = 100
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [NUM_ACC-1:0]         start,
  output logic [NUM_ACC-1:0]         busy,
  output logic [NUM_ACC-1:0]         done,
  output logic [NUM_ACC-1:0]         err,
  output logic [NUM_ACC-1:0][31:0]   result,
  output logic [NUM_HEAPS-1:0]       ev_conflict,
  output logic [NUM_HEAPS-1:0]       ev_serial
);

  logic     [NUM_ACC-1:0]   a_req_valid, a_req_ready, a_rsp_valid;
  dmm_req_t [NUM_ACC-1:0]   a_req;
  dmm_rsp_t [NUM_ACC-1:0]   a_rsp;
  logic     [NUM_HEAPS-1:0] h_req_valid, h_req_ready, h_rsp_valid;
  dmm_req_t [NUM_HEAPS-1:0] h_req;
  dmm_rsp_t [NUM_HEAPS-1:0] h_rsp;

  for (genvar a = 0; a < NUM_ACC; a++) begin : g_acc
    localparam kernel_e     K    = kernel_e'(KERNELS[2*a +: 2]);
    localparam int unsigned HEAP = a % NUM_HEAPS;
    if (K == K_PCA) begin : g_pca
      acc_pca #(.HEAP_ID(HEAP), .ROWS(PCA_ROWS), .COLS(PCA_COLS), .GRID(GRID),
                .N_PCA(PCA_ROWS * PCA_COLS)) u_acc (
        .clk, .rst_n, .start(start[a]), .busy(busy[a]), .done(done[a]), .err(err[a]),
        .result(result[a]), .req_valid(a_req_valid[a]), .req_ready(a_req_ready[a]),
        .req(a_req[a]), .rsp_valid(a_rsp_valid[a]), .rsp(a_rsp[a]));
    end else if (K == K_MMUL) begin : g_mmul
      acc_mmul #(.HEAP_ID(HEAP), .DIM(MMUL_DIM), .GRID(GRID)) u_acc (
        .clk, .rst_n, .start(start[a]), .busy(busy[a]), .done(done[a]), .err(err[a]),
        .result(result[a]), .req_valid(a_req_valid[a]), .req_ready(a_req_ready[a]),
        .req(a_req[a]), .rsp_valid(a_rsp_valid[a]), .rsp(a_rsp[a]));
    end else if (K == K_KMEANS) begin : g_kmeans
      acc_kmeans #(.HEAP_ID(HEAP), .NPTS(KM_NPTS), .DIM(KM_DIM), .NCLUST(KM_CLUST),
                   .GRID(GRID)) u_acc (
        .clk, .rst_n, .start(start[a]), .busy(busy[a]), .done(done[a]), .err(err[a]),
        .result(result[a]), .req_valid(a_req_valid[a]), .req_ready(a_req_ready[a]),
        .req(a_req[a]), .rsp_valid(a_rsp_valid[a]), .rsp(a_rsp[a]));
    end else begin : g_hist
      acc_histogram #(.HEAP_ID(HEAP), .N(HIST_N)) u_acc (
        .clk, .rst_n, .start(start[a]), .busy(busy[a]), .done(done[a]), .err(err[a]),
        .result(result[a]), .req_valid(a_req_valid[a]), .req_ready(a_req_ready[a]),
        .req(a_req[a]), .rsp_valid(a_rsp_valid[a]), .rsp(a_rsp[a]));
    end
  end

  dmm_xbar #(.NUM_ACC(NUM_ACC), .NUM_HEAPS(NUM_HEAPS), .INLINE(INLINE)) u_xbar (
    .clk, .rst_n,
    .acc_req_valid (a_req_valid),
    .acc_req_ready (a_req_ready),
    .acc_req       (a_req),
    .acc_rsp_valid (a_rsp_valid),
    .acc_rsp       (a_rsp),
    .heap_req_valid(h_req_valid),
    .heap_req_ready(h_req_ready),
    .heap_req      (h_req),
    .heap_rsp_valid(h_rsp_valid),
    .heap_rsp      (h_rsp),
    .ev_conflict,
    .ev_serial
  );

  for (genvar h = 0; h < NUM_HEAPS; h++) begin : g_heap
    dmm_heap #(.DEPTH(HEAP_DEPTH), .FL_WIDTH(FL_WIDTH)) u_heap (
      .clk, .rst_n,
      .req_valid(h_req_valid[h]),
      .req_ready(h_req_ready[h]),
      .req      (h_req[h]),
      .rsp_valid(h_rsp_valid[h]),
      .rsp      (h_rsp[h])
    );
  end

endmodule
