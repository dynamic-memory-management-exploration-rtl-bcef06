// acc_kmeans: k-means clustering accelerator that keeps its arrays in a DMM heap.
//
// It classifies NPTS random points of DIM integer coordinates into NCLUST
// groups. Three arrays are obtained from heap HEAP_ID with HlsMalloc: the
// points (NPTS*DIM words), the cluster means (NCLUST*DIM) and the cluster of
// each point (NPTS). Steps:
//   1. every coordinate = RandMinMaxSyn(1, GRID), point by point;
//   2. the means start as the first NCLUST points; every cluster entry starts
//      as NCLUST (no cluster);
//   3. one iteration: each point goes to the nearest mean (squared Euclidean
//      distance, ties to the lower cluster); a point that changes cluster sets
//      `modified`; the coordinate sums and member counts of each cluster are
//      gathered in registers; then each mean with members becomes sum/count
//      (integer division) and a mean without members stays;
//   4. iterations repeat while a point changed cluster, at most MAX_ITER times;
//   5. the result is the sum of all coordinates of the final means; the
//      arrays are freed, last first.
// If a malloc fails the arrays held are freed and done pulses with err=1.
//
// Interface: start pulse; busy, done, err, result; one dmm_pkg request channel
// (valid/ready, one request outstanding). Timing: about 3 cycles per heap word
// access, NPTS*(DIM + NCLUST*DIM + 2) accesses per iteration, plus 34 cycles
// per random number and per mean division.
//
// Only the kernel's purpose (iterative clustering of n-D points into groups) is
// given; the sizes, the initial means, the stopping rule and the returned sum
// are this design's choices.
module acc_kmeans
  import dmm_pkg::*;
#(
  parameter int unsigned HEAP_ID  = 0,
  parameter int unsigned NPTS     = 64,
  parameter int unsigned DIM      = 3,
  parameter int unsigned NCLUST   = 4,
  parameter int unsigned GRID     = 100,
  parameter int unsigned MAX_ITER = 16,
  parameter logic [15:0] SEED     = 16'hACE1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  output logic        busy,
  output logic        done,
  output logic        err,
  output logic [31:0] result,
  output logic        req_valid,
  input  logic        req_ready,
  output dmm_req_t    req,
  input  logic        rsp_valid,
  input  dmm_rsp_t    rsp
);

  localparam int unsigned KW = (NCLUST > 1) ? $clog2(NCLUST) : 1;
  localparam int unsigned DW = (DIM > 1) ? $clog2(DIM) : 1;

  typedef enum logic [4:0] {
    S_IDLE, S_MALLOC, S_GEN_RND, S_GEN_WAIT, S_GEN_WR, S_INIT_RD, S_INIT_WR,
    S_CLR_CL, S_AS_P, S_AS_M, S_AS_CL, S_AS_WR, S_UP_DIV, S_UP_WAIT, S_UP_WR,
    S_SUM, S_FREE, S_DONE
  } state_e;
  state_e state;

  logic [ADDR_W-1:0] ptr [3];      // 0: points, 1: means, 2: cluster of each point
  logic [1:0]        nalloc;
  logic [15:0]       i;            // point
  logic [15:0]       k;            // cluster
  logic [15:0]       d;            // coordinate
  logic [15:0]       iter;
  logic [31:0]       p     [DIM];  // coordinates of the current point
  logic [31:0]       csum  [NCLUST][DIM];
  logic [31:0]       ccnt  [NCLUST];
  logic [31:0]       dsq, best_d, tmp, acc;
  logic [KW-1:0]     best_k;
  logic              modified, pend, failed;
  logic              rnd_start, rnd_done;
  logic [31:0]       rnd_val;
  logic              div_start, div_done, div_busy;
  logic [31:0]       div_q, div_r;

  lfsr_rand #(.SEED(SEED)) u_rand (
    .clk, .rst_n, .start(rnd_start), .min_v(32'd1), .max_v(32'(GRID)),
    .done(rnd_done), .value(rnd_val));

  seq_divider #(.W(32)) u_div (
    .clk, .rst_n, .start(div_start), .is_signed(1'b0),
    .dividend(csum[k[KW-1:0]][d[DW-1:0]]), .divisor(ccnt[k[KW-1:0]]),
    .busy(div_busy), .done(div_done), .quotient(div_q), .remainder(div_r));

  function automatic dmm_req_t mk(dmm_op_e op, logic [ADDR_W-1:0] addr, logic [31:0] data);
    mk.op   = op;
    mk.heap = HEAP_ID_W'(HEAP_ID);
    mk.addr = addr;
    mk.data = data;
  endfunction

  logic [ADDR_W-1:0] a_pt, a_init, a_mean, a_cl;
  assign a_pt   = ptr[0] + ADDR_W'(32'(i) * DIM + 32'(d));
  assign a_init = ptr[0] + ADDR_W'(32'(k) * DIM + 32'(d));
  assign a_mean = ptr[1] + ADDR_W'(32'(k) * DIM + 32'(d));
  assign a_cl   = ptr[2] + ADDR_W'(i);

  // squared distance including the coordinate now being read
  logic [31:0] diff, dsq_next;
  assign diff      = p[d[DW-1:0]] - rsp.data;
  assign dsq_next = dsq + diff * diff;

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      for (int n = 0; n < 3; n++) ptr[n] <= '0;
      for (int c = 0; c < NCLUST; c++) begin
        ccnt[c] <= '0;
        for (int e = 0; e < DIM; e++) csum[c][e] <= '0;
      end
      for (int e = 0; e < DIM; e++) p[e] <= '0;
      nalloc <= '0; i <= '0; k <= '0; d <= '0; iter <= '0;
      dsq <= '0; best_d <= '0; tmp <= '0; acc <= '0; best_k <= '0;
      modified <= 1'b0; pend <= 1'b0; failed <= 1'b0;
      rnd_start <= 1'b0; div_start <= 1'b0;
      req_valid <= 1'b0; req <= '0;
      done <= 1'b0; err <= 1'b0; result <= '0;
    end else begin
      done      <= 1'b0;
      rnd_start <= 1'b0;
      div_start <= 1'b0;
      if (req_valid && req_ready) req_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          nalloc <= '0; failed <= 1'b0; i <= '0; k <= '0; d <= '0; iter <= '0;
          state  <= S_MALLOC;
        end
        S_MALLOC: begin
          if (!pend) begin
            req_valid <= 1'b1; pend <= 1'b1;
            req <= mk(OP_MALLOC, '0, (nalloc == 2'd0) ? 32'(NPTS * DIM * WORD_BYTES) :
                                     (nalloc == 2'd1) ? 32'(NCLUST * DIM * WORD_BYTES) :
                                                        32'(NPTS * WORD_BYTES));
          end else if (rsp_valid) begin
            pend <= 1'b0;
            if (!rsp.ok) begin
              failed <= 1'b1; state <= S_FREE;
            end else begin
              ptr[nalloc] <= ADDR_W'(rsp.data);
              nalloc      <= nalloc + 1'b1;
              if (nalloc == 2'd2) state <= S_GEN_RND;
            end
          end
        end
        // ---- 1. random points ----
        S_GEN_RND: begin
          rnd_start <= 1'b1; state <= S_GEN_WAIT;
        end
        S_GEN_WAIT: if (rnd_done) state <= S_GEN_WR;
        S_GEN_WR: begin
          if (!pend) begin
            req_valid <= 1'b1; pend <= 1'b1;
            req <= mk(OP_WRITE, a_pt, rnd_val);
          end else if (rsp_valid) begin
            pend  <= 1'b0;
            state <= S_GEN_RND;
            if (32'(d) == DIM - 1) begin
              d <= '0;
              if (32'(i) == NPTS - 1) begin
                i <= '0; k <= '0; state <= S_INIT_RD;
              end else i <= i + 1'b1;
            end else d <= d + 1'b1;
          end
        end
        // ---- 2. means = first NCLUST points, clusters = none ----
        S_INIT_RD: begin
          if (!pend) begin
            req_valid <= 1'b1; pend <= 1'b1;
            req <= mk(OP_READ, a_init, '0);
          end else if (rsp_valid) begin
            pend <= 1'b0; tmp <= rsp.data; state <= S_INIT_WR;
          end
        end
        S_INIT_WR: begin
          if (!pend) begin
            req_valid <= 1'b1; pend <= 1'b1;
            req <= mk(OP_WRITE, a_mean, tmp);
          end else if (rsp_valid) begin
            pend  <= 1'b0;
            state <= S_INIT_RD;
            if (32'(d) == DIM - 1) begin
              d <= '0;
              if (32'(k) == NCLUST - 1) begin
                k <= '0; i <= '0; state <= S_CLR_CL;
              end else k <= k + 1'b1;
            end else d <= d + 1'b1;
          end
        end
        S_CLR_CL: begin
          if (!pend) begin
            req_valid <= 1'b1; pend <= 1'b1;
            req <= mk(OP_WRITE, a_cl, 32'(NCLUST));
          end else if (rsp_valid) begin
            pend <= 1'b0;
            if (32'(i) == NPTS - 1) begin
              i <= '0; d <= '0; modified <= 1'b0; state <= S_AS_P;
            end else i <= i + 1'b1;
          end
        end
        // ---- 3a. assign each point to the nearest mean ----
        S_AS_P: begin
          if (!pend) begin
            req_valid <= 1'b1; pend <= 1'b1;
            req <= mk(OP_READ, a_pt, '0);
          end else if (rsp_valid) begin
            pend <= 1'b0;
            p[d[DW-1:0]] <= rsp.data;
            if (32'(d) == DIM - 1) begin
              d <= '0; k <= '0; dsq <= '0; state <= S_AS_M;
            end else d <= d + 1'b1;
          end
        end
        S_AS_M: begin
          if (!pend) begin
            req_valid <= 1'b1; pend <= 1'b1;
            req <= mk(OP_READ, a_mean, '0);
          end else if (rsp_valid) begin
            pend <= 1'b0;
            if (32'(d) == DIM - 1) begin
              d    <= '0;
              dsq <= '0;
              if (k == '0 || dsq_next < best_d) begin
                best_d <= dsq_next;
                best_k <= k[KW-1:0];
              end
              if (32'(k) == NCLUST - 1) state <= S_AS_CL;
              else k <= k + 1'b1;
            end else begin
              dsq <= dsq_next;
              d    <= d + 1'b1;
            end
          end
        end
        S_AS_CL: begin
          if (!pend) begin
            req_valid <= 1'b1; pend <= 1'b1;
            req <= mk(OP_READ, a_cl, '0);
          end else if (rsp_valid) begin
            pend <= 1'b0;
            for (int e = 0; e < DIM; e++) csum[best_k][e] <= csum[best_k][e] + p[e];
            ccnt[best_k] <= ccnt[best_k] + 1'b1;
            if (rsp.data != 32'(best_k)) begin
              modified <= 1'b1; state <= S_AS_WR;
            end else if (32'(i) == NPTS - 1) begin
              k <= '0; d <= '0; state <= S_UP_DIV;
            end else begin
              i <= i + 1'b1; state <= S_AS_P;
            end
          end
        end
        S_AS_WR: begin
          if (!pend) begin
            req_valid <= 1'b1; pend <= 1'b1;
            req <= mk(OP_WRITE, a_cl, 32'(best_k));
          end else if (rsp_valid) begin
            pend <= 1'b0;
            if (32'(i) == NPTS - 1) begin
              k <= '0; d <= '0; state <= S_UP_DIV;
            end else begin
              i <= i + 1'b1; state <= S_AS_P;
            end
          end
        end
        // ---- 3b. new means ----
        S_UP_DIV: begin
          if (ccnt[k[KW-1:0]] != '0) begin
            div_start <= 1'b1; state <= S_UP_WAIT;
          end else begin
            state <= S_UP_WR;  // keeps the old mean: no write below
          end
        end
        S_UP_WAIT: if (div_done) state <= S_UP_WR;
        S_UP_WR: begin
          if (ccnt[k[KW-1:0]] != '0 && !pend) begin
            req_valid <= 1'b1; pend <= 1'b1;
            req <= mk(OP_WRITE, a_mean, div_q);
          end else if (ccnt[k[KW-1:0]] == '0 || rsp_valid) begin
            pend  <= 1'b0;
            state <= S_UP_DIV;
            if (32'(d) == DIM - 1) begin
              d <= '0;
              if (32'(k) == NCLUST - 1) begin
                // iteration finished
                k <= '0; i <= '0;
                for (int c = 0; c < NCLUST; c++) begin
                  ccnt[c] <= '0;
                  for (int e = 0; e < DIM; e++) csum[c][e] <= '0;
                end
                iter <= iter + 1'b1;
                if (modified && 32'(iter) + 1 < MAX_ITER) begin
                  modified <= 1'b0; state <= S_AS_P;
                end else begin
                  acc <= '0; state <= S_SUM;
                end
              end else k <= k + 1'b1;
            end else d <= d + 1'b1;
          end
        end
        // ---- 5. result = sum of the means ----
        S_SUM: begin
          if (!pend) begin
            req_valid <= 1'b1; pend <= 1'b1;
            req <= mk(OP_READ, a_mean, '0);
          end else if (rsp_valid) begin
            pend <= 1'b0;
            acc  <= acc + rsp.data;
            if (32'(d) == DIM - 1) begin
              d <= '0;
              if (32'(k) == NCLUST - 1) state <= S_FREE;
              else k <= k + 1'b1;
            end else d <= d + 1'b1;
          end
        end
        S_FREE: begin
          if (nalloc == '0) state <= S_DONE;
          else if (!pend) begin
            req_valid <= 1'b1; pend <= 1'b1;
            req <= mk(OP_FREE, ptr[nalloc - 2'd1], '0);
          end else if (rsp_valid) begin
            pend   <= 1'b0;
            nalloc <= nalloc - 1'b1;
          end
        end
        S_DONE: begin
          done   <= 1'b1;
          err    <= failed;
          result <= failed ? '0 : acc;
          state  <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_one_outstanding: assert property (@(posedge clk) disable iff (!rst_n)
    rsp_valid |-> pend);

endmodule
