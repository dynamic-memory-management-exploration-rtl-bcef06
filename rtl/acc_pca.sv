// acc_pca: PCA kernel accelerator that keeps its arrays in a DMM heap.
//
// It computes the covariance matrix of ROWS random vectors of COLS integers and
// returns the sum of its elements plus N_PCA. The arrays matrix (ROWS*COLS),
// mean (ROWS) and cov (ROWS*ROWS) are obtained from heap HEAP_ID with HlsMalloc
// at the start and released with HlsFree at the end:
//   generate_points: matrix[i][j] = RandMinMaxSyn(1, GRID)      (LFSR seed 0xACE1)
//   calc_mean:       mean[i] = (sum over j of matrix[i][j]) / COLS
//   calc_cov:        for j >= i: s = sum over k of (m[i][k]-mean[i])*(m[j][k]-mean[j]);
//                    cov[i][j] = cov[j][i] = s / (COLS-1)
//   result:          sum over i, j < ROWS of cov[i][j], plus N_PCA
// Divisions are C integer divisions (signed, truncating) done by an iterative
// divider; products keep their low 32 bits, as C int arithmetic does.
// If a malloc fails the arrays held are freed and done pulses with err=1.
//
// Interface: start pulse; busy, done, err, result; one dmm_pkg request channel
// (valid/ready, one request outstanding). Timing is set by the heap traffic
// (about 3 cycles per word access) and the divider (34 cycles per division).
//
// The algorithm and its loop order follow the PCA kernel code. ROWS, COLS, GRID
// and N_PCA are not given by the kernel description; the defaults are this
// design's choice, as is one heap word per int element.
module acc_pca
  import dmm_pkg::*;
#(
  parameter int unsigned HEAP_ID = 0,
  parameter int unsigned ROWS    = 8,
  parameter int unsigned COLS    = 8,
  parameter int unsigned GRID    = 100,
  parameter int unsigned N_PCA   = 64,
  parameter logic [15:0] SEED    = 16'hACE1
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

  typedef enum logic [4:0] {
    S_IDLE, S_MALLOC,
    S_GEN_RND, S_GEN_WAIT, S_GEN_WR,
    S_MEAN_RD, S_MEAN_DIV, S_MEAN_WR,
    S_COV_MI, S_COV_MJ, S_COV_A, S_COV_B, S_COV_DIV, S_COV_W1, S_COV_W2,
    S_SUM_RD, S_FREE, S_DONE
  } state_e;
  state_e state;

  logic [ADDR_W-1:0] ptr [3];   // 0: matrix, 1: mean, 2: cov
  logic [1:0]        nalloc;
  logic [15:0]       i, j, k;
  logic [31:0]       sum, mi, mj, a, acc;
  logic              pend, failed;
  logic              rnd_start, rnd_done;
  logic [31:0]       rnd_val;
  logic              div_start, div_done, div_busy;
  logic [31:0]       div_den, div_q, div_r;

  lfsr_rand #(.SEED(SEED)) u_rand (
    .clk, .rst_n, .start(rnd_start), .min_v(32'd1), .max_v(32'(GRID)),
    .done(rnd_done), .value(rnd_val));

  seq_divider #(.W(32)) u_div (
    .clk, .rst_n, .start(div_start), .is_signed(1'b1),
    .dividend(sum), .divisor(div_den),
    .busy(div_busy), .done(div_done), .quotient(div_q), .remainder(div_r));

  assign div_den = (state == S_MEAN_DIV) ? 32'(COLS) : 32'(COLS - 1);

  function automatic dmm_req_t mk(dmm_op_e op, logic [ADDR_W-1:0] addr, logic [31:0] data);
    mk.op   = op;
    mk.heap = HEAP_ID_W'(HEAP_ID);
    mk.addr = addr;
    mk.data = data;
  endfunction

  function automatic logic [31:0] alloc_bytes(logic [1:0] n);
    unique case (n)
      2'd0:    return 32'(ROWS * COLS * WORD_BYTES);
      2'd1:    return 32'(ROWS * WORD_BYTES);
      default: return 32'(ROWS * ROWS * WORD_BYTES);
    endcase
  endfunction

  // element addresses
  logic [ADDR_W-1:0] a_mat_ij, a_mat_ik, a_mat_jk, a_mean_i, a_mean_j, a_cov_ij, a_cov_ji;
  assign a_mat_ij = ptr[0] + ADDR_W'(32'(i) * COLS + 32'(j));
  assign a_mat_ik = ptr[0] + ADDR_W'(32'(i) * COLS + 32'(k));
  assign a_mat_jk = ptr[0] + ADDR_W'(32'(j) * COLS + 32'(k));
  assign a_mean_i = ptr[1] + ADDR_W'(i);
  assign a_mean_j = ptr[1] + ADDR_W'(j);
  assign a_cov_ij = ptr[2] + ADDR_W'(32'(i) * ROWS + 32'(j));
  assign a_cov_ji = ptr[2] + ADDR_W'(32'(j) * ROWS + 32'(i));

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      for (int n = 0; n < 3; n++) ptr[n] <= '0;
      nalloc <= '0; i <= '0; j <= '0; k <= '0;
      sum <= '0; mi <= '0; mj <= '0; a <= '0; acc <= '0;
      pend <= 1'b0; failed <= 1'b0; rnd_start <= 1'b0; div_start <= 1'b0;
      req_valid <= 1'b0; req <= '0;
      done <= 1'b0; err <= 1'b0; result <= '0;
    end else begin
      done      <= 1'b0;
      rnd_start <= 1'b0;
      div_start <= 1'b0;
      if (req_valid && req_ready) req_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          nalloc <= '0; failed <= 1'b0; acc <= '0; i <= '0; j <= '0; k <= '0;
          state  <= S_MALLOC;
        end
        S_MALLOC: begin
          if (!pend) begin
            req_valid <= 1'b1; pend <= 1'b1;
            req <= mk(OP_MALLOC, '0, alloc_bytes(nalloc));
          end else if (rsp_valid) begin
            pend <= 1'b0;
            if (!rsp.ok) begin
              failed <= 1'b1; state <= S_FREE;
            end else begin
              ptr[nalloc] <= ADDR_W'(rsp.data);
              nalloc      <= nalloc + 1'b1;
              if (nalloc == 2'd2) begin
                i <= '0; j <= '0; state <= S_GEN_RND;
              end
            end
          end
        end
        // ---- generate_points ----
        S_GEN_RND: begin
          rnd_start <= 1'b1; state <= S_GEN_WAIT;
        end
        S_GEN_WAIT: if (rnd_done) state <= S_GEN_WR;
        S_GEN_WR: begin
          if (!pend) begin
            req_valid <= 1'b1; pend <= 1'b1;
            req <= mk(OP_WRITE, a_mat_ij, rnd_val);
          end else if (rsp_valid) begin
            pend  <= 1'b0;
            state <= S_GEN_RND;
            if (32'(j) == COLS - 1) begin
              j <= '0;
              if (32'(i) == ROWS - 1) begin
                i <= '0; sum <= '0; state <= S_MEAN_RD;
              end else i <= i + 1'b1;
            end else j <= j + 1'b1;
          end
        end
        // ---- calc_mean ----
        S_MEAN_RD: begin
          if (!pend) begin
            req_valid <= 1'b1; pend <= 1'b1;
            req <= mk(OP_READ, a_mat_ij, '0);
          end else if (rsp_valid) begin
            pend <= 1'b0;
            sum  <= sum + rsp.data;
            if (32'(j) == COLS - 1) begin
              j <= '0; div_start <= 1'b1; state <= S_MEAN_DIV;
            end else j <= j + 1'b1;
          end
        end
        S_MEAN_DIV: if (div_done) state <= S_MEAN_WR;
        S_MEAN_WR: begin
          if (!pend) begin
            req_valid <= 1'b1; pend <= 1'b1;
            req <= mk(OP_WRITE, a_mean_i, div_q);
          end else if (rsp_valid) begin
            pend <= 1'b0;
            sum  <= '0;
            if (32'(i) == ROWS - 1) begin
              i <= '0; j <= '0; state <= S_COV_MI;
            end else begin
              i <= i + 1'b1; state <= S_MEAN_RD;
            end
          end
        end
        // ---- calc_cov ----
        S_COV_MI: begin
          if (!pend) begin
            req_valid <= 1'b1; pend <= 1'b1;
            req <= mk(OP_READ, a_mean_i, '0);
          end else if (rsp_valid) begin
            pend <= 1'b0; mi <= rsp.data; state <= S_COV_MJ;
          end
        end
        S_COV_MJ: begin
          if (!pend) begin
            req_valid <= 1'b1; pend <= 1'b1;
            req <= mk(OP_READ, a_mean_j, '0);
          end else if (rsp_valid) begin
            pend <= 1'b0; mj <= rsp.data; sum <= '0; k <= '0; state <= S_COV_A;
          end
        end
        S_COV_A: begin
          if (!pend) begin
            req_valid <= 1'b1; pend <= 1'b1;
            req <= mk(OP_READ, a_mat_ik, '0);
          end else if (rsp_valid) begin
            pend <= 1'b0; a <= rsp.data; state <= S_COV_B;
          end
        end
        S_COV_B: begin
          if (!pend) begin
            req_valid <= 1'b1; pend <= 1'b1;
            req <= mk(OP_READ, a_mat_jk, '0);
          end else if (rsp_valid) begin
            pend <= 1'b0;
            sum  <= sum + (a - mi) * (rsp.data - mj);
            if (32'(k) == COLS - 1) begin
              div_start <= 1'b1; state <= S_COV_DIV;
            end else begin
              k <= k + 1'b1; state <= S_COV_A;
            end
          end
        end
        S_COV_DIV: if (div_done) state <= S_COV_W1;
        S_COV_W1: begin
          if (!pend) begin
            req_valid <= 1'b1; pend <= 1'b1;
            req <= mk(OP_WRITE, a_cov_ij, div_q);
          end else if (rsp_valid) begin
            pend <= 1'b0; state <= S_COV_W2;
          end
        end
        S_COV_W2: begin
          if (!pend) begin
            req_valid <= 1'b1; pend <= 1'b1;
            req <= mk(OP_WRITE, a_cov_ji, div_q);
          end else if (rsp_valid) begin
            pend  <= 1'b0;
            state <= S_COV_MI;
            if (32'(j) == ROWS - 1) begin
              if (32'(i) == ROWS - 1) begin
                i <= '0; j <= '0; state <= S_SUM_RD;
              end else begin
                i <= i + 1'b1; j <= i + 1'b1;
              end
            end else j <= j + 1'b1;
          end
        end
        // ---- main_result = sum of cov ----
        S_SUM_RD: begin
          if (!pend) begin
            req_valid <= 1'b1; pend <= 1'b1;
            req <= mk(OP_READ, a_cov_ij, '0);
          end else if (rsp_valid) begin
            pend <= 1'b0;
            acc  <= acc + rsp.data;
            if (32'(j) == ROWS - 1) begin
              j <= '0;
              if (32'(i) == ROWS - 1) state <= S_FREE;
              else i <= i + 1'b1;
            end else j <= j + 1'b1;
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
          result <= failed ? '0 : acc + 32'(N_PCA);
          state  <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_one_outstanding: assert property (@(posedge clk) disable iff (!rst_n)
    rsp_valid |-> pend);

endmodule
