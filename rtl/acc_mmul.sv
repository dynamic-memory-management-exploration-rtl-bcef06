// acc_mmul: dense integer matrix multiplication accelerator on a DMM heap.
//
// It fills two DIM x DIM int matrices A and B with RandMinMaxSyn(1, GRID)
// values (A first, row by row, then B), computes C = A x B with 32-bit
// wrap-around arithmetic, and returns the sum of all elements of C. A, B and C
// are obtained from heap HEAP_ID with HlsMalloc at the start and released with
// HlsFree at the end; C is left in the heap's RAM. If a malloc fails the
// arrays held are freed and done pulses with err=1.
//
// Interface: start pulse; busy, done, err, result; one dmm_pkg request channel
// (valid/ready, one request outstanding). Timing: about 3 cycles per heap word
// access, DIM^3 multiply-accumulate steps with two reads each.
//
// Only the kernel's function (dense integer matrix multiplication) is given;
// the data generation, the matrix size, the loop order and the returned sum are
// this design's choices, made to match the other kernels.
module acc_mmul
  import dmm_pkg::*;
#(
  parameter int unsigned HEAP_ID = 0,
  parameter int unsigned DIM     = 8,
  parameter int unsigned GRID    = 100,
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

  typedef enum logic [3:0] {
    S_IDLE, S_MALLOC, S_GEN_RND, S_GEN_WAIT, S_GEN_WR,
    S_MUL_A, S_MUL_B, S_MUL_WR, S_FREE, S_DONE
  } state_e;
  state_e state;

  logic [ADDR_W-1:0] ptr [3];   // 0: A, 1: B, 2: C
  logic [1:0]        nalloc;
  logic              m;         // matrix being generated: 0 = A, 1 = B
  logic [15:0]       i, j, k;
  logic [31:0]       a, sum, acc;
  logic              pend, failed;
  logic              rnd_start, rnd_done;
  logic [31:0]       rnd_val;

  lfsr_rand #(.SEED(SEED)) u_rand (
    .clk, .rst_n, .start(rnd_start), .min_v(32'd1), .max_v(32'(GRID)),
    .done(rnd_done), .value(rnd_val));

  function automatic dmm_req_t mk(dmm_op_e op, logic [ADDR_W-1:0] addr, logic [31:0] data);
    mk.op   = op;
    mk.heap = HEAP_ID_W'(HEAP_ID);
    mk.addr = addr;
    mk.data = data;
  endfunction

  logic [ADDR_W-1:0] a_gen, a_aik, a_bkj, a_cij;
  assign a_gen = ptr[{1'b0, m}] + ADDR_W'(32'(i) * DIM + 32'(j));
  assign a_aik = ptr[0] + ADDR_W'(32'(i) * DIM + 32'(k));
  assign a_bkj = ptr[1] + ADDR_W'(32'(k) * DIM + 32'(j));
  assign a_cij = ptr[2] + ADDR_W'(32'(i) * DIM + 32'(j));

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      for (int n = 0; n < 3; n++) ptr[n] <= '0;
      nalloc <= '0; m <= 1'b0; i <= '0; j <= '0; k <= '0;
      a <= '0; sum <= '0; acc <= '0;
      pend <= 1'b0; failed <= 1'b0; rnd_start <= 1'b0;
      req_valid <= 1'b0; req <= '0;
      done <= 1'b0; err <= 1'b0; result <= '0;
    end else begin
      done      <= 1'b0;
      rnd_start <= 1'b0;
      if (req_valid && req_ready) req_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          nalloc <= '0; failed <= 1'b0; acc <= '0; m <= 1'b0;
          i <= '0; j <= '0; k <= '0;
          state <= S_MALLOC;
        end
        S_MALLOC: begin
          if (!pend) begin
            req_valid <= 1'b1; pend <= 1'b1;
            req <= mk(OP_MALLOC, '0, 32'(DIM * DIM * WORD_BYTES));
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
        S_GEN_RND: begin
          rnd_start <= 1'b1; state <= S_GEN_WAIT;
        end
        S_GEN_WAIT: if (rnd_done) state <= S_GEN_WR;
        S_GEN_WR: begin
          if (!pend) begin
            req_valid <= 1'b1; pend <= 1'b1;
            req <= mk(OP_WRITE, a_gen, rnd_val);
          end else if (rsp_valid) begin
            pend  <= 1'b0;
            state <= S_GEN_RND;
            if (32'(j) == DIM - 1) begin
              j <= '0;
              if (32'(i) == DIM - 1) begin
                i <= '0;
                if (m) begin
                  k <= '0; sum <= '0; state <= S_MUL_A;
                end else m <= 1'b1;
              end else i <= i + 1'b1;
            end else j <= j + 1'b1;
          end
        end
        S_MUL_A: begin
          if (!pend) begin
            req_valid <= 1'b1; pend <= 1'b1;
            req <= mk(OP_READ, a_aik, '0);
          end else if (rsp_valid) begin
            pend <= 1'b0; a <= rsp.data; state <= S_MUL_B;
          end
        end
        S_MUL_B: begin
          if (!pend) begin
            req_valid <= 1'b1; pend <= 1'b1;
            req <= mk(OP_READ, a_bkj, '0);
          end else if (rsp_valid) begin
            pend <= 1'b0;
            sum  <= sum + a * rsp.data;
            if (32'(k) == DIM - 1) state <= S_MUL_WR;
            else begin
              k <= k + 1'b1; state <= S_MUL_A;
            end
          end
        end
        S_MUL_WR: begin
          if (!pend) begin
            req_valid <= 1'b1; pend <= 1'b1;
            req <= mk(OP_WRITE, a_cij, sum);
          end else if (rsp_valid) begin
            pend  <= 1'b0;
            acc   <= acc + sum;
            sum   <= '0;
            k     <= '0;
            state <= S_MUL_A;
            if (32'(j) == DIM - 1) begin
              j <= '0;
              if (32'(i) == DIM - 1) state <= S_FREE;
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
