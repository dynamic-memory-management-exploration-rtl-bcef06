// acc_histogram: Histogram kernel accelerator that keeps its arrays in a DMM heap.
//
// The kernel counts how often each value 0..255 occurs in the blue, green and
// red channels of an image of N bytes (N/3 pixels, channels interleaved
// B,G,R). All four arrays live in heap HEAP_ID and are obtained at run time:
//   1. HlsMalloc the pixel array (N words) and the blue, green and red bin
//      arrays (256 words each), then zero the bins;
//   2. fill pixel[i] with (char)RandMinMaxSyn(1, i+1) for every i;
//   3. for i = 0, 3, 6, ...: blue[pixel[i]]++, green[pixel[i+1]]++,
//      red[pixel[i+2]]++, result += 3;
//   4. HlsFree everything and pulse done with result (the kernel's return value,
//      3*ceil(N/3)).
// If a malloc fails the arrays already held are freed and done pulses with err=1.
// Every heap word holds one array element, so an N-byte array takes N words.
//
// Interface: start pulse (ignored while busy); busy, done, err, result; one
// dmm_pkg request channel (valid/ready, one request outstanding, response on
// rsp_valid). Timing is set by the heap traffic: about 3 cycles per word
// access, plus the allocator calls and about 35 cycles per random number.
//
// The loop structure follows the Histogram kernel code. This design's choices:
// all N pixel bytes are generated (the kernel code writes only every third
// one), the bins are cleared explicitly, and one heap word holds one element.
module acc_histogram
  import dmm_pkg::*;
#(
  parameter int unsigned HEAP_ID = 0,
  parameter int unsigned N       = 192,       // bytes of pixel data, a multiple of 3
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
    S_IDLE, S_MALLOC, S_CLR, S_GEN_RND, S_GEN_WAIT, S_GEN_WR,
    S_CNT_PIX, S_CNT_BIN, S_CNT_INC, S_FREE, S_DONE
  } state_e;
  state_e state;

  logic [ADDR_W-1:0] ptr [4];      // 0: pixels, 1: blue, 2: green, 3: red
  logic [2:0]        nalloc;       // arrays currently held
  logic [1:0]        c;            // channel 0..2
  logic [15:0]       i;            // pixel byte index
  logic [8:0]        b;            // bin index
  logic [7:0]        val;
  logic [31:0]       cnt;
  logic              pend;         // request issued, response not yet seen
  logic              failed;
  logic              rnd_start, rnd_done;
  logic [31:0]       rnd_val;

  lfsr_rand #(.SEED(SEED)) u_rand (
    .clk, .rst_n,
    .start(rnd_start),
    .min_v(32'd1),
    .max_v(32'(i) + 32'd1),
    .done (rnd_done),
    .value(rnd_val)
  );

  function automatic dmm_req_t mk(dmm_op_e op, logic [ADDR_W-1:0] addr, logic [31:0] data);
    mk.op   = op;
    mk.heap = HEAP_ID_W'(HEAP_ID);
    mk.addr = addr;
    mk.data = data;
  endfunction

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      for (int k = 0; k < 4; k++) ptr[k] <= '0;
      nalloc <= '0; c <= '0; i <= '0; b <= '0; val <= '0; cnt <= '0;
      pend <= 1'b0; failed <= 1'b0; rnd_start <= 1'b0;
      req_valid <= 1'b0; req <= '0;
      done <= 1'b0; err <= 1'b0; result <= '0;
    end else begin
      done      <= 1'b0;
      rnd_start <= 1'b0;
      if (req_valid && req_ready) req_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          nalloc <= '0; failed <= 1'b0; cnt <= '0; i <= '0; b <= '0; c <= '0;
          state  <= S_MALLOC;
        end
        S_MALLOC: begin
          if (!pend) begin
            req_valid <= 1'b1; pend <= 1'b1;
            req <= mk(OP_MALLOC, '0, (nalloc == 0) ? 32'(N * WORD_BYTES) : 32'(256 * WORD_BYTES));
          end else if (rsp_valid) begin
            pend <= 1'b0;
            if (!rsp.ok) begin
              failed <= 1'b1;
              state  <= S_FREE;
            end else begin
              ptr[nalloc[1:0]] <= ADDR_W'(rsp.data);
              nalloc           <= nalloc + 1'b1;
              if (nalloc == 3'd3) begin
                c <= 2'd1; b <= '0; state <= S_CLR;
              end
            end
          end
        end
        S_CLR: begin  // bins[c][b] = 0
          if (!pend) begin
            req_valid <= 1'b1; pend <= 1'b1;
            req <= mk(OP_WRITE, ptr[c] + ADDR_W'(b), '0);
          end else if (rsp_valid) begin
            pend <= 1'b0;
            if (b == 9'd255) begin
              b <= '0;
              if (c == 2'd3) begin
                i <= '0; state <= S_GEN_RND;
              end else c <= c + 1'b1;
            end else b <= b + 1'b1;
          end
        end
        S_GEN_RND: begin
          rnd_start <= 1'b1;
          state     <= S_GEN_WAIT;
        end
        S_GEN_WAIT: if (rnd_done) state <= S_GEN_WR;
        S_GEN_WR: begin  // pixel[i] = (char)rand(1, i+1)
          if (!pend) begin
            req_valid <= 1'b1; pend <= 1'b1;
            req <= mk(OP_WRITE, ptr[0] + ADDR_W'(i), {24'd0, rnd_val[7:0]});
          end else if (rsp_valid) begin
            pend <= 1'b0;
            if (32'(i) == N - 1) begin
              i <= '0; c <= '0; state <= S_CNT_PIX;
            end else begin
              i <= i + 1'b1; state <= S_GEN_RND;
            end
          end
        end
        S_CNT_PIX: begin  // val = pixel[i + c]
          if (!pend) begin
            req_valid <= 1'b1; pend <= 1'b1;
            req <= mk(OP_READ, ptr[0] + ADDR_W'(i) + ADDR_W'(c), '0);
          end else if (rsp_valid) begin
            pend  <= 1'b0;
            val   <= rsp.data[7:0];
            state <= S_CNT_BIN;
          end
        end
        S_CNT_BIN: begin  // cnt = bins[c][val]
          if (!pend) begin
            req_valid <= 1'b1; pend <= 1'b1;
            req <= mk(OP_READ, ptr[c + 1'b1] + ADDR_W'(val), '0);
          end else if (rsp_valid) begin
            pend  <= 1'b0;
            cnt   <= rsp.data;
            state <= S_CNT_INC;
          end
        end
        S_CNT_INC: begin  // bins[c][val] = cnt + 1
          if (!pend) begin
            req_valid <= 1'b1; pend <= 1'b1;
            req <= mk(OP_WRITE, ptr[c + 1'b1] + ADDR_W'(val), cnt + 32'd1);
          end else if (rsp_valid) begin
            pend <= 1'b0;
            if (c == 2'd2) begin
              c      <= '0;
              result <= result + 32'd3;
              if (32'(i) + 3 >= N) state <= S_FREE;
              else begin
                i     <= i + 16'd3;
                state <= S_CNT_PIX;
              end
            end else begin
              c     <= c + 1'b1;
              state <= S_CNT_PIX;
            end
          end
        end
        S_FREE: begin  // free the arrays held, last first
          if (nalloc == '0) state <= S_DONE;
          else if (!pend) begin
            req_valid <= 1'b1; pend <= 1'b1;
            req <= mk(OP_FREE, ptr[nalloc[1:0] - 2'd1], '0);
          end else if (rsp_valid) begin
            pend   <= 1'b0;
            nalloc <= nalloc - 1'b1;
          end
        end
        S_DONE: begin
          done  <= 1'b1;
          err   <= failed;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
      if (state == S_IDLE && start) result <= '0;
    end
  end

  a_one_outstanding: assert property (@(posedge clk) disable iff (!rst_n)
    rsp_valid |-> pend);

endmodule
