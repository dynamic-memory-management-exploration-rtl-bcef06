// dmm_allocator: the dynamic-memory allocator of one heap (freelist + first fit).
//
// The heap is DEPTH words. The freelist is a bitmap with one bit per heap word
// (1 = word in use), stored as DEPTH/FL_WIDTH rows of FL_WIDTH bits. The
// allocator reads one row per clock cycle, so FL_WIDTH is the number of heap
// words it checks per iteration: a wider freelist finds room and marks or clears
// an allocation in fewer cycles, at the cost of wider masks.
//
// malloc (cmd_malloc=1): the size in bytes is rounded up to whole words (the
// padding is the alignment fragmentation). SCAN walks the rows from row 0 and
// keeps the length of the current run of free words across row boundaries; the
// first run that reaches the request is taken (first fit). MARK then sets the
// run's bits, one row per cycle, and sets its last word in a second bitmap of
// end marks. A zero-size request, or one for which no run is found, fails.
// free (cmd_malloc=0): cmd_ptr must be an allocated word. CLEAR clears used bits
// from cmd_ptr up to and including the first end mark, one row per cycle.
//
// Interface: cmd_valid/cmd_ready handshake (ready only when idle); one
// done_valid pulse per command with done_ok and, for malloc, done_ptr (the
// word address of the allocation in the heap).
// Timing from the accepting clock edge: a malloc of n words into an empty heap
// ends after 2*ceil(n/FL_WIDTH) edges (SCAN then MARK); a failing malloc scans
// every row; a free that spans k rows takes k edges; a rejected command (zero
// or oversize malloc, free of a word not in use) answers on the accepting edge.
//
// The freelist, the first-fit policy and the freelist width as the words checked
// per iteration follow the DMM-HLS allocator. The bitmap encoding, the end-mark
// bitmap used to recover an allocation's size on free, and the cycle schedule
// are this design's own choices.
module dmm_allocator #(
  parameter int unsigned DEPTH      = 1024,  // heap words
  parameter int unsigned FL_WIDTH   = 32,    // freelist row width (8, 32 or 64)
  parameter int unsigned WORD_BYTES = 4,
  parameter int unsigned AW         = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cmd_valid,
  output logic          cmd_ready,
  input  logic          cmd_malloc,   // 1: malloc, 0: free
  input  logic [31:0]   cmd_bytes,    // malloc size in bytes
  input  logic [AW-1:0] cmd_ptr,      // free pointer (word address)
  output logic          done_valid,
  output logic          done_ok,
  output logic [AW-1:0] done_ptr
);

  localparam int unsigned ROWS = DEPTH / FL_WIDTH;
  localparam int unsigned RW   = (ROWS > 1) ? $clog2(ROWS) : 1;
  localparam int unsigned BW   = (FL_WIDTH > 1) ? $clog2(FL_WIDTH) : 1;

  typedef enum logic [1:0] {S_IDLE, S_SCAN, S_MARK, S_CLEAR} state_e;
  state_e state;

  logic [FL_WIDTH-1:0] used [ROWS];  // 1 = word allocated
  logic [FL_WIDTH-1:0] endm [ROWS];  // 1 = last word of an allocation

  logic [RW-1:0] row;
  logic [AW:0]   need;       // words requested
  logic [AW:0]   run_len;    // free run carried from earlier rows
  logic [AW-1:0] run_start;
  logic [AW-1:0] first;      // first word of the allocation being marked / freed
  logic [AW:0]   last;       // last word of the allocation being marked

  // Words needed for a byte count, saturated so that oversize requests fail.
  logic [32:0] words_req;
  assign words_req = ({1'b0, cmd_bytes} + 33'(WORD_BYTES - 1)) / 33'(WORD_BYTES);

  // ---- SCAN: first-fit search over one freelist row -----------------------
  logic          scan_hit;
  logic [AW-1:0] scan_start;
  logic [AW:0]   scan_len;
  logic [AW-1:0] scan_rs;
  always_comb begin
    automatic logic [AW-1:0] pos;
    scan_hit   = 1'b0;
    scan_start = '0;
    scan_len   = run_len;
    scan_rs    = run_start;
    for (int j = 0; j < FL_WIDTH; j++) begin
      pos = AW'(int'(row) * FL_WIDTH + j);
      if (!scan_hit) begin
        if (!used[row][j]) begin
          if (scan_len == '0) scan_rs = pos;
          scan_len = scan_len + 1'b1;
          if (scan_len == need) begin
            scan_hit   = 1'b1;
            scan_start = scan_rs;
          end
        end else begin
          scan_len = '0;
        end
      end
    end
  end

  // ---- MARK: masks for the part of [first, last] inside this row -----------
  logic [FL_WIDTH-1:0] mark_mask, mark_end;
  logic                mark_done;
  always_comb begin
    automatic int unsigned pos;
    mark_mask = '0;
    mark_end  = '0;
    mark_done = 1'b0;
    for (int j = 0; j < FL_WIDTH; j++) begin
      pos = int'(row) * FL_WIDTH + j;
      if (pos >= int'(first) && pos <= int'(last)) mark_mask[j] = 1'b1;
      if (pos == int'(last)) begin
        mark_end[j] = 1'b1;
        mark_done   = 1'b1;
      end
    end
  end

  // ---- CLEAR: bits from `first` up to the first end mark in this row --------
  logic [FL_WIDTH-1:0] clr_mask;
  logic                clr_done;
  always_comb begin
    automatic int unsigned pos;
    clr_mask = '0;
    clr_done = 1'b0;
    for (int j = 0; j < FL_WIDTH; j++) begin
      pos = int'(row) * FL_WIDTH + j;
      if (!clr_done && pos >= int'(first)) begin
        clr_mask[j] = 1'b1;
        if (endm[row][j]) clr_done = 1'b1;
      end
    end
  end

  logic [RW-1:0]       ptr_row;
  logic [BW-1:0]       ptr_bit;
  assign ptr_row = RW'(cmd_ptr / AW'(FL_WIDTH));
  assign ptr_bit = BW'(cmd_ptr % AW'(FL_WIDTH));

  assign cmd_ready = (state == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      row        <= '0;
      need       <= '0;
      run_len    <= '0;
      run_start  <= '0;
      first      <= '0;
      last       <= '0;
      done_valid <= 1'b0;
      done_ok    <= 1'b0;
      done_ptr   <= '0;
      for (int r = 0; r < ROWS; r++) begin
        used[r] <= '0;
        endm[r] <= '0;
      end
    end else begin
      done_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (cmd_valid) begin
          if (cmd_malloc) begin
            if (words_req == '0 || words_req > 33'(DEPTH)) begin
              done_valid <= 1'b1;
              done_ok    <= 1'b0;
              done_ptr   <= '0;
            end else begin
              need      <= (AW+1)'(words_req);
              row       <= '0;
              run_len   <= '0;
              run_start <= '0;
              state     <= S_SCAN;
            end
          end else begin
            if (32'(cmd_ptr) < DEPTH && used[ptr_row][ptr_bit]) begin
              first <= cmd_ptr;
              row   <= ptr_row;
              state <= S_CLEAR;
            end else begin
              done_valid <= 1'b1;
              done_ok    <= 1'b0;
              done_ptr   <= cmd_ptr;
            end
          end
        end
        S_SCAN: begin
          if (scan_hit) begin
            first <= scan_start;
            last  <= (AW+1)'(scan_start) + need - 1'b1;
            row   <= RW'(scan_start / AW'(FL_WIDTH));
            state <= S_MARK;
          end else if (32'(row) == ROWS - 1) begin
            done_valid <= 1'b1;
            done_ok    <= 1'b0;
            done_ptr   <= '0;
            state      <= S_IDLE;
          end else begin
            row       <= row + 1'b1;
            run_len   <= scan_len;
            run_start <= scan_rs;
          end
        end
        S_MARK: begin
          used[row] <= used[row] | mark_mask;
          endm[row] <= endm[row] | mark_end;
          if (mark_done) begin
            done_valid <= 1'b1;
            done_ok    <= 1'b1;
            done_ptr   <= first;
            state      <= S_IDLE;
          end else begin
            row <= row + 1'b1;
          end
        end
        S_CLEAR: begin
          used[row] <= used[row] & ~clr_mask;
          endm[row] <= endm[row] & ~clr_mask;
          if (clr_done || 32'(row) == ROWS - 1) begin
            done_valid <= 1'b1;
            done_ok    <= clr_done;
            done_ptr   <= first;
            state      <= S_IDLE;
          end else begin
            row <= row + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
