// lfsr_rand: hardware form of the kernels' RandMinMaxSyn(min, max, &lfsr, 1).
//
// It keeps a 16-bit LFSR state, loaded with SEED (0xACE1) at reset. Each
// request (start pulse) steps the LFSR once and returns
//     value = min + (lfsr mod (max - min + 1))
// with the modulo done by an iterative divider. done pulses with value about 34
// cycles after start (W+2 edges). If max < min the range wraps and the result is
// whatever the unsigned arithmetic gives.
// The LFSR is the Fibonacci form with taps 16, 14, 13, 11 (x^16+x^14+x^13+x^11+1),
// the usual generator for the seed 0xACE1. The seed and the function's name and
// arguments come from the kernel code; the polynomial and the mapping to
// [min, max] are this design's assumptions.
module lfsr_rand #(
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] min_v,
  input  logic [31:0] max_v,
  output logic        done,
  output logic [31:0] value
);

  logic [15:0] lfsr, lfsr_next;
  logic [31:0] base;
  logic        div_done, div_busy;
  logic [31:0] quo, rem;

  assign lfsr_next = {lfsr[0] ^ lfsr[2] ^ lfsr[3] ^ lfsr[5], lfsr[15:1]};

  seq_divider #(.W(32)) u_div (
    .clk, .rst_n,
    .start    (start),
    .is_signed(1'b0),
    .dividend (32'(lfsr_next)),
    .divisor  (max_v - min_v + 32'd1),
    .busy     (div_busy),
    .done     (div_done),
    .quotient (quo),
    .remainder(rem)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr  <= SEED;
      base  <= '0;
      done  <= 1'b0;
      value <= '0;
    end else begin
      done <= div_done;
      if (start && !div_busy) begin
        lfsr <= lfsr_next;
        base <= min_v;
      end
      if (div_done) value <= base + rem;
    end
  end

endmodule
