// seq_divider: iterative integer divider shared by the kernel accelerators.
//
// A restoring shift-subtract divider that produces one quotient bit per clock
// cycle. Pulse start with dividend, divisor and is_signed; done pulses W+1
// edges later with quotient and remainder. Signed division truncates toward
// zero and the remainder takes the dividend's sign, as C's / and % do. A zero
// divisor gives an all-ones quotient and returns the dividend as remainder.
// The kernels need C division and modulo; the divider's structure is this
// design's choice.
module seq_divider #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         is_signed,
  input  logic [W-1:0] dividend,
  input  logic [W-1:0] divisor,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] quotient,
  output logic [W-1:0] remainder
);

  localparam int unsigned CW = $clog2(W + 1);

  logic [W-1:0]  q, d;
  logic [W:0]    r;
  logic [CW-1:0] cnt;
  logic          neg_q, neg_r, run;

  logic [W:0] r_shift, r_sub;
  assign r_shift = {r[W-1:0], q[W-1]};
  assign r_sub   = r_shift - {1'b0, d};

  assign busy = run;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0; d <= '0; r <= '0; cnt <= '0;
      neg_q <= 1'b0; neg_r <= 1'b0; run <= 1'b0;
      done <= 1'b0; quotient <= '0; remainder <= '0;
    end else begin
      done <= 1'b0;
      if (start && !run) begin
        neg_r <= is_signed && dividend[W-1];
        neg_q <= is_signed && (dividend[W-1] ^ divisor[W-1]) && (divisor != '0);
        q     <= (is_signed && dividend[W-1]) ? -dividend : dividend;
        d     <= (is_signed && divisor[W-1])  ? -divisor  : divisor;
        r     <= '0;
        cnt   <= CW'(W);
        run   <= 1'b1;
      end else if (run) begin
        if (cnt != '0) begin
          if (!r_sub[W]) begin
            r <= r_sub;
            q <= {q[W-2:0], 1'b1};
          end else begin
            r <= r_shift;
            q <= {q[W-2:0], 1'b0};
          end
          cnt <= cnt - 1'b1;
        end else begin
          run       <= 1'b0;
          done      <= 1'b1;
          quotient  <= neg_q ? -q : q;
          remainder <= neg_r ? -r[W-1:0] : r[W-1:0];
        end
      end
    end
  end

endmodule
