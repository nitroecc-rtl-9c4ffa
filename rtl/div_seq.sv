// div_seq: sequential restoring divider, q = a / b and r = a % b on 256-bit
// unsigned integers, one quotient bit per clock, 256 clocks per division.
//
// The dividend sits in a shift register whose vacated low bits collect the
// quotient. Each clock the partial remainder takes the next dividend bit
// from the top of that register; if the result is not below b, b is
// subtracted and a 1 is shifted into the quotient, otherwise a 0. The result
// is plain integer division, not modular: this is the unit a program uses for
// field inversions when it works in affine coordinates.
//
// Interface: a one-clock start pulse, taken while the unit is idle (ready = 1),
// latches a (dividend) and b (divisor). busy is high for the 256 working
// clocks. out_valid is set when q and r are complete and cleared by start or by
// invalidate. Division by zero gives q = all ones and r = a.
// Timing: start at edge k; q, r final and out_valid high at edge k+256.
//
// From the design: the 256-clock sequential algorithm with quotient and
// remainder output registers and start/ready signalling. The valid flag and
// the synchronous reset are this implementation's own.
module div_seq
  import nitroecc_pkg::*;
(
  input  logic  clock,
  input  logic  reset,
  input  logic  start,
  input  logic  invalidate,
  input  u256_t a,
  input  u256_t b,
  output u256_t q,
  output u256_t r,
  output logic  ready,
  output logic  busy,
  output logic  out_valid
);

  localparam int unsigned CNT_W = $clog2(WORD_W + 1);

  logic [CNT_W-1:0] bits_left;
  u256_t            quo_q;    // dividend bits still to use, quotient bits below
  u256_t            rem_q;    // partial remainder, always below b
  u256_t            b_q;

  logic [WORD_W:0] rem_shift, diff;

  assign busy  = (bits_left != '0);
  assign ready = !busy;
  assign q     = quo_q;
  assign r     = rem_q;

  always_comb begin
    rem_shift = {rem_q, quo_q[WORD_W-1]};
    diff      = rem_shift - {1'b0, b_q};
  end

  always_ff @(posedge clock) begin
    if (reset) begin
      bits_left <= '0;
      out_valid <= 1'b0;
      quo_q     <= '0;
      rem_q     <= '0;
      b_q       <= '0;
    end else if (start && ready) begin
      bits_left <= CNT_W'(WORD_W);
      out_valid <= 1'b0;
      quo_q     <= a;
      rem_q     <= '0;
      b_q       <= b;
    end else if (busy) begin
      if (!diff[WORD_W]) begin
        rem_q <= diff[WORD_W-1:0];
        quo_q <= {quo_q[WORD_W-2:0], 1'b1};
      end else begin
        rem_q <= rem_shift[WORD_W-1:0];
        quo_q <= {quo_q[WORD_W-2:0], 1'b0};
      end
      bits_left <= bits_left - 1'b1;
      if (bits_left == CNT_W'(1)) out_valid <= !invalidate;
      else if (invalidate)        out_valid <= 1'b0;
    end else if (invalidate) begin
      out_valid <= 1'b0;
    end
  end

endmodule
