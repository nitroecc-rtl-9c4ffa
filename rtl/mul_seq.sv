// mul_seq: sequential modular multiplier, out = (multiplicand * multiplier)
// mod P, one multiplier bit per clock, 256 clocks per product.
//
// Bit-serial interleaved multiplication, most significant multiplier bit
// first: the accumulator r starts at 0 and each clock becomes
//   r = (2*r + bit * A) mod P,
// where A is the multiplicand reduced below P. Since r and A are below P,
// 2*r + A is below 3P and the reduction is a choice among t, t-P and t-2P.
// After the last bit, r holds the product modulo P and is the output register.
//
// Interface: a one-clock start pulse, taken only while the unit is idle
// (ready = 1), latches both operands. busy is high for the 256 working clocks.
// out_valid is set when the product is complete and cleared by start or by
// invalidate (the processor pulses invalidate when it loads a new operand).
// Timing: start at edge k; out is final and out_valid rises at edge k+256.
//
// From the design: a sequential multiplier of 256 clocks whose output is
// reduced modulo the curve prime, with start/ready signalling and the prime
// as a parameter. The design calls its multiplier a Booth multiplier and
// reduces a full 512-bit product at the end; reducing at every step instead
// is this implementation's choice, so that no 512-bit modulo is needed.
// Exact for any 256-bit operands when P > 2^255.
module mul_seq
  import nitroecc_pkg::*;
#(
  parameter u256_t P = SECP256K1_P
) (
  input  logic  clock,
  input  logic  reset,
  input  logic  start,
  input  logic  invalidate,
  input  u256_t multiplicand,
  input  u256_t multiplier,
  output u256_t out,
  output logic  ready,
  output logic  busy,
  output logic  out_valid
);

  localparam int unsigned CNT_W = $clog2(WORD_W + 1);

  logic [CNT_W-1:0] bits_left;
  u256_t            a_q;      // multiplicand, reduced below P
  u256_t            b_q;      // multiplier, shifted left each clock
  u256_t            r_q;      // accumulator, always below P

  logic [WORD_W+1:0] t;
  u256_t             t_m_p, t_m_2p;   // t - P and t - 2P, taken modulo 2^256
  u256_t             r_next;

  assign busy  = (bits_left != '0);
  assign ready = !busy;
  assign out   = r_q;

  always_comb begin
    t      = {1'b0, r_q, 1'b0} + (b_q[WORD_W-1] ? {2'b00, a_q} : '0);
    t_m_p  = t[WORD_W-1:0] - P;
    t_m_2p = t[WORD_W-1:0] - {P[WORD_W-2:0], 1'b0};
    if (t >= {1'b0, P, 1'b0})  r_next = t_m_2p;
    else if (t >= {2'b00, P})  r_next = t_m_p;
    else                       r_next = t[WORD_W-1:0];
  end

  always_ff @(posedge clock) begin
    if (reset) begin
      bits_left <= '0;
      out_valid <= 1'b0;
      r_q       <= '0;
      a_q       <= '0;
      b_q       <= '0;
    end else if (start && ready) begin
      bits_left <= CNT_W'(WORD_W);
      out_valid <= 1'b0;
      r_q       <= '0;
      a_q       <= (multiplicand >= P) ? multiplicand - P : multiplicand;
      b_q       <= multiplier;
    end else if (busy) begin
      r_q       <= r_next;
      b_q       <= b_q << 1;
      bits_left <= bits_left - 1'b1;
      if (bits_left == CNT_W'(1)) out_valid <= !invalidate;
      else if (invalidate)        out_valid <= 1'b0;
    end else if (invalidate) begin
      out_valid <= 1'b0;
    end
  end

endmodule
