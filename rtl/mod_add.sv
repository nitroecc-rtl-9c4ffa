// mod_add: modular adder, out = (a + b) mod P, registered.
//
// Each operand is first brought into [0, P) with one conditional subtraction
// of P, the two are added into a 257-bit sum, and one more conditional
// subtraction of P gives the result. The unit has no handshake: the output
// register follows the inputs one clock later, every clock, which is the
// single-cycle adder the NitroECC processor expects.
//
// Interface: a, b and out are 256-bit unsigned; P is the field prime.
// Timing: out is valid one rising edge after a and b are stable.
//
// From the design: a one-cycle, unpipelined adder whose result is reduced
// modulo the curve prime inside the unit, with the prime as a parameter.
// This implementation's own choice: reducing the operands first, so that the
// result is exact for any 256-bit operands as long as P > 2^255 (secp256k1 and
// every other 256-bit prime); for a smaller P, operands must be below 2P.
module mod_add
  import nitroecc_pkg::*;
#(
  parameter u256_t P = SECP256K1_P
) (
  input  logic  clock,
  input  u256_t a,
  input  u256_t b,
  output u256_t out
);

  u256_t a_r, b_r;
  logic [WORD_W:0] sum;
  u256_t           sum_m_p;   // sum - P, only used when sum >= P so it cannot wrap

  always_comb begin
    a_r     = (a >= P) ? a - P : a;
    b_r     = (b >= P) ? b - P : b;
    sum     = {1'b0, a_r} + {1'b0, b_r};
    sum_m_p = sum[WORD_W-1:0] - P;
  end

  always_ff @(posedge clock) begin
    out <= (sum >= {1'b0, P}) ? sum_m_p : sum[WORD_W-1:0];
  end

endmodule
