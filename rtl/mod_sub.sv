// mod_sub: modular subtracter, out = (a - b) mod P, registered.
//
// Each operand is first brought into [0, P) with one conditional subtraction
// of P. If a >= b the result is a - b, otherwise P - (b - a), which is the
// non-negative representative of the negative difference. Like the adder the
// unit has no handshake: the output register follows the inputs one clock
// later, every clock.
//
// Interface: a (minuend), b (subtrahend) and out are 256-bit unsigned.
// Timing: out is valid one rising edge after a and b are stable.
//
// From the design: a single-cycle subtracter that wraps a negative difference
// back into the field, with the prime as a parameter. This implementation's
// own choice: reducing the operands first, so that the result is exact for any
// 256-bit operands when P > 2^255.
module mod_sub
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

  always_comb begin
    a_r = (a >= P) ? a - P : a;
    b_r = (b >= P) ? b - P : b;
  end

  always_ff @(posedge clock) begin
    out <= (b_r > a_r) ? P - (b_r - a_r) : a_r - b_r;
  end

endmodule
