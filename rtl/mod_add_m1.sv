// Modulo 2^n-1 adder.
//
// Two n-bit adders work side by side on the operands: one forms x+y, the
// other x+y+1. When x+y+1 carries out of n bits, x+y is at least 2^n-1, and
// the n low bits of x+y+1 are exactly x+y-(2^n-1); otherwise x+y is already
// below the modulus. A 2:1 multiplexer, steered by that carry, picks the
// result. This is the two-adder-and-multiplexer structure of the design;
// taking the select from the carry of the x+y+1 adder is this
// implementation's reading of it.
//
// Interface: x, y are residues in 0..2^n-1, where the all-ones word is
// accepted as a second spelling of zero. The sum s is in 0..2^n-2 unless
// both operands are all-ones, in which case it is all-ones (zero again).
// Purely combinational.
module mod_add_m1 #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N-1:0] s
);

  logic [N-1:0] sum0; // x + y, low n bits
  logic [N:0] sum1;   // x + y + 1

  always_comb begin
    sum0 = x + y;
    sum1 = {1'b0, x} + {1'b0, y} + (N + 1)'(1);
    s    = sum1[N] ? sum1[N-1:0] : sum0;
  end

endmodule
