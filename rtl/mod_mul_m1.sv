// Modulo 2^n-1 multiplier.
//
// The full 2n-bit product P = x*y is split into a high half H and a low
// half L, P = H*2^n + L. Since 2^n = 1 (mod 2^n-1), P mod 2^n-1 is
// (H + L) mod 2^n-1, formed by one modulo 2^n-1 adder. The design names a
// modulo multiplier but not its structure; this product-then-fold form is
// the simplest one that works.
//
// Interface: x, y in 0..2^n-1 (all-ones read as zero); p = x*y mod 2^n-1
// in 0..2^n-2 (H is at most 2^n-2, so the result is always reduced).
// Purely combinational.
module mod_mul_m1 #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N-1:0] p
);

  logic [2*N-1:0] prod;

  assign prod = {{N{1'b0}}, x} * {{N{1'b0}}, y};

  mod_add_m1 #(.N(N)) u_fold (
    .x(prod[2*N-1:N]),
    .y(prod[N-1:0]),
    .s(p)
  );

endmodule
