// Modulo 2^n+1 multiplier.
//
// The full product P = x*y (at most 2^2n, 2n+1 bits) is split as
// P = H*2^n + L with L the n low bits and H the n+1 high bits. Since
// 2^n = -1 (mod 2^n+1), P mod 2^n+1 is (L - H) mod 2^n+1: H is negated
// modulo 2^n+1 (2^n+1-H, or 0 when H is 0) and added to L by one modulo
// 2^n+1 adder. The design names a modulo multiplier but not its structure;
// this product-then-fold form is the simplest one that works.
//
// Interface: x, y in 0..2^n (n+1 bits); p = x*y mod 2^n+1 in 0..2^n.
// Purely combinational.
module mod_mul_p1 #(
  parameter int unsigned N = 8
) (
  input  logic [N:0] x,
  input  logic [N:0] y,
  output logic [N:0] p
);

  localparam logic [N+1:0] MODV = (N + 2)'((1 << N) + 1);   // 2^n + 1

  logic [2*N+1:0] prod;
  logic [N:0]     hi_neg;
  logic [N+1:0]   diff;

  always_comb begin
    prod   = {{(N+1){1'b0}}, x} * {{(N+1){1'b0}}, y};
    diff   = MODV - {1'b0, prod[2*N:N]};
    hi_neg = (prod[2*N:N] == '0) ? '0 : diff[N:0];
  end

  mod_add_p1 #(.N(N)) u_fold (
    .x({1'b0, prod[N-1:0]}),
    .y(hi_neg),
    .s(p)
  );

endmodule
