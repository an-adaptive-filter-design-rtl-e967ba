// Modulo 2^n+1 adder.
//
// A first (n+1)-bit adder forms S = x+y; its carry c0 says S >= 2^(n+1).
// A second (n+1)-bit adder adds the constant 2^n-1 to the n+1 low bits of
// S, which in n+1-bit arithmetic is S-(2^n+1); its carry c1 says
// S >= 2^n+1. When either carry is set the corrected sum is taken,
// otherwise S itself, through one (n+1)-bit 2:1 multiplexer. The delay is
// two (n+1)-bit adders plus the multiplexer, as the design intends.
//
// Interface: x, y are residues in 0..2^n (n+1 bits); s = (x+y) mod 2^n+1,
// also in 0..2^n. Purely combinational.
module mod_add_p1 #(
  parameter int unsigned N = 8
) (
  input  logic [N:0] x,
  input  logic [N:0] y,
  output logic [N:0] s
);

  localparam logic [N:0] CORR = (N + 1)'((1 << N) - 1);   // 2^n - 1

  logic [N+1:0] sum0;   // carry c0 in bit N+1
  logic [N+1:0] sum1;   // carry c1 in bit N+1
  logic         sel;

  always_comb begin
    sum0 = {1'b0, x} + {1'b0, y};
    sum1 = {1'b0, sum0[N:0]} + {1'b0, CORR};
    sel  = sum0[N+1] | sum1[N+1];
    s    = sel ? sum1[N:0] : sum0[N:0];
  end

endmodule
