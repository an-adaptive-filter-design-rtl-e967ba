// Reverse converter: residues in {2^n+1, 2^n, 2^n-1} back to binary.
//
// The output is rebuilt in mixed-radix form, X = r2 + 2^n * Z, where r2 is
// the residue modulo 2^n and Z < (2^n+1)(2^n-1). The residues of Z follow
// from those of X with constant inverses that cost nothing in hardware:
//   z1 = Z mod 2^n+1 = (r2 - r1) mod 2^n+1        (inverse of 2^n is -1)
//   z3 = Z mod 2^n-1 = (r3 - r2) mod 2^n-1        (inverse of 2^n is  1)
// and Z = z1 + (2^n+1) * W with
//   W  = (z3 - z1) * 2^(n-1) mod 2^n-1            (inverse of 2^n+1 is 2^(n-1))
// Multiplying by 2^(n-1) modulo 2^n-1 is a one-bit rotation to the right,
// and (2^n+1) * W is W shifted by n bits plus W. So the converter is four
// modulo adders, one rotation and one 2n-bit adder; no multiplier and no
// table. The design names an RNS-to-binary converter for this moduli set
// built on the New Chinese Remainder Theorem but gives no structure; the
// structure here is this implementation's own, and gives the same X.
//
// Interface: r1 in 0..2^n (n+1 bits), r2 in 0..2^n-1, r3 in 0..2^n-1
// (all-ones read as zero). x is the unique value in 0..M-1,
// M = 2^3n - 2^n, with those residues. Purely combinational.
module rns_to_binary #(
  parameter int unsigned N = 8
) (
  input  logic [N:0]     r1,   // mod 2^n+1
  input  logic [N-1:0]   r2,   // mod 2^n
  input  logic [N-1:0]   r3,   // mod 2^n-1
  output logic [3*N-1:0] x
);

  localparam logic [N+1:0] MODP = (N + 2)'((1 << N) + 1);   // 2^n + 1

  logic [N:0]     r1_neg;     // -r1 mod 2^n+1
  logic [N+1:0]   r1_diff;
  logic [N:0]     z1;         // Z mod 2^n+1, 0..2^n
  logic [N-1:0]   z3_raw;
  logic [N-1:0]   z3;         // Z mod 2^n-1, fully reduced
  logic [N-1:0]   z1_m1;      // z1 mod 2^n-1
  logic [N-1:0]   d;          // (z3 - z1) mod 2^n-1
  logic [N-1:0]   w;
  logic [2*N-1:0] z;

  always_comb begin
    r1_diff = MODP - {1'b0, r1};
    r1_neg  = (r1 == '0) ? '0 : r1_diff[N:0];
  end

  // z1 = (r2 - r1) mod 2^n+1
  mod_add_p1 #(.N(N)) u_z1 (.x({1'b0, r2}), .y(r1_neg), .s(z1));

  // z3 = (r3 - r2) mod 2^n-1; ~r2 is -r2 modulo 2^n-1
  mod_add_m1 #(.N(N)) u_z3 (.x(r3), .y(~r2), .s(z3_raw));
  assign z3 = (&z3_raw) ? '0 : z3_raw;

  // z1 mod 2^n-1: z1 = z1[n]*2^n + low bits, and 2^n = 1
  mod_add_m1 #(.N(N)) u_z1m (.x(z1[N-1:0]), .y({{(N-1){1'b0}}, z1[N]}), .s(z1_m1));

  // d = (z3 - z1) mod 2^n-1; z3 is reduced, so d is too
  mod_add_m1 #(.N(N)) u_d (.x(z3), .y(~z1_m1), .s(d));

  always_comb begin
    w = {d[0], d[N-1:1]};                                      // d * 2^(n-1)
    z = {{(N-1){1'b0}}, z1} + {w, {N{1'b0}}} + {{N{1'b0}}, w}; // z1 + (2^n+1)*w
    x = {z, r2};
  end

endmodule
