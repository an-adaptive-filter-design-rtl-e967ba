// Forward converter: binary to residues in the moduli set {2^n+1, 2^n, 2^n-1}.
//
// The 3n-bit input X is cut into three n-bit blocks, X = B1*2^2n + B2*2^n + B3
// (B1 most significant). Because 2^n = 0, 1 and -1 modulo 2^n, 2^n-1 and
// 2^n+1, the residues need no division:
//   R2 = X mod 2^n   = B3                         (a plain wire)
//   R3 = X mod 2^n-1 = B3 + B2 + B1   mod 2^n-1   (two modulo 2^n-1 adders)
//   R1 = X mod 2^n+1 = B3 - B2 + B1   mod 2^n+1   (two modulo 2^n+1 adders)
// The block arrangement (first adder of each pair on B2 and B3, second adder
// adding B1, R2 taken straight from B3) follows the design's converter
// diagram. Two details are this implementation's own: B2 enters the first
// modulo 2^n+1 adder negated (2^n+1-B2, or 0), which the weight -1 of 2^n
// requires, and the modulo 2^n-1 result is folded from the all-ones word
// to 0, so that R3 is always fully reduced.
//
// Interface: x is the 3n-bit unsigned input; r1 (n+1 bits), r2 and r3
// (n bits) are its residues. Purely combinational.
module binary_to_rns #(
  parameter int unsigned N = 8
) (
  input  logic [3*N-1:0] x,
  output logic [N:0]     r1,   // x mod 2^n+1
  output logic [N-1:0]   r2,   // x mod 2^n
  output logic [N-1:0]   r3    // x mod 2^n-1
);

  localparam logic [N+1:0] MODP = (N + 2)'((1 << N) + 1);   // 2^n + 1

  logic [N-1:0] b1, b2, b3;
  logic [N:0]   b2_neg;        // -B2 mod 2^n+1
  logic [N+1:0] b2_diff;
  logic [N:0]   p1_part;       // (B3 - B2) mod 2^n+1
  logic [N-1:0] m1_part;       // (B3 + B2) mod 2^n-1
  logic [N-1:0] m1_sum;        // (B3 + B2 + B1) mod 2^n-1, all-ones not folded

  assign b1 = x[3*N-1:2*N];
  assign b2 = x[2*N-1:N];
  assign b3 = x[N-1:0];

  always_comb begin
    b2_diff = MODP - {2'b00, b2};
    b2_neg  = (b2 == '0) ? '0 : b2_diff[N:0];
  end

  // modulo 2^n+1 path
  mod_add_p1 #(.N(N)) u_p1_a (.x({1'b0, b3}), .y(b2_neg),      .s(p1_part));
  mod_add_p1 #(.N(N)) u_p1_b (.x(p1_part),    .y({1'b0, b1}),  .s(r1));

  // modulo 2^n path
  assign r2 = b3;

  // modulo 2^n-1 path
  mod_add_m1 #(.N(N)) u_m1_a (.x(b3),      .y(b2), .s(m1_part));
  mod_add_m1 #(.N(N)) u_m1_b (.x(m1_part), .y(b1), .s(m1_sum));

  assign r3 = (&m1_sum) ? '0 : m1_sum;

endmodule
