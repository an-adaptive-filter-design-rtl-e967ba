// RNS FIR filter, top level: a 4-tap low-pass FIR filter computed in the
// residue number system with moduli {2^n+1, 2^n, 2^n-1}.
//
// Data path: binary_to_rns splits each input sample into its three
// residues; three rns_fir_channel instances, one per modulus, filter the
// residue streams in parallel with short, carry-free word lengths; and
// rns_to_binary rebuilds the binary output from the three channel outputs.
// The result is exact as long as every output lies in the dynamic range
// M = 2^3n - 2^n; with unsigned XW-bit samples and non-negative
// coefficients the worst case is (2^XW - 1) * sum(b_i), checked at
// elaboration.
//
// Taken from the original description: the moduli set, n-bit block forward conversion,
// the three parallel modulo FIR sub-filters, the reverse converter and the
// 4-tap low-pass filter. This implementation's own choices: n = 8, 16-bit
// unsigned samples (so the two lower blocks of the converter carry data),
// the coefficients 9, 23, 23, 9 (symmetric low-pass, DC gain 64), a
// valid-qualified streaming interface, and the register stages.
//
// Timing: a sample x is taken on a rising clk edge with in_valid high; the
// matching y appears with out_valid high three edges later (delay line,
// channel output register, output register after the reverse converter).
// One sample per clock. rst_n is asynchronous and active low; after reset
// the filter history is zero. An assertion checks that the three channels
// stay in step; it is disabled during reset, which is why lint sees rst_n
// used both as an asynchronous reset and as a synchronous signal.
module rns_fir_top
  import rns_pkg::*;
#(
  parameter int unsigned       N    = 8,
  parameter int unsigned       TAPS = 4,
  parameter int unsigned       XW   = 2 * N,
  parameter logic [TAPS*N-1:0] COEF = {8'd9, 8'd23, 8'd23, 8'd9}
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [XW-1:0]  x,
  output logic           out_valid,
  output logic [3*N-1:0] y
);

  // Largest possible output must stay below the dynamic range.
  function automatic longint unsigned coef_sum();
    longint unsigned s = 0;
    for (int i = 0; i < TAPS; i++) s += longint'(COEF[i*N +: N]);
    return s;
  endfunction

  localparam longint unsigned Y_MAX = ((longint'(1) << XW) - 1) * coef_sum();

  if (XW > 3 * N || Y_MAX >= dynamic_range(N)) begin : g_range_error
    $error("rns_fir_top: outputs can exceed the RNS dynamic range");
  end

  logic [N:0]   r1_in;
  logic [N-1:0] r2_in, r3_in;
  logic [N:0]   r1_out;
  logic [N-1:0] r2_out, r3_out;
  logic         v1, v2, v3;
  logic [3*N-1:0] y_comb;

  binary_to_rns #(.N(N)) u_fwd (
    .x ((3*N)'(x)),
    .r1(r1_in),
    .r2(r2_in),
    .r3(r3_in)
  );

  rns_fir_channel #(.KIND(MOD_2N_P1), .N(N), .TAPS(TAPS), .COEF(COEF)) u_ch_p1 (
    .clk, .rst_n, .in_valid, .in_res(r1_in), .out_valid(v1), .out_res(r1_out)
  );

  rns_fir_channel #(.KIND(MOD_2N), .N(N), .TAPS(TAPS), .COEF(COEF)) u_ch_2n (
    .clk, .rst_n, .in_valid, .in_res(r2_in), .out_valid(v2), .out_res(r2_out)
  );

  rns_fir_channel #(.KIND(MOD_2N_M1), .N(N), .TAPS(TAPS), .COEF(COEF)) u_ch_m1 (
    .clk, .rst_n, .in_valid, .in_res(r3_in), .out_valid(v3), .out_res(r3_out)
  );

  rns_to_binary #(.N(N)) u_rev (
    .r1(r1_out),
    .r2(r2_out),
    .r3(r3_out),
    .x (y_comb)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= v1;
      if (v1) y <= y_comb;
    end
  end

  // The three channels are driven alike and must stay in step.
  a_channels_in_step: assert property (@(posedge clk) disable iff (!rst_n)
    (v1 == v2) && (v2 == v3))
    else $error("rns_fir_top: channels out of step");

endmodule
