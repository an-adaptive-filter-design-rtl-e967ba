// One residue channel of the RNS FIR filter: y(k) = sum_i b_i x(k-i),
// computed entirely modulo one modulus of the set {2^n+1, 2^n, 2^n-1}.
//
// Each channel is an ordinary direct-form FIR filter whose word length is
// only that of one residue: a tapped delay line of TAPS residues, one
// modulo multiplier per tap (by the coefficient's residue, computed at
// elaboration from the binary coefficient COEF), and a chain of TAPS-1
// modulo adders. KIND selects the arithmetic: modulo 2^n-1 and 2^n+1 use
// mod_mul_m1/mod_add_m1 and mod_mul_p1/mod_add_p1, modulo 2^n is plain
// n-bit arithmetic whose carries are dropped. Three such channels run in
// parallel and independently, with no carries between them.
//
// Timing (this implementation's choice; none is prescribed): on a rising
// clk edge with in_valid high, in_res is shifted into the delay line. The
// tap sum of the updated delay line is registered on the next edge, where
// out_valid rises for one cycle. So out_res follows in_res by two clock
// edges; with in_valid low the delay line holds. rst_n is an asynchronous,
// active-low reset that clears the delay line (zero history) and the output.
//
// COEF packs the TAPS binary coefficients, b_0 in the lowest N bits.
module rns_fir_channel
  import rns_pkg::*;
#(
  parameter modulus_e          KIND = MOD_2N_M1,
  parameter int unsigned       N    = 8,
  parameter int unsigned       TAPS = 4,
  parameter logic [TAPS*N-1:0] COEF = {8'd9, 8'd23, 8'd23, 8'd9},
  parameter int unsigned       RW   = residue_width(KIND, N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [RW-1:0] in_res,
  output logic          out_valid,
  output logic [RW-1:0] out_res
);

  localparam longint unsigned MODV = modulus_value(KIND, N);

  logic [RW-1:0] taps  [TAPS];   // taps[i] holds x(k-i)
  logic [RW-1:0] prods [TAPS];   // b_i * x(k-i) mod m
  logic [RW-1:0] acc   [TAPS];   // running sums, acc[TAPS-1] is y(k) mod m
  logic          valid_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < TAPS; i++) taps[i] <= '0;
      valid_q <= 1'b0;
    end else begin
      valid_q <= in_valid;
      if (in_valid) begin
        taps[0] <= in_res;
        for (int i = 1; i < TAPS; i++) taps[i] <= taps[i-1];
      end
    end
  end

  for (genvar i = 0; i < TAPS; i++) begin : g_tap
    localparam longint unsigned   COEF_I = longint'(COEF[i*N +: N]);
    localparam logic [RW-1:0]     CRES   = RW'(COEF_I % MODV);

    if (KIND == MOD_2N_M1) begin : g_m1
      mod_mul_m1 #(.N(N)) u_mul (.x(taps[i]), .y(CRES), .p(prods[i]));
      if (i == 0) begin : g_first
        assign acc[0] = prods[0];
      end else begin : g_add
        mod_add_m1 #(.N(N)) u_add (.x(acc[i-1]), .y(prods[i]), .s(acc[i]));
      end
    end else if (KIND == MOD_2N_P1) begin : g_p1
      mod_mul_p1 #(.N(N)) u_mul (.x(taps[i]), .y(CRES), .p(prods[i]));
      if (i == 0) begin : g_first
        assign acc[0] = prods[0];
      end else begin : g_add
        mod_add_p1 #(.N(N)) u_add (.x(acc[i-1]), .y(prods[i]), .s(acc[i]));
      end
    end else begin : g_2n
      assign prods[i] = RW'(taps[i] * CRES);
      if (i == 0) begin : g_first
        assign acc[0] = prods[0];
      end else begin : g_add
        assign acc[i] = acc[i-1] + prods[i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_res   <= '0;
    end else begin
      out_valid <= valid_q;
      if (valid_q) out_res <= acc[TAPS-1];
    end
  end

endmodule
