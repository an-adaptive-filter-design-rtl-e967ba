// Self-checking testbench for rns_to_binary (reverse converter).
// Residues are formed in the testbench with % from a known value X, and the
// converter must return X. At n = 4 every X of the dynamic range 0..4079
// is tried; at n = 8 the ends of the range and 300000 random X in 0..M-1.
// The all-ones spelling of a zero residue mod 2^n-1 is tried too.
module tb_rns_to_binary;
  localparam int unsigned N  = 8;
  localparam int unsigned NS = 4;
  localparam longint unsigned M  = (longint'(1) << (3*N))  - (longint'(1) << N);
  localparam longint unsigned MS = (longint'(1) << (3*NS)) - (longint'(1) << NS);

  logic [N:0]      r1;
  logic [N-1:0]    r2, r3;
  logic [3*N-1:0]  x;
  logic [NS:0]     r1s;
  logic [NS-1:0]   r2s, r3s;
  logic [3*NS-1:0] xs;
  int checks = 0, failures = 0;

  rns_to_binary #(.N(N))  dut       (.r1(r1),  .r2(r2),  .r3(r3),  .x(x));
  rns_to_binary #(.N(NS)) dut_small (.r1(r1s), .r2(r2s), .r3(r3s), .x(xs));

  task automatic check_big(input longint unsigned v, input bit alias_zero);
    r1 = (N+1)'(v % ((1 << N) + 1));
    r2 = N'(v % (1 << N));
    r3 = N'(v % ((1 << N) - 1));
    if (alias_zero && r3 == '0) r3 = '1;
    #1;
    checks++;
    if (longint'(x) != v) begin
      failures++;
      if (failures < 10) $display("FAIL X=%0d -> %0d", v, x);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (longint unsigned v = 0; v < 1000; v++) check_big(v, 1'b0);
    for (longint unsigned v = M - 1000; v < M; v++) check_big(v, 1'b0);
    for (int i = 0; i < 300000; i++) check_big(longint'($urandom) % M, 1'b0);
    for (int k = 0; k < 1000; k++) check_big(longint'(k) * ((1 << N) - 1), 1'b1);
    for (longint unsigned v = 0; v < MS; v++) begin
      r1s = (NS+1)'(v % ((1 << NS) + 1));
      r2s = NS'(v % (1 << NS));
      r3s = NS'(v % ((1 << NS) - 1));
      #1;
      checks++;
      if (longint'(xs) != v) begin
        failures++;
        if (failures < 10) $display("FAIL small X=%0d -> %0d", v, xs);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
