// Self-checking testbench for mod_mul_m1 (modulo 2^n-1 multiplier).
// Exhaustive over all pairs of reduced residues at n = 8, compared with
// (x * y) % (2^n - 1) in integer arithmetic.
module tb_mod_mul_m1;
  localparam int unsigned N = 8;
  localparam int unsigned M = (1 << N) - 1;

  logic [N-1:0] x, y, p;
  int checks = 0, failures = 0;

  mod_mul_m1 #(.N(N)) dut (.x, .y, .p);

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < M; a++) begin
      for (int b = 0; b < M; b++) begin
        x = N'(a); y = N'(b);
        #1;
        checks++;
        if (int'(p) != (a * b) % M) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d -> %0d", a, b, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
