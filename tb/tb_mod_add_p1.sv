// Self-checking testbench for mod_add_p1 (modulo 2^n+1 adder).
// Exhaustive over all pairs of residues 0..2^n at n = 8, compared with
// (x + y) % (2^n + 1). Also counts how often the corrected sum was the
// right answer, so both multiplexer inputs are known to be exercised.
module tb_mod_add_p1;
  localparam int unsigned N = 8;
  localparam int unsigned M = (1 << N) + 1;

  logic [N:0] x, y, s;
  int checks = 0, failures = 0, wraps = 0;

  mod_add_p1 #(.N(N)) dut (.x, .y, .s);

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < M; a++) begin
      for (int b = 0; b < M; b++) begin
        x = (N+1)'(a); y = (N+1)'(b);
        #1;
        checks++;
        if (a + b >= M) wraps++;
        if (int'(s) != (a + b) % M) begin
          failures++;
          if (failures < 10) $display("FAIL %0d + %0d -> %0d", a, b, s);
        end
      end
    end
    checks++;
    if (wraps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
