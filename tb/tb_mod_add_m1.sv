// Self-checking testbench for mod_add_m1 (modulo 2^n-1 adder).
// Exhaustive over all pairs of reduced operands 0..2^n-2 at n = 8, plus the
// all-ones zero alias against a reduced operand; results are compared with
// (x + y) % (2^n - 1) computed in integer arithmetic.
module tb_mod_add_m1;
  localparam int unsigned N = 8;
  localparam int unsigned M = (1 << N) - 1;

  logic [N-1:0] x, y, s;
  int checks = 0, failures = 0;

  mod_add_m1 #(.N(N)) dut (.x, .y, .s);

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
        if (int'(s) != (a + b) % M) begin
          failures++;
          if (failures < 10) $display("FAIL %0d + %0d -> %0d", a, b, s);
        end
      end
    end
    // all-ones is a second spelling of zero
    for (int b = 0; b < M; b++) begin
      x = '1; y = N'(b);
      #1;
      checks++;
      if (int'(s) != b) begin
        failures++;
        $display("FAIL alias 1s + %0d -> %0d", b, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
