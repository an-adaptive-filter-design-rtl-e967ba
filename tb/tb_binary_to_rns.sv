// Self-checking testbench for binary_to_rns (forward converter).
// At n = 8 it drives every corner made of blocks 0, 1, 2^n-2 and 2^n-1,
// then 200000 random 24-bit words; at n = 4 it drives all 4096 inputs.
// Each residue is compared with the % operator on the integer input.
module tb_binary_to_rns;
  localparam int unsigned N  = 8;
  localparam int unsigned NS = 4;

  logic [3*N-1:0]  x;
  logic [N:0]      r1;
  logic [N-1:0]    r2, r3;
  logic [3*NS-1:0] xs;
  logic [NS:0]     r1s;
  logic [NS-1:0]   r2s, r3s;
  int checks = 0, failures = 0;

  binary_to_rns #(.N(N))  dut       (.x(x),  .r1(r1),  .r2(r2),  .r3(r3));
  binary_to_rns #(.N(NS)) dut_small (.x(xs), .r1(r1s), .r2(r2s), .r3(r3s));

  task automatic check_big(input longint unsigned v);
    x = (3*N)'(v);
    #1;
    checks++;
    if (longint'(r1) != v % ((1 << N) + 1) || longint'(r2) != v % (1 << N) ||
        longint'(r3) != v % ((1 << N) - 1)) begin
      failures++;
      if (failures < 10) $display("FAIL x=%0d -> %0d %0d %0d", v, r1, r2, r3);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned corner [4] = '{0, 1, (1 << N) - 2, (1 << N) - 1};
    foreach (corner[a]) foreach (corner[b]) foreach (corner[c])
      check_big((longint'(corner[a]) << (2*N)) | (longint'(corner[b]) << N) | corner[c]);
    for (int i = 0; i < 200000; i++) check_big(longint'($urandom) & ((1 << (3*N)) - 1));
    for (int v = 0; v < (1 << (3*NS)); v++) begin
      xs = (3*NS)'(v);
      #1;
      checks++;
      if (int'(r1s) != v % ((1 << NS) + 1) || int'(r2s) != v % (1 << NS) ||
          int'(r3s) != v % ((1 << NS) - 1)) begin
        failures++;
        if (failures < 10) $display("FAIL small x=%0d -> %0d %0d %0d", v, r1s, r2s, r3s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
