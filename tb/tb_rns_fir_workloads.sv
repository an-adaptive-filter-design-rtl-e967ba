// Workload testbench: the two low-pass filter sizes, run side by side on
// the same random 16-bit input stream with random gaps in in_valid.
//   lpf4  rns_fir_top at its defaults: 4 taps, coefficients 9, 23, 23, 9
//   lpf8  rns_fir_top with 8 taps, coefficients 2, 5, 9, 16, 16, 9, 5, 2
// Both coefficient sets sum to 64, so full-scale inputs give outputs up
// to 64*(2^16-1), inside the dynamic range 2^24-2^8 of n = 8. Each output
// is compared with the integer convolution and must arrive three clock
// edges after its sample.
module tb_rns_fir_workloads;
  localparam int unsigned N  = 8;
  localparam int unsigned XW = 2 * N;
  localparam int unsigned T8 = 8;
  localparam logic [T8*N-1:0] COEF8 = {8'd2, 8'd5, 8'd9, 8'd16, 8'd16, 8'd9, 8'd5, 8'd2};
  localparam int unsigned C4 [4]  = '{9, 23, 23, 9};
  localparam int unsigned C8 [T8] = '{2, 5, 9, 16, 16, 9, 5, 2};

  logic           clk = 1'b0, rst_n = 1'b0;
  logic           in_valid = 1'b0;
  logic [XW-1:0]  x = '0;
  logic           v4, v8;
  logic [3*N-1:0] y4, y8;

  rns_fir_top                                   u_lpf4 (.clk, .rst_n, .in_valid, .x, .out_valid(v4), .y(y4));
  rns_fir_top #(.TAPS(T8), .COEF(COEF8))        u_lpf8 (.clk, .rst_n, .in_valid, .x, .out_valid(v8), .y(y8));

  longint unsigned hist [T8];
  longint unsigned e4 [$], e8 [$];
  longint          due [$];
  longint          edge_no = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  always @(posedge clk) edge_no++;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    if (due.size() > 0 && due[0] == edge_no) begin
      checks += 2;
      if (!v4 || longint'(y4) != e4[0]) begin
        failures++;
        if (failures < 20) $display("FAIL lpf4 edge %0d: y=%0d want %0d", edge_no, y4, e4[0]);
      end
      if (!v8 || longint'(y8) != e8[0]) begin
        failures++;
        if (failures < 20) $display("FAIL lpf8 edge %0d: y=%0d want %0d", edge_no, y8, e8[0]);
      end
      void'(e4.pop_front());
      void'(e8.pop_front());
      void'(due.pop_front());
    end else if (rst_n && (v4 || v8)) begin
      checks++;
      failures++;
    end
  end

  initial begin
    longint unsigned s, a4, a8;
    for (int i = 0; i < T8; i++) hist[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 5000; k++) begin
      @(negedge clk);
      if ($urandom_range(0, 4) == 0) begin
        in_valid = 1'b0;
        @(negedge clk);
      end
      s = (k < 16) ? ((longint'(1) << XW) - 1) : longint'($urandom) & ((1 << XW) - 1);
      in_valid = 1'b1;
      x = XW'(s);
      for (int i = T8 - 1; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = s;
      a4 = 0;
      a8 = 0;
      for (int i = 0; i < 4; i++)  a4 += C4[i] * hist[i];
      for (int i = 0; i < T8; i++) a8 += C8[i] * hist[i];
      e4.push_back(a4);
      e8.push_back(a8);
      due.push_back(edge_no + 3);
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (6) @(negedge clk);
    checks++;
    if (due.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
