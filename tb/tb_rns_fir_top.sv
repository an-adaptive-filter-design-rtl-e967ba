// End-to-end testbench for rns_fir_top at its default parameters
// (n = 8, 4 taps, 16-bit samples, coefficients 9, 23, 23, 9).
// It plays an impulse, a full-scale impulse, a full-scale step, a
// full-scale alternating signal and a long random stream with random gaps
// in in_valid, then resets and plays a second random stream. Every output
// is compared with y(k) = sum b_i x(k-i) computed in plain integers, and
// must arrive exactly three clock edges after its sample.
// It also counts the events the RNS data path depends on, worked out from
// the reference values, and fails if one never happened:
//   p1_wrap   a partial sum of the mod 2^n+1 channel passed the modulus
//   m1_wrap   a partial sum of the mod 2^n-1 channel passed the modulus
//   mid_block a sample with a non-zero middle n-bit block (forward converter)
//   hi_out    an output of 2n bits or more (top block of the reverse converter)
//   gap       in_valid low in the middle of a stream (the filter holds)
module tb_rns_fir_top;
  localparam int unsigned N    = 8;
  localparam int unsigned TAPS = 4;
  localparam int unsigned XW   = 2 * N;
  localparam int unsigned COEF [TAPS] = '{9, 23, 23, 9};   // b_0 .. b_3
  localparam int unsigned MP = (1 << N) + 1;
  localparam int unsigned MM = (1 << N) - 1;

  logic           clk = 1'b0, rst_n = 1'b0;
  logic           in_valid = 1'b0;
  logic [XW-1:0]  x = '0;
  logic           out_valid;
  logic [3*N-1:0] y;

  rns_fir_top dut (.clk, .rst_n, .in_valid, .x, .out_valid, .y);

  longint unsigned hist [TAPS];
  longint unsigned exp_val [$];
  longint          exp_due [$];
  longint          edge_no = 0;
  int checks = 0, failures = 0, outputs = 0;
  int p1_wrap = 0, m1_wrap = 0, mid_block = 0, hi_out = 0, gap = 0;

  always #5 clk = ~clk;
  always @(posedge clk) edge_no++;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    if (exp_due.size() > 0 && exp_due[0] == edge_no) begin
      checks++;
      outputs++;
      if (!out_valid || longint'(y) != exp_val[0]) begin
        failures++;
        if (failures < 20) $display("FAIL edge %0d: valid=%0b y=%0d want %0d",
                                    edge_no, out_valid, y, exp_val[0]);
      end
      void'(exp_val.pop_front());
      void'(exp_due.pop_front());
    end else if (rst_n && out_valid) begin
      checks++;
      failures++;
      if (failures < 20) $display("FAIL edge %0d: unexpected out_valid", edge_no);
    end
  end

  // model one accepted sample: shift, convolve, count events
  task automatic accept(input longint unsigned s);
    longint unsigned yv = 0, ap = 0, am = 0;
    for (int i = TAPS - 1; i > 0; i--) hist[i] = hist[i-1];
    hist[0] = s;
    for (int i = 0; i < TAPS; i++) begin
      yv += COEF[i] * hist[i];
      ap += longint'(COEF[i] % MP) * (hist[i] % MP) % MP;
      am += longint'(COEF[i] % MM) * (hist[i] % MM) % MM;
    end
    if (ap >= MP) p1_wrap++;
    if (am >= MM) m1_wrap++;
    if ((s >> N) != 0) mid_block++;
    if ((yv >> (2 * N)) != 0) hi_out++;
    exp_val.push_back(yv);
    exp_due.push_back(edge_no + 3);
  endtask

  task automatic drive(input longint unsigned s, input bit allow_gap);
    @(negedge clk);
    if (allow_gap && $urandom_range(0, 4) == 0) begin
      in_valid = 1'b0;
      x = XW'($urandom);
      gap++;
      @(negedge clk);
    end
    in_valid = 1'b1;
    x = XW'(s);
    accept(s);
  endtask

  task automatic idle(input int cycles);
    @(negedge clk);
    in_valid = 1'b0;
    repeat (cycles) @(negedge clk);
  endtask

  task automatic flush();
    for (int i = 0; i < TAPS; i++) drive(0, 1'b0);
  endtask

  initial begin
    longint unsigned full = (longint'(1) << XW) - 1;
    for (int i = 0; i < TAPS; i++) hist[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    drive(1, 1'b0);          // unit impulse: the coefficients come out
    flush();
    drive(full, 1'b0);       // full-scale impulse
    flush();
    for (int i = 0; i < 8; i++) drive(full, 1'b0);   // full-scale step
    for (int i = 0; i < 8; i++) drive((i % 2) ? full : 0, 1'b0);
    flush();
    for (int i = 0; i < 3000; i++) drive(longint'($urandom) & full, 1'b1);
    idle(6);

    // reset clears the filter history
    drive(full, 1'b0);
    @(negedge clk);
    in_valid = 1'b0;
    rst_n = 1'b0;
    exp_val.delete();
    exp_due.delete();
    for (int i = 0; i < TAPS; i++) hist[i] = 0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) drive(longint'($urandom) & full, 1'b1);
    idle(6);

    checks++;
    if (exp_due.size() != 0) begin
      failures++;
      $display("FAIL %0d outputs never came", exp_due.size());
    end
    $display("events: outputs=%0d p1_wrap=%0d m1_wrap=%0d mid_block=%0d hi_out=%0d gap=%0d",
             outputs, p1_wrap, m1_wrap, mid_block, hi_out, gap);
    checks += 5;
    if (p1_wrap == 0)   begin failures++; $display("FAIL no mod 2^n+1 wrap"); end
    if (m1_wrap == 0)   begin failures++; $display("FAIL no mod 2^n-1 wrap"); end
    if (mid_block == 0) begin failures++; $display("FAIL no middle input block"); end
    if (hi_out == 0)    begin failures++; $display("FAIL no output of 2n bits or more"); end
    if (gap == 0)       begin failures++; $display("FAIL no gap in in_valid"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
