// Self-checking testbench for rns_fir_channel.
// Six channels run side by side: one per modulus with the default
// coefficients (9, 23, 23, 9) and one per modulus with the wide
// coefficients (128, 1, 200, 255), so that products and partial sums wrap.
// Every channel gets its own random residue stream with random gaps in
// in_valid. The expected output is the convolution of the stream with the
// coefficient residues, reduced with %, and must appear exactly two clock
// edges after the sample that completes it. A reset in the middle checks
// that the history is cleared.
module tb_rns_fir_channel;
  import rns_pkg::*;

  localparam int unsigned N    = 8;
  localparam int unsigned TAPS = 4;
  localparam logic [TAPS*N-1:0] COEF_A = {8'd9, 8'd23, 8'd23, 8'd9};
  localparam logic [TAPS*N-1:0] COEF_B = {8'd255, 8'd200, 8'd1, 8'd128};
  localparam int NCH = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  logic          in_valid [NCH];
  logic [N:0]    in_res   [NCH];
  logic          out_valid[NCH];
  logic [N:0]    out_res  [NCH];

  int unsigned modv [NCH];
  int unsigned coef [NCH][TAPS];
  int unsigned hist [NCH][TAPS];
  int unsigned exp_val [NCH][$];
  longint      exp_due [NCH][$];
  longint      edge_no = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  always @(posedge clk) edge_no++;

  rns_fir_channel #(.KIND(MOD_2N_P1), .N(N), .TAPS(TAPS), .COEF(COEF_A)) u0 (
    .clk, .rst_n, .in_valid(in_valid[0]), .in_res(in_res[0]),
    .out_valid(out_valid[0]), .out_res(out_res[0]));
  rns_fir_channel #(.KIND(MOD_2N), .N(N), .TAPS(TAPS), .COEF(COEF_A)) u1 (
    .clk, .rst_n, .in_valid(in_valid[1]), .in_res(in_res[1][N-1:0]),
    .out_valid(out_valid[1]), .out_res(out_res[1][N-1:0]));
  rns_fir_channel #(.KIND(MOD_2N_M1), .N(N), .TAPS(TAPS), .COEF(COEF_A)) u2 (
    .clk, .rst_n, .in_valid(in_valid[2]), .in_res(in_res[2][N-1:0]),
    .out_valid(out_valid[2]), .out_res(out_res[2][N-1:0]));
  rns_fir_channel #(.KIND(MOD_2N_P1), .N(N), .TAPS(TAPS), .COEF(COEF_B)) u3 (
    .clk, .rst_n, .in_valid(in_valid[3]), .in_res(in_res[3]),
    .out_valid(out_valid[3]), .out_res(out_res[3]));
  rns_fir_channel #(.KIND(MOD_2N), .N(N), .TAPS(TAPS), .COEF(COEF_B)) u4 (
    .clk, .rst_n, .in_valid(in_valid[4]), .in_res(in_res[4][N-1:0]),
    .out_valid(out_valid[4]), .out_res(out_res[4][N-1:0]));
  rns_fir_channel #(.KIND(MOD_2N_M1), .N(N), .TAPS(TAPS), .COEF(COEF_B)) u5 (
    .clk, .rst_n, .in_valid(in_valid[5]), .in_res(in_res[5][N-1:0]),
    .out_valid(out_valid[5]), .out_res(out_res[5][N-1:0]));

  // the unused top bit of the n-bit channels' output slots
  for (genvar c = 1; c < NCH; c++) begin : g_tie
    if (c != 3) begin : g_t
      assign out_res[c][N] = 1'b0;
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker, just after each rising edge
  always @(posedge clk) begin
    #1;
    for (int c = 0; c < NCH; c++) begin
      if (exp_due[c].size() > 0 && exp_due[c][0] == edge_no) begin
        checks++;
        if (!out_valid[c] || int'(out_res[c]) != exp_val[c][0]) begin
          failures++;
          if (failures < 20) $display("FAIL ch%0d edge %0d: valid=%0b got %0d want %0d",
                                      c, edge_no, out_valid[c], out_res[c], exp_val[c][0]);
        end
        void'(exp_val[c].pop_front());
        void'(exp_due[c].pop_front());
      end else if (rst_n && out_valid[c]) begin
        checks++;
        failures++;
        if (failures < 20) $display("FAIL ch%0d edge %0d: unexpected out_valid", c, edge_no);
      end
    end
  end

  task automatic clear_history();
    for (int c = 0; c < NCH; c++)
      for (int i = 0; i < TAPS; i++) hist[c][i] = 0;
  endtask

  task automatic run(input int samples);
    for (int k = 0; k < samples; k++) begin
      @(negedge clk);
      for (int c = 0; c < NCH; c++) begin
        in_valid[c] = ($urandom_range(0, 3) != 0);
        in_res[c]   = (N+1)'($urandom_range(0, modv[c] - 1));
        if (in_valid[c]) begin
          longint unsigned acc = 0;
          for (int i = TAPS - 1; i > 0; i--) hist[c][i] = hist[c][i-1];
          hist[c][0] = int'(in_res[c]);
          for (int i = 0; i < TAPS; i++) acc += longint'(coef[c][i] % modv[c]) * hist[c][i];
          exp_val[c].push_back(int'(acc % modv[c]));
          exp_due[c].push_back(edge_no + 2);
        end
      end
    end
    @(negedge clk);
    for (int c = 0; c < NCH; c++) in_valid[c] = 1'b0;
    repeat (4) @(negedge clk);
  endtask

  initial begin
    for (int c = 0; c < NCH; c++) begin
      modv[c] = (c % 3 == 0) ? (1 << N) + 1 : (c % 3 == 1) ? (1 << N) : (1 << N) - 1;
      for (int i = 0; i < TAPS; i++)
        coef[c][i] = (c < 3) ? int'(COEF_A[i*N +: N]) : int'(COEF_B[i*N +: N]);
      in_valid[c] = 1'b0;
      in_res[c]   = '0;
    end
    clear_history();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(2000);
    // reset in the middle of a stream clears the delay line
    @(negedge clk);
    for (int c = 0; c < NCH; c++) in_valid[c] = 1'b1;
    @(negedge clk);
    rst_n = 1'b0;
    for (int c = 0; c < NCH; c++) begin
      in_valid[c] = 1'b0;
      exp_val[c].delete();
      exp_due[c].delete();
    end
    clear_history();
    @(negedge clk);
    rst_n = 1'b1;
    run(2000);
    for (int c = 0; c < NCH; c++) begin
      checks++;
      if (exp_due[c].size() != 0) begin
        failures++;
        $display("FAIL ch%0d: %0d outputs never came", c, exp_due[c].size());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
