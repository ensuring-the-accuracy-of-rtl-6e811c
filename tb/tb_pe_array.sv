// tb_pe_array: multiplies random 16 x K activation and K x 16 weight matrices
// (K = 16 and K = 40) on the default 16 x 16 array. The testbench itself skews
// the inputs (row i gets A[i][k] at step k+i, column j gets W[k][j] at step
// k+j), runs K+30 steps and checks every PE's sum against the matrix product
// computed here. A second product without clear checks accumulation on top of
// the first.
module tb_pe_array;
  localparam int R = 16, C = 16;
  logic clk = 0, rst_n = 0, clear = 0;
  logic signed [15:0] a_left [R];
  logic signed [15:0] w_top [C];
  logic signed [39:0] acc [R][C];
  int checks = 0, failures = 0;
  longint expv [R][C];

  pe_array dut (.*);
  always #5 clk = ~clk;

  task automatic run(input int K, input bit do_clear);
    logic signed [15:0] A [R][64];
    logic signed [15:0] W [64][C];
    for (int i = 0; i < R; i++) for (int k = 0; k < K; k++) A[i][k] = 16'($urandom());
    for (int k = 0; k < K; k++) for (int j = 0; j < C; j++) W[k][j] = 16'($urandom());
    for (int i = 0; i < R; i++) for (int j = 0; j < C; j++) begin
      if (do_clear) expv[i][j] = 0;
      for (int k = 0; k < K; k++) expv[i][j] += longint'(A[i][k]) * longint'(W[k][j]);
    end
    for (int t = 0; t < K + R + C - 2; t++) begin
      @(negedge clk);
      clear = do_clear && (t == 0);
      for (int i = 0; i < R; i++) a_left[i] = (t >= i && t - i < K) ? A[i][t-i] : 16'sd0;
      for (int j = 0; j < C; j++) w_top[j] = (t >= j && t - j < K) ? W[t-j][j] : 16'sd0;
    end
    @(negedge clk);
    clear = 0;
    for (int i = 0; i < R; i++) a_left[i] = 0;
    for (int j = 0; j < C; j++) w_top[j] = 0;
    for (int i = 0; i < R; i++) for (int j = 0; j < C; j++) begin
      checks++;
      if (acc[i][j] != 40'(expv[i][j])) begin
        failures++;
        if (failures < 10) $display("FAIL PE(%0d,%0d) %0d exp %0d", i, j, acc[i][j], expv[i][j]);
      end
    end
    repeat (R + C) @(negedge clk);   // let the mesh drain to zero
  endtask

  initial begin
    for (int i = 0; i < R; i++) a_left[i] = 0;
    for (int j = 0; j < C; j++) w_top[j] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(16, 1);
    run(40, 1);
    run(16, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
