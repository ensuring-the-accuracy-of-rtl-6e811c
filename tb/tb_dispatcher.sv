// tb_dispatcher: loads random activation and weight tiles, starts the feed and
// records what the dispatcher drives on every step. Each row i must carry
// A[i][t-i] and each column j W[t-j][j] at step t (zero outside), clear must be
// high on step 0 only, and done must pulse exactly 46 cycles (16+16+16-2
// steps) after start. The tile buffers are then reloaded and the run repeated.
module tb_dispatcher;
  import sas_pkg::*;
  localparam int R = 16, C = 16, STEPS = 46;
  logic clk = 0, rst_n = 0, a_we = 0, w_we = 0, start = 0, busy, done, clear;
  logic [3:0] a_row = 0, w_row = 0;
  block_t a_data = '0, w_data = '0;
  logic signed [15:0] a_left [R];
  logic signed [15:0] w_top [C];
  int checks = 0, failures = 0;

  dispatcher dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  task automatic run();
    logic [15:0] A [R][16];
    logic [15:0] W [16][C];
    for (int i = 0; i < R; i++) begin
      @(negedge clk);
      a_we = 1; a_row = 4'(i);
      for (int k = 0; k < 16; k++) begin A[i][k] = 16'($urandom()); a_data[k] = A[i][k]; end
    end
    for (int k = 0; k < 16; k++) begin
      @(negedge clk);
      a_we = 0; w_we = 1; w_row = 4'(k);
      for (int j = 0; j < C; j++) begin W[k][j] = 16'($urandom()); w_data[j] = W[k][j]; end
    end
    @(negedge clk);
    w_we = 0; start = 1;
    @(negedge clk);
    start = 0;
    for (int t = 0; t < STEPS; t++) begin
      chk(busy && clear == (t == 0), $sformatf("busy/clear step %0d", t));
      for (int i = 0; i < R; i++)
        chk(a_left[i] == ((t >= i && t - i < 16) ? A[i][t-i] : 16'd0), $sformatf("row %0d step %0d", i, t));
      for (int j = 0; j < C; j++)
        chk(w_top[j] == ((t >= j && t - j < 16) ? W[t-j][j] : 16'd0), $sformatf("col %0d step %0d", j, t));
      chk(!done, "done early");
      @(negedge clk);
    end
    chk(done && !busy, "done after the last step");
    @(negedge clk);
    chk(!done, "done is a pulse");
    for (int i = 0; i < R; i++) chk(a_left[i] == 0, "idle rows are zero");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run();
    run();
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
