// tb_pe: feeds random signed 16-bit operand pairs into one PE, restarting the
// sum with clear every few cycles, and checks the accumulator against a sum
// kept here and that both operands come out one cycle later unchanged.
module tb_pe;
  logic clk = 0, rst_n = 0, clear = 0;
  logic signed [15:0] a_in = 0, w_in = 0, a_out, w_out;
  logic signed [39:0] acc;
  longint exp_acc = 0;
  int checks = 0, failures = 0, clears = 0;

  pe dut (.*);
  always #5 clk = ~clk;

  initial begin
    logic signed [15:0] pa, pw;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 2000; it++) begin
      @(negedge clk);
      clear = ($urandom_range(0, 9) == 0);
      a_in = 16'($urandom());
      w_in = 16'($urandom());
      if (it < 20) begin a_in = 16'sh7fff; w_in = -16'sh8000; end   // extreme values
      pa = a_in; pw = w_in;
      if (clear) begin exp_acc = 0; clears++; end
      exp_acc += longint'(pa) * longint'(pw);
      @(negedge clk);
      checks += 2;
      if (acc != 40'(exp_acc)) begin failures++; if (failures < 10) $display("FAIL acc %0d exp %0d", acc, exp_acc); end
      if (a_out != pa || w_out != pw) failures++;
      clear = 0; a_in = 0; w_in = 0;
    end
    checks++;
    if (clears == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
