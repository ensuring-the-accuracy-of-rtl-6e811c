// tb_safe_pointer: drives random advance pulses and role swaps into a small
// Safe Pointer (8-bit addresses, 32-entry safe bank) and compares it every
// cycle with a reference counter kept here: reset to the last address on
// reset and on every change of role, one entry down per advance, overflow
// set once more than 32 entries are in use and cleared by a role swap.
module tb_safe_pointer;
  localparam int AW = 8, SAFE = 32;
  logic clk = 0, rst_n = 0, role = 0, advance = 0;
  logic [AW-1:0] sp;
  logic overflow;
  int checks = 0, failures = 0, swaps = 0, overflows = 0;
  int exp_sp, used;
  logic exp_ovf, role_prev;

  safe_pointer #(.AW(AW), .SAFE_ENTRIES(SAFE)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    exp_sp = 255; used = 0; exp_ovf = 0; role_prev = 0;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      checks++;
      if (sp != AW'(exp_sp) || overflow != exp_ovf) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: sp=%0d exp %0d ovf=%b exp %b", c, sp, exp_sp, overflow, exp_ovf);
      end
      // next stimulus; long runs without swaps let the bank overflow
      if ($urandom_range(0, 199) == 0) role = ~role;
      advance = ($urandom_range(0, 2) != 0);
      // reference update for the coming edge
      if (role != role_prev) begin
        exp_sp = 255; used = 0; exp_ovf = 0; swaps++;
      end else if (advance) begin
        used++;
        exp_sp = (exp_sp - 1) & 255;
        if (used == SAFE + 1 && !exp_ovf) begin exp_ovf = 1; overflows++; end
      end
      role_prev = role;
    end
    checks++;
    if (swaps == 0 || overflows == 0) begin
      failures++;
      $display("FAIL: swaps=%0d overflows=%0d", swaps, overflows);
    end
    $display("swaps=%0d overflows=%0d", swaps, overflows);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
