// tb_act_sram_bank: random lane-masked writes and reads on a 64-word bank,
// compared with a reference copy kept here. Checks that only enabled lanes are
// written, that read data arrives on the edge after the read and that it holds
// while the bank is idle.
module tb_act_sram_bank;
  localparam int D = 64;
  logic clk = 0, en = 0, we = 0;
  logic [5:0] addr = '0;
  logic [15:0] lane_we = '0;
  logic [255:0] wdata = '0, rdata;
  logic [255:0] ref_mem [D];
  int checks = 0, failures = 0;

  act_sram_bank #(.DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    // fill every word
    for (int a = 0; a < D; a++) begin
      @(negedge clk);
      en = 1; we = 1; addr = 6'(a); lane_we = '1;
      for (int l = 0; l < 8; l++) wdata[l*32 +: 32] = $urandom();
      ref_mem[a] = wdata;
    end
    for (int it = 0; it < 2000; it++) begin
      @(negedge clk);
      en = 1; addr = 6'($urandom_range(0, D - 1)); we = $urandom_range(0, 1);
      if (we) begin
        lane_we = 16'($urandom());
        for (int l = 0; l < 8; l++) wdata[l*32 +: 32] = $urandom();
        for (int l = 0; l < 16; l++) if (lane_we[l]) ref_mem[addr][l*16 +: 16] = wdata[l*16 +: 16];
      end else begin
        logic [255:0] e;
        e = ref_mem[addr];
        @(negedge clk);
        en = 0;
        checks++;
        if (rdata !== e) begin failures++; if (failures < 10) $display("FAIL read %0d", addr); end
        @(negedge clk);
        checks++;
        if (rdata !== e) begin failures++; $display("FAIL hold"); end
      end
    end
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
