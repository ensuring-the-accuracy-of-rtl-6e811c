// tb_scratchpad: a scratchpad of 8 banks x 8 blocks with a 3-cycle latency.
// Random lane-masked writes and back-to-back reads over all banks are compared
// with a reference copy kept here; every read must return its block exactly
// LATENCY cycles after the request, in request order.
module tb_scratchpad;
  localparam int BANKS = 8, BB = 8, L = 3, N = BANKS * BB;
  logic clk = 0, rst_n = 0, req = 0, we = 0, rvalid;
  logic [5:0] addr = '0;
  logic [15:0] lane_we = '0;
  logic [255:0] wdata = '0, rdata;
  logic [255:0] ref_mem [N];
  logic [255:0] expq [$];
  int reqcyc [$];
  int checks = 0, failures = 0, cycle = 0, banks_read [BANKS];

  scratchpad #(.BANKS(BANKS), .BANK_BLOCKS(BB), .LATENCY(L)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // response checker
  always @(posedge clk) if (rst_n) begin
    if (rvalid) begin
      checks += 2;
      if (expq.size() == 0) begin failures += 2; $display("FAIL: unexpected data"); end
      else begin
        logic [255:0] e;
        int rc;
        e = expq.pop_front();
        rc = reqcyc.pop_front();
        if (rdata !== e) begin failures++; if (failures < 10) $display("FAIL data"); end
        if (cycle - rc != L) begin failures++; if (failures < 10) $display("FAIL latency %0d", cycle - rc); end
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < N; a++) begin
      @(negedge clk);
      req = 1; we = 1; addr = 6'(a); lane_we = '1;
      for (int l = 0; l < 8; l++) wdata[l*32 +: 32] = $urandom();
      ref_mem[a] = wdata;
    end
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      req = ($urandom_range(0, 3) != 0);
      addr = 6'($urandom_range(0, N - 1));
      we = ($urandom_range(0, 2) == 0);
      lane_we = 16'($urandom());
      for (int l = 0; l < 8; l++) wdata[l*32 +: 32] = $urandom();
      if (req && we) begin
        for (int l = 0; l < 16; l++) if (lane_we[l]) ref_mem[addr][l*16 +: 16] = wdata[l*16 +: 16];
      end else if (req) begin
        expq.push_back(ref_mem[addr]);
        reqcyc.push_back(cycle);
        banks_read[addr / BB]++;
      end
    end
    @(negedge clk);
    req = 0;
    repeat (L + 2) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL: missing responses"); end
    for (int b = 0; b < BANKS; b++) begin checks++; if (banks_read[b] == 0) failures++; end
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
