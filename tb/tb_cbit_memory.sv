// tb_cbit_memory: programs every word of a 256-word C-bit array, then reads
// them back in random order with back-to-back requests; each word must match
// what was programmed and arrive exactly LATENCY (3) cycles after its request.
module tb_cbit_memory;
  localparam int N = 256, L = 3;
  logic clk = 0, rst_n = 0, en = 0, we = 0, rvalid;
  logic [7:0] addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [31:0] ref_mem [N];
  logic [31:0] expq [$];
  int reqcyc [$];
  int checks = 0, failures = 0, cycle = 0;

  cbit_memory #(.BLOCKS(N), .LATENCY(L)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) if (rst_n && rvalid) begin
    checks++;
    if (expq.size() == 0 || rdata !== expq[0] || cycle - reqcyc[0] != L) begin
      failures++;
      if (failures < 10) $display("FAIL read");
    end
    if (expq.size() != 0) begin void'(expq.pop_front()); void'(reqcyc.pop_front()); end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < N; a++) begin
      @(negedge clk);
      en = 1; we = 1; addr = 8'(a); wdata = $urandom();
      ref_mem[a] = wdata;
    end
    for (int it = 0; it < 1000; it++) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0); we = 0; addr = 8'($urandom());
      if (en) begin expq.push_back(ref_mem[addr]); reqcyc.push_back(cycle); end
    end
    @(negedge clk);
    en = 0;
    repeat (L + 2) @(negedge clk);
    checks++;
    if (expq.size() != 0) failures++;
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
