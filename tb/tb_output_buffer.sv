// tb_output_buffer: captures random 16 x 16 accumulator sets (including values
// far outside the 16-bit range) with several fixed-point shifts and checks the
// 16 blocks it returns: row order, lane = column, value = the accumulator
// shifted right arithmetically by frac_bits and saturated to 16 bits, all
// worked out here. The consumer inserts random stalls; a capture while busy
// must be ignored.
module tb_output_buffer;
  import sas_pkg::*;
  localparam int R = 16, C = 16;
  logic clk = 0, rst_n = 0, capture = 0, busy, out_valid, out_ready = 0;
  logic [4:0] frac_bits = 0;
  logic signed [39:0] acc [R][C];
  logic [3:0] out_row;
  block_t out_data;
  int checks = 0, failures = 0, sat_hi = 0, sat_lo = 0, stalls = 0;

  output_buffer dut (.*);
  always #5 clk = ~clk;

  function automatic logic [15:0] model(input longint v, input int f);
    longint s = v >>> f;
    if (s > 32767) return 16'h7fff;
    if (s < -32768) return 16'h8000;
    return 16'(s);
  endfunction

  initial begin
    longint snap [R][C];
    int f;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 20; it++) begin
      @(negedge clk);
      f = $urandom_range(0, 12);
      frac_bits = 5'(f);
      for (int i = 0; i < R; i++) for (int j = 0; j < C; j++) begin
        longint v;
        v = longint'($signed($urandom_range(0, 65535) - 32768)) * (1 << $urandom_range(0, 14));
        acc[i][j] = 40'(v);
        snap[i][j] = v;
      end
      capture = 1;
      @(negedge clk);
      capture = 0;
      // scramble the accumulators and try a capture while busy
      for (int i = 0; i < R; i++) for (int j = 0; j < C; j++) acc[i][j] = 40'($urandom());
      capture = 1;
      @(negedge clk);
      capture = 0;
      for (int r = 0; r < R; r++) begin
        while ($urandom_range(0, 2) == 0) begin stalls++; @(negedge clk); end
        checks++;
        if (!out_valid || out_row != 4'(r)) failures++;
        for (int j = 0; j < C; j++) begin
          logic [15:0] e;
          e = model(snap[r][j], f);
          if (e == 16'h7fff && (snap[r][j] >>> f) > 32767) sat_hi++;
          if (e == 16'h8000 && (snap[r][j] >>> f) < -32768) sat_lo++;
          checks++;
          if (out_data[j] !== e) begin
            failures++;
            if (failures < 10) $display("FAIL row %0d col %0d got %h exp %h", r, j, out_data[j], e);
          end
        end
        out_ready = 1;
        @(negedge clk);
        out_ready = 0;
      end
      checks++;
      if (busy || out_valid) failures++;
    end
    checks += 3;
    if (sat_hi == 0 || sat_lo == 0 || stalls == 0) failures++;
    $display("saturated high=%0d low=%0d stalls=%0d", sat_hi, sat_lo, stalls);
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
