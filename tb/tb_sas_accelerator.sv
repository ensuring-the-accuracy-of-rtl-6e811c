// tb_sas_accelerator: end-to-end test of the accelerator on a 3-layer network.
//
// Both activation memories get random C bits (fault classes) for the blocks in
// use, and stuck-at faults matching those classes are forced into their
// undervolted banks on every falling clock edge. Weights for three pointwise
// layers (16 -> 16 channels) and an input of 32 rows are loaded, the network is
// run, and the final result is read out. A bit-accurate reference computed
// here follows every activation through the SaS store transform, the stuck
// bits and the restore transform of the memory it passes through, then the
// matrix product and the fixed-point shift with saturation. Every output is
// compared, and the test fails if any mechanism (shift of L activations, flip
// of M activations, safe-bank store and restore of M&L activations, role swap)
// never happened.
module tb_sas_accelerator;
  import sas_pkg::*;

  localparam int BANKS = 8, BB = 16;            // small memories: 128 blocks each
  localparam int LAYERS = 3, TILES = 2, NB = 16 * TILES, FRAC = 8;
  localparam int BAW = $clog2(BANKS * BB), AAW = BAW + 4;
  localparam int WATCHDOG = 200000;

  logic clk = 0, rst_n = 0;
  logic cprog_valid = 0, cprog_ready, cprog_mem = 0;
  logic [BAW-1:0] cprog_addr = '0;
  cblock_t cprog_cbits = '0;
  logic wload_valid = 0, wload_ready;
  logic [BAW-1:0] wload_addr = '0;
  block_t wload_data = '0;
  logic host_wr_valid = 0, host_wr_ready;
  logic [BAW-1:0] host_wr_addr = '0;
  block_t host_wr_data = '0;
  logic host_rd_valid = 0, host_rd_ready, host_out_valid, host_out_ready = 0;
  logic [BAW-1:0] host_rd_addr = '0;
  block_t host_out_data;
  logic start = 0, busy, done, src_sel;
  logic [7:0] num_layers = 8'(LAYERS);
  logic [BAW-5:0] num_tiles = (BAW-4)'(TILES);
  logic [4:0] frac_bits = 5'(FRAC);
  logic [AAW-1:0] sp [2];
  logic [1:0] sp_overflow;

  sas_accelerator #(.BANKS(BANKS), .BANK_BLOCKS(BB)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", m); end
  endtask

  // ---------------------------------------------------------------- fault map
  logic [1:0]  cls  [2][NB][16];
  logic [15:0] fmsk [2][NB][16];
  logic [15:0] fval [2][NB][16];

  function automatic logic [15:0] rev(input logic [15:0] a);
    logic [15:0] r;
    for (int i = 0; i < 16; i++) r[15-i] = a[i];
    return r;
  endfunction

  // value the memory m returns for activation a stored at block b, lane l
  function automatic logic [15:0] through_mem(input int m, input int b, input int l, input logic [15:0] a);
    logic [15:0] s;
    case (cls[m][b][l])
      2'b00: s = a;
      2'b01: s = {a[15], a[12:0], 2'b00};
      2'b10: s = rev({a[15], a[12:0], 2'b00});
      default: return a;
    endcase
    s = (s & ~fmsk[m][b][l]) | (fval[m][b][l] & fmsk[m][b][l]);
    if (cls[m][b][l] == 2'b10) s = rev(s);
    if (cls[m][b][l] == 2'b00) return s;
    return {s[15], 2'b00, s[14:2]};
  endfunction

  function automatic logic [15:0] sat(input longint v);
    longint s = v >>> FRAC;
    if (s > 32767) return 16'h7fff;
    if (s < -32768) return 16'h8000;
    return 16'(s);
  endfunction

  function automatic logic [15:0] mask_bits(input int lo, input int hi);
    logic [15:0] r = '0;
    int n = 1 + $urandom_range(0, 1);
    for (int i = 0; i < n; i++) r[$urandom_range(lo, hi)] = 1'b1;
    return r;
  endfunction

  // permanent stuck-at faults in the undervolted banks of both memories
  task automatic stick(input int m);
    for (int b = 0; b < NB; b++) begin
      logic [255:0] w;
      int bk, ad;
      bk = b / BB; ad = b % BB;
      if (m == 0) w = (bk == 0) ? dut.g_am[0].u_am.u_mem.g_bank[0].u_bank.mem[ad]
                                : dut.g_am[0].u_am.u_mem.g_bank[1].u_bank.mem[ad];
      else        w = (bk == 0) ? dut.g_am[1].u_am.u_mem.g_bank[0].u_bank.mem[ad]
                                : dut.g_am[1].u_am.u_mem.g_bank[1].u_bank.mem[ad];
      for (int l = 0; l < 16; l++)
        w[l*16 +: 16] = (w[l*16 +: 16] & ~fmsk[m][b][l]) | (fval[m][b][l] & fmsk[m][b][l]);
      if (m == 0) begin
        if (bk == 0) dut.g_am[0].u_am.u_mem.g_bank[0].u_bank.mem[ad] = w;
        else         dut.g_am[0].u_am.u_mem.g_bank[1].u_bank.mem[ad] = w;
      end else begin
        if (bk == 0) dut.g_am[1].u_am.u_mem.g_bank[0].u_bank.mem[ad] = w;
        else         dut.g_am[1].u_am.u_mem.g_bank[1].u_bank.mem[ad] = w;
      end
    end
  endtask

  always @(negedge clk) if (rst_n) begin stick(0); stick(1); end

  // ------------------------------------------------------- mechanism counters
  int n_class [4];            // activations of each class read by the array
  int safe_writes = 0, safe_reads = 0, swaps = 0;
  logic [AAW-1:0] sp_q [2];
  logic sel_q;
  logic armed = 0;
  always @(posedge clk) if (rst_n) begin
    armed <= 1;
    sel_q <= src_sel;
    if (armed && sel_q != src_sel) swaps++;
    for (int m = 0; m < 2; m++) begin
      sp_q[m] <= sp[m];
      if (armed && sp[m] == sp_q[m] - 1'b1) begin
        if (m == int'(src_sel)) safe_reads++;
        else                    safe_writes++;
      end
    end
  end

  // ------------------------------------------------------------------- test
  logic [15:0] x [NB][16];     // activations as written into the current output memory
  logic [15:0] wt [LAYERS][16][16];

  initial begin
    int t0, cyc;
    fork begin
      repeat (WATCHDOG) @(posedge clk);
      failures++;
      $display("FAIL: watchdog");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end join_none

    for (int m = 0; m < 2; m++)
      for (int b = 0; b < NB; b++)
        for (int l = 0; l < 16; l++) begin
          int r;
          r = $urandom_range(0, 99);
          cls[m][b][l] = (r < 50) ? 2'b00 : (r < 70) ? 2'b01 : (r < 90) ? 2'b10 : 2'b11;
          case (cls[m][b][l])
            2'b01: fmsk[m][b][l] = mask_bits(0, 7);
            2'b10: fmsk[m][b][l] = mask_bits(8, 15);
            2'b11: fmsk[m][b][l] = mask_bits(0, 7) | mask_bits(8, 15);
            default: fmsk[m][b][l] = '0;
          endcase
          fval[m][b][l] = 16'($urandom());
        end
    for (int ly = 0; ly < LAYERS; ly++)
      for (int k = 0; k < 16; k++)
        for (int j = 0; j < 16; j++) wt[ly][k][j] = 16'($signed($urandom_range(0, 160)) - 80);
    for (int p = 0; p < NB; p++)
      for (int k = 0; k < 16; k++) x[p][k] = 16'($signed($urandom_range(0, 4000)) - 2000);

    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. C bits of both memories
    for (int m = 0; m < 2; m++)
      for (int b = 0; b < NB; b++) begin
        @(negedge clk);
        cprog_valid = 1; cprog_mem = 1'(m); cprog_addr = BAW'(b);
        for (int l = 0; l < 16; l++) cprog_cbits[l*2 +: 2] = cls[m][b][l];
        @(posedge clk);
        while (!cprog_ready) @(posedge clk);
      end
    @(negedge clk);
    cprog_valid = 0;

    // 2. weights
    for (int ly = 0; ly < LAYERS; ly++)
      for (int k = 0; k < 16; k++) begin
        @(negedge clk);
        wload_valid = 1; wload_addr = BAW'(16 * ly + k);
        for (int j = 0; j < 16; j++) wload_data[j] = wt[ly][k][j];
      end
    @(negedge clk);
    wload_valid = 0;

    // 3. input activations into memory 0 (the output buffer after reset)
    chk(src_sel == 1, "memory 0 takes the input image");
    for (int p = 0; p < NB; p++) begin
      @(negedge clk);
      host_wr_valid = 1; host_wr_addr = BAW'(p);
      for (int k = 0; k < 16; k++) host_wr_data[k] = x[p][k];
      @(posedge clk);
      while (!host_wr_ready) @(posedge clk);
    end
    @(negedge clk);
    host_wr_valid = 0;
    repeat (30) @(negedge clk);

    // reference: run the network through the memory model
    begin
      int src;
      src = 0;
      for (int ly = 0; ly < LAYERS; ly++) begin
        logic [15:0] y [NB][16];
        for (int p = 0; p < NB; p++)
          for (int j = 0; j < 16; j++) begin
            longint acc;
            acc = 0;
            for (int k = 0; k < 16; k++) begin
              if (j == 0) n_class[cls[src][p][k]]++;
              acc += longint'($signed(through_mem(src, p, k, x[p][k]))) * longint'($signed(wt[ly][k][j]));
            end
            y[p][j] = sat(acc);
          end
        x = y;
        src = 1 - src;
      end
    end

    // 4. run
    @(negedge clk);
    start = 1;
    t0 = cycle;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    cyc = cycle - t0;
    chk(src_sel == 1'((LAYERS + 1) % 2 == 0 ? 1 : 0), "result memory is the input buffer");

    // 5. read the result from the memory that held the last layer's output
    for (int p = 0; p < NB; p++) begin
      @(negedge clk);
      host_rd_valid = 1; host_rd_addr = BAW'(p);
      @(posedge clk);
      while (!host_rd_ready) @(posedge clk);
      @(negedge clk);
      host_rd_valid = 0;
      while (!host_out_valid) @(negedge clk);
      for (int j = 0; j < 16; j++)
        chk(host_out_data[j] == through_mem(int'(src_sel), p, j, x[p][j]),
            $sformatf("row %0d col %0d: got %h expected %h", p, j, host_out_data[j],
                      through_mem(int'(src_sel), p, j, x[p][j])));
      host_out_ready = 1;
      @(negedge clk);
      host_out_ready = 0;
    end

    $display("run: %0d cycles for %0d layers of %0d rows", cyc, LAYERS, NB);
    $display("activations read: reliable=%0d L=%0d M=%0d M&L=%0d", n_class[0], n_class[1], n_class[2], n_class[3]);
    $display("safe-bank writes=%0d reads=%0d role swaps=%0d", safe_writes, safe_reads, swaps);
    chk(n_class[1] > 0, "shift of L activations happened");
    chk(n_class[2] > 0, "flip of M activations happened");
    chk(safe_writes > 0, "safe-bank store happened");
    chk(safe_reads > 0, "safe-bank restore happened");
    chk(safe_writes == safe_reads, "every stored M&L activation was restored");
    chk(swaps == LAYERS + 1, "role swaps");
    chk(sp_overflow == 2'b00, "safe bank did not overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
