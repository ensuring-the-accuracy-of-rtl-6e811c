// tb_sas_act_mem: self-checking test of one SaS activation memory.
//
// A small memory (8 banks of 16 blocks, safe bank = 256 activations) gets
// random C bits for its first NB blocks. Permanent stuck-at faults matching
// each activation's class (low byte for L, high byte for M, both for M&L) are
// forced into the regular banks on every falling clock edge, as a faulty
// undervolted array would hold them. The test writes NB random blocks in the
// output role, swaps to the input role, reads them back in order and compares
// each activation with a reference computed here: stored word = transform of
// the value, then the stuck bits, then the inverse transform (M&L values come
// back exact). It also checks the read latency (L+1 cycles, or 2L+k+1 with k
// M&L activations), the write occupancy (L+1+k), the Safe Pointer after each
// phase and that every activation class occurred.
module tb_sas_act_mem;
  import sas_pkg::*;

  localparam int unsigned BANKS = 8, BANK_BLOCKS = 16, L = 3;
  localparam int unsigned BLOCKS = BANKS * BANK_BLOCKS;
  localparam int unsigned BAW = $clog2(BLOCKS), AAW = BAW + 4;
  localparam int unsigned NB = 32;   // blocks used by the layer

  logic clk = 0, rst_n = 0, role = 0;
  logic wr_valid = 0, wr_ready, rd_valid = 0, rd_ready, out_valid, out_ready = 0;
  logic prog_valid = 0, prog_ready, sp_overflow;
  logic [BAW-1:0] wr_addr = '0, rd_addr = '0, prog_addr = '0;
  block_t wr_data = '0, out_data;
  cblock_t prog_cbits = '0;
  logic [AAW-1:0] sp;

  sas_act_mem #(.BANKS(BANKS), .BANK_BLOCKS(BANK_BLOCKS), .LATENCY(L)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  // reference model -------------------------------------------------------
  logic [1:0]  cb   [NB][16];
  logic [15:0] val  [NB][16];
  logic [15:0] fmsk [NB][16];
  logic [15:0] fval [NB][16];
  int n_cls [4];

  function automatic logic [15:0] rev(input logic [15:0] a);
    logic [15:0] r;
    for (int i = 0; i < 16; i++) r[15-i] = a[i];
    return r;
  endfunction

  function automatic logic [15:0] expect_val(input int b, input int l);
    logic [15:0] a, s;
    a = val[b][l];
    case (cb[b][l])
      2'b00: s = a;
      2'b01: s = {a[15], a[12:0], 2'b00};
      2'b10: s = rev({a[15], a[12:0], 2'b00});
      default: return a;
    endcase
    s = (s & ~fmsk[b][l]) | (fval[b][l] & fmsk[b][l]);
    case (cb[b][l])
      2'b00: return s;
      2'b01: return {s[15], 2'b00, s[14:2]};
      default: begin s = rev(s); return {s[15], 2'b00, s[14:2]}; end
    endcase
  endfunction

  // stuck-at faults in the undervolted banks (the first two banks hold the layer)
  always @(negedge clk) begin
    for (int b = 0; b < NB; b++) begin
      logic [255:0] w;
      if (b / BANK_BLOCKS == 0) w = dut.u_mem.g_bank[0].u_bank.mem[b % BANK_BLOCKS];
      else                      w = dut.u_mem.g_bank[1].u_bank.mem[b % BANK_BLOCKS];
      for (int l = 0; l < 16; l++)
        w[l*16 +: 16] = (w[l*16 +: 16] & ~fmsk[b][l]) | (fval[b][l] & fmsk[b][l]);
      if (b / BANK_BLOCKS == 0) dut.u_mem.g_bank[0].u_bank.mem[b % BANK_BLOCKS] = w;
      else                      dut.u_mem.g_bank[1].u_bank.mem[b % BANK_BLOCKS] = w;
    end
  end

  function automatic logic [15:0] rand_bits(input int lo, input int hi);
    logic [15:0] m = '0;
    int n = 1 + $urandom_range(0, 1);
    for (int i = 0; i < n; i++) m[$urandom_range(lo, hi)] = 1'b1;
    return m;
  endfunction

  initial begin
    int total_ml = 0;
    // watchdog
    fork begin
      repeat (20000) @(posedge clk);
      failures++;
      $display("FAIL: watchdog");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end join_none

    for (int b = 0; b < NB; b++)
      for (int l = 0; l < 16; l++) begin
        int r;
        r = $urandom_range(0, 99);
        cb[b][l] = (r < 40) ? 2'b00 : (r < 65) ? 2'b01 : (r < 88) ? 2'b10 : 2'b11;
        if (b == 5) cb[b][l] = 2'b11;          // one block entirely M&L
        if (b == 6) cb[b][l] = 2'b00;          // one block without faults
        // values: mostly without outliers (bits 14:13 clear), some with
        val[b][l] = $urandom();
        if ($urandom_range(0, 9) != 0) val[b][l][14:13] = 2'b00;
        fmsk[b][l] = '0;
        case (cb[b][l])
          2'b01: fmsk[b][l] = rand_bits(0, 7);
          2'b10: fmsk[b][l] = rand_bits(8, 15);
          2'b11: fmsk[b][l] = rand_bits(0, 7) | rand_bits(8, 15);
          default: ;
        endcase
        fval[b][l] = $urandom();
        n_cls[cb[b][l]]++;
        if (cb[b][l] == 2'b11) total_ml++;
      end

    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);

    // post-fabrication test: program the C bits
    for (int b = 0; b < NB; b++) begin
      prog_valid <= 1; prog_addr <= BAW'(b);
      for (int l = 0; l < 16; l++) prog_cbits[l*2 +: 2] <= cb[b][l];
      @(posedge clk);
      while (!prog_ready) @(posedge clk);
    end
    prog_valid <= 0;

    // output role: write the layer
    role <= 1;
    @(posedge clk);
    check(sp == '1, "SP starts at the last address");
    for (int b = 0; b < NB; b++) begin
      int t0, k;
      k = 0;
      for (int l = 0; l < 16; l++) if (cb[b][l] == 2'b11) k++;
      wr_valid <= 1; wr_addr <= BAW'(b);
      for (int l = 0; l < 16; l++) wr_data[l] <= val[b][l];
      @(posedge clk);
      while (!wr_ready) @(posedge clk);
      t0 = cycle - 1;   // the edge that accepted the write
      wr_valid <= 0;
      @(posedge clk);
      while (!wr_ready) @(posedge clk);
      check(cycle - 1 - t0 == L + 1 + k,
            $sformatf("write occupancy block %0d: %0d, expected %0d", b, cycle - 1 - t0, L + 1 + k));
    end
    check(sp == AAW'((1 << AAW) - 1 - total_ml), $sformatf("SP after writes %0h", sp));

    // input role: read the layer back in order
    role <= 0;
    @(posedge clk);
    @(posedge clk);
    check(sp == '1, "SP reset by the role swap");
    for (int b = 0; b < NB; b++) begin
      int t0, k;
      k = 0;
      for (int l = 0; l < 16; l++) if (cb[b][l] == 2'b11) k++;
      rd_valid <= 1; rd_addr <= BAW'(b);
      @(posedge clk);
      while (!rd_ready) @(posedge clk);
      t0 = cycle - 1;
      rd_valid <= 0;
      while (!out_valid) @(posedge clk);
      check(cycle - 1 - t0 == ((k == 0) ? L + 1 : 2*L + k + 1),
            $sformatf("read latency block %0d (k=%0d): %0d", b, k, cycle - 1 - t0));
      for (int l = 0; l < 16; l++)
        check(out_data[l] == expect_val(b, l),
              $sformatf("block %0d lane %0d C=%b: got %h expected %h (value %h)",
                        b, l, cb[b][l], out_data[l], expect_val(b, l), val[b][l]));
      // hold one block for a few cycles before taking it
      if (b == 3) begin
        block_t h;
        h = out_data;
        repeat (3) @(posedge clk);
        check(out_valid && out_data == h, "output held while not ready");
      end
      out_ready <= 1;
      @(posedge clk);
      out_ready <= 0;
    end
    check(sp == AAW'((1 << AAW) - 1 - total_ml), "SP after reads");
    check(!sp_overflow, "no overflow");
    for (int c = 0; c < 4; c++) check(n_cls[c] > 0, $sformatf("class %0d exercised", c));
    $display("classes: reliable=%0d L=%0d M=%0d ML=%0d", n_cls[0], n_cls[1], n_cls[2], n_cls[3]);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
