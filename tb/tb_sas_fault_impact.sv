// tb_sas_fault_impact: how much SaS reduces the damage done by faulty cells.
//
// One SaS activation memory (8 banks of 16 blocks) holds 64 blocks of
// activations with the distribution SaS relies on: non-negative values (as
// after a ReLU) of small magnitude, so that bits 14:13 are clear. In two's
// complement a negative value has ones there and would not survive the shift. Every activation gets a fault class at random (about 30 %
// reliable, the rest L, M or M&L) and one or two stuck-at cells in the byte(s)
// its class says; the cells are forced into the array on every falling edge.
// For every activation read back the test measures two errors against the
// value written: that of SaS, and that of an unprotected memory with the same
// stuck cells holding the value as is. It checks that
//   * reliable and M&L activations come back exact,
//   * L and M activations differ from the original only in bits 5:0,
//   * the sign is never lost,
//   * the total SaS error is below a tenth of the unprotected error.
module tb_sas_fault_impact;
  import sas_pkg::*;

  localparam int unsigned BANKS = 8, BANK_BLOCKS = 16, L = 3, NB = 64;
  localparam int unsigned BAW = $clog2(BANKS * BANK_BLOCKS), AAW = BAW + 4;

  logic clk = 0, rst_n = 0, role = 0;
  logic wr_valid = 0, wr_ready, rd_valid = 0, rd_ready, out_valid, out_ready = 0;
  logic prog_valid = 0, prog_ready, sp_overflow;
  logic [BAW-1:0] wr_addr = '0, rd_addr = '0, prog_addr = '0;
  block_t wr_data = '0, out_data;
  cblock_t prog_cbits = '0;
  logic [AAW-1:0] sp;

  sas_act_mem #(.BANKS(BANKS), .BANK_BLOCKS(BANK_BLOCKS), .LATENCY(L)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", m); end
  endtask

  logic [1:0]  cb   [NB][16];
  logic [15:0] val  [NB][16];
  logic [15:0] fmsk [NB][16];
  logic [15:0] fval [NB][16];

  function automatic logic [15:0] rand_bits(input int lo, input int hi);
    logic [15:0] m = '0;
    int n = 1 + $urandom_range(0, 1);
    for (int i = 0; i < n; i++) m[$urandom_range(lo, hi)] = 1'b1;
    return m;
  endfunction

  // signed value of a 16-bit word
  function automatic longint sv(input logic [15:0] a);
    return longint'($signed(a));
  endfunction

  function automatic longint absl(input longint x);
    return (x < 0) ? -x : x;
  endfunction

  // stuck cells in the four undervolted banks that hold the 64 blocks
  always @(negedge clk) if (rst_n) begin
    for (int b = 0; b < NB; b++) begin
      logic [255:0] w;
      int ad;
      ad = b % BANK_BLOCKS;
      case (b / BANK_BLOCKS)
        0: w = dut.u_mem.g_bank[0].u_bank.mem[ad];
        1: w = dut.u_mem.g_bank[1].u_bank.mem[ad];
        2: w = dut.u_mem.g_bank[2].u_bank.mem[ad];
        default: w = dut.u_mem.g_bank[3].u_bank.mem[ad];
      endcase
      for (int l = 0; l < 16; l++)
        w[l*16 +: 16] = (w[l*16 +: 16] & ~fmsk[b][l]) | (fval[b][l] & fmsk[b][l]);
      case (b / BANK_BLOCKS)
        0: dut.u_mem.g_bank[0].u_bank.mem[ad] = w;
        1: dut.u_mem.g_bank[1].u_bank.mem[ad] = w;
        2: dut.u_mem.g_bank[2].u_bank.mem[ad] = w;
        default: dut.u_mem.g_bank[3].u_bank.mem[ad] = w;
      endcase
    end
  end

  initial begin
    longint err_sas = 0, err_base = 0;
    int n_faulty = 0;
    fork begin
      repeat (50000) @(posedge clk);
      failures++;
      $display("FAIL: watchdog");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end join_none

    for (int b = 0; b < NB; b++)
      for (int l = 0; l < 16; l++) begin
        int r;
        r = $urandom_range(0, 99);
        cb[b][l] = (r < 30) ? 2'b00 : (r < 55) ? 2'b01 : (r < 80) ? 2'b10 : 2'b11;
        // non-negative magnitudes spread over 2^0 .. 2^12
        val[b][l] = 16'($urandom_range(0, (1 << $urandom_range(1, 12)) - 1));
        case (cb[b][l])
          2'b01: fmsk[b][l] = rand_bits(0, 7);
          2'b10: fmsk[b][l] = rand_bits(8, 15);
          2'b11: fmsk[b][l] = rand_bits(0, 7) | rand_bits(8, 15);
          default: fmsk[b][l] = '0;
        endcase
        // make every stuck cell disagree with the unprotected value, so
        // that each one is a real fault in the baseline
        fval[b][l] = ~val[b][l];
      end

    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < NB; b++) begin
      @(negedge clk);
      prog_valid = 1; prog_addr = BAW'(b);
      for (int l = 0; l < 16; l++) prog_cbits[l*2 +: 2] = cb[b][l];
      @(posedge clk);
      while (!prog_ready) @(posedge clk);
    end
    @(negedge clk);
    prog_valid = 0;

    role = 1;
    for (int b = 0; b < NB; b++) begin
      @(negedge clk);
      wr_valid = 1; wr_addr = BAW'(b);
      for (int l = 0; l < 16; l++) wr_data[l] = val[b][l];
      @(posedge clk);
      while (!wr_ready) @(posedge clk);
    end
    @(negedge clk);
    wr_valid = 0;
    repeat (30) @(negedge clk);
    role = 0;
    repeat (2) @(negedge clk);

    for (int b = 0; b < NB; b++) begin
      @(negedge clk);
      rd_valid = 1; rd_addr = BAW'(b);
      @(posedge clk);
      while (!rd_ready) @(posedge clk);
      @(negedge clk);
      rd_valid = 0;
      while (!out_valid) @(negedge clk);
      for (int l = 0; l < 16; l++) begin
        logic [15:0] a, o, base;
        a = val[b][l];
        o = out_data[l];
        base = (a & ~fmsk[b][l]) | (fval[b][l] & fmsk[b][l]);
        if (cb[b][l] != 2'b00) n_faulty++;
        err_sas  += absl(sv(o) - sv(a));
        err_base += absl(sv(base) - sv(a));
        if (cb[b][l] == 2'b00 || cb[b][l] == 2'b11)
          chk(o == a, $sformatf("block %0d lane %0d C=%b: %h should be exact %h", b, l, cb[b][l], o, a));
        else
          chk(o[15:6] == a[15:6], $sformatf("block %0d lane %0d C=%b: %h differs from %h above bit 5", b, l, cb[b][l], o, a));
        chk(o[15] == a[15], "sign kept");
      end
      out_ready = 1;
      @(negedge clk);
      out_ready = 0;
    end

    $display("faulty activations: %0d of %0d", n_faulty, NB * 16);
    $display("total absolute error: unprotected %0d, SaS %0d", err_base, err_sas);
    chk(err_base > 0, "the faults do damage an unprotected memory");
    chk(err_sas * 10 < err_base, "SaS error below a tenth of the unprotected error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
