// tb_sas_read_port: checks the read-side 4-to-1 multiplexers and the
// safe-bank holding registers. Random stored blocks and C bits are applied;
// the safe-bank values of the M&L lanes are loaded one per clock through
// sp_data/sp_load, as the controller does. Expected outputs are worked out
// here: C=00 unchanged, C=01 {s,'00',a[14:2]}, C=10 bit reversal then the same
// shift, C=11 the value loaded for that lane.
module tb_sas_read_port;
  import sas_pkg::*;

  logic clk = 0, rst_n = 0;
  block_t raw, act_out;
  cblock_t cbits;
  act_t sp_data;
  logic [LANES-1:0] sp_load;
  int checks = 0, failures = 0;
  int seen [4];
  logic [15:0] safe [LANES];

  sas_read_port dut (.*);

  always #5 clk = ~clk;

  initial begin
    sp_load = '0; sp_data = '0; raw = '0; cbits = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 300; it++) begin
      for (int l = 0; l < LANES; l++) begin
        raw[l] = $urandom();
        cbits[l*2 +: 2] = $urandom();
      end
      // load the safe-bank copies of the M&L lanes, one per cycle
      for (int l = 0; l < LANES; l++)
        if (cbits[l*2 +: 2] == 2'b11) begin
          safe[l] = $urandom();
          @(negedge clk);
          sp_data = safe[l];
          sp_load = LANES'(1) << l;
          @(negedge clk);
          sp_load = '0;
        end
      #1;
      for (int l = 0; l < LANES; l++) begin
        logic [15:0] a, e, f;
        logic [1:0] c;
        a = raw[l];
        c = cbits[l*2 +: 2];
        seen[c]++;
        for (int i = 0; i < 16; i++) f[i] = a[15-i];
        case (c)
          2'b00: e = a;
          2'b01: e = {a[15], 2'b00, a[14:2]};
          2'b10: e = {f[15], 2'b00, f[14:2]};
          default: e = safe[l];
        endcase
        checks++;
        if (act_out[l] !== e) begin
          failures++;
          if (failures < 10) $display("FAIL lane %0d C=%b raw=%h got %h exp %h", l, c, a, act_out[l], e);
        end
      end
    end
    for (int c = 0; c < 4; c++) begin
      checks++;
      if (seen[c] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
