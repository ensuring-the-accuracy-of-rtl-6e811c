// tb_sas_write_port: checks the write-side SaS transforms on random blocks.
// For every lane the expected stored word is worked out here bit by bit:
// C=00 unchanged, C=01 sign kept and magnitude moved two places left,
// C=10 the same followed by a full bit reversal, C=11 unchanged and flagged
// for the safe bank. Also checks that each class was exercised.
module tb_sas_write_port;
  import sas_pkg::*;

  block_t act_in, act_store;
  cblock_t cbits;
  logic [LANES-1:0] ml_mask;
  int checks = 0, failures = 0;
  int seen [4];

  sas_write_port dut (.*);

  initial begin
    for (int it = 0; it < 400; it++) begin
      for (int l = 0; l < LANES; l++) begin
        act_in[l] = $urandom();
        cbits[l*2 +: 2] = $urandom();
      end
      #1;
      for (int l = 0; l < LANES; l++) begin
        logic [15:0] a, e, s;
        logic [1:0] c;
        a = act_in[l];
        c = cbits[l*2 +: 2];
        seen[c]++;
        s[15] = a[15];
        for (int i = 2; i < 15; i++) s[i] = a[i-2];
        s[1:0] = 2'b00;
        case (c)
          2'b00, 2'b11: e = a;
          2'b01: e = s;
          default: for (int i = 0; i < 16; i++) e[i] = s[15-i];
        endcase
        checks++;
        if (act_store[l] !== e || ml_mask[l] !== (c == 2'b11)) begin
          failures++;
          if (failures < 10) $display("FAIL lane %0d C=%b a=%h got %h exp %h", l, c, a, act_store[l], e);
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
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
