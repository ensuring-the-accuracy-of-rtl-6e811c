// sas_write_port: the SaS transforms on the write side of an activation memory.
//
// Purely combinational, one lane per activation of a 32-byte block. Each lane
// looks at its two C bits and produces the word to store in the (undervolted)
// regular bank:
//   C=00 reliable  -> a                    (unchanged)
//   C=01 L         -> {s, a[12:0], 00}     (magnitude shifted 2 left)
//   C=10 M         -> flip({s, a[12:0],00})(shifted, then bit-reversed, so the
//                                           faulty high cells hold low bits)
//   C=11 M&L       -> a, and the lane is flagged in ml_mask: its value is also
//                     written, unchanged, into the safe bank.
// The shift by two places with the sign bit kept, and flipping M activations,
// follow the paper; the paper only says the write port needs "a similar
// design" to the read port, so storing the raw value in the regular location
// of an M&L activation (it is never read back) is this design's own choice.
module sas_write_port
  import sas_pkg::*;
(
  input  block_t             act_in,    // activations as produced
  input  cblock_t            cbits,     // C bits of the destination block
  output block_t             act_store, // words to write into the regular bank
  output logic [LANES-1:0]   ml_mask    // lanes that also go to the safe bank
);

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      ml_mask[l] = 1'b0;
      unique case (ctype_of(cbits, l))
        C_RELIABLE: act_store[l] = act_in[l];
        C_L:        act_store[l] = shift_store(act_in[l]);
        C_M:        act_store[l] = flip(shift_store(act_in[l]));
        C_ML: begin
          act_store[l] = act_in[l];
          ml_mask[l]   = 1'b1;
        end
        default:    act_store[l] = act_in[l];
      endcase
    end
  end

endmodule
