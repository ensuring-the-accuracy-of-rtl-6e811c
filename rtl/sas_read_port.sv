// sas_read_port: the SaS read-side datapath of an activation memory.
//
// For each of the 16 activations of a block read from the regular banks, a
// 4-to-1 multiplexer steered by the activation's two C bits picks:
//   input 0 (C=00) the stored word a[15:0] unchanged;
//   input 1 (C=01) the word shifted back: {s, '00', a[14:2]};
//   input 2 (C=10) the word flipped back (bit reversal) and then shifted back;
//   input 3 (C=11) the copy of the activation read from the safe bank, a_SP.
// M&L copies arrive one per access from the safe bank on sp_data; the lane
// whose bit is set in sp_load captures it in its holding register on the clock
// edge, and the register keeps it until it is overwritten. The multiplexers
// themselves are combinational: act_out is valid as soon as raw and cbits are
// and all the M&L lanes of the block have been loaded.
// The four inputs, their bit arrangements and the per-lane holding element
// follow the paper. The paper calls the holding elements latches; here they
// are edge-triggered registers with a load enable, which is this design's own
// choice, as is the reset to zero.
module sas_read_port
  import sas_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  block_t           raw,       // block as read from the regular bank
  input  cblock_t          cbits,     // its 32 C bits
  input  act_t             sp_data,   // activation read from the safe bank
  input  logic [LANES-1:0] sp_load,   // lane that captures sp_data (one-hot)
  output block_t           act_out    // restored activations, to the dispatcher
);

  block_t hold;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold <= '0;
    end else begin
      for (int l = 0; l < LANES; l++)
        if (sp_load[l]) hold[l] <= sp_data;
    end
  end

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      unique case (ctype_of(cbits, l))
        C_RELIABLE: act_out[l] = raw[l];
        C_L:        act_out[l] = shift_restore(raw[l]);
        C_M:        act_out[l] = shift_restore(flip(raw[l]));
        C_ML:       act_out[l] = hold[l];
        default:    act_out[l] = raw[l];
      endcase
    end
  end

endmodule
