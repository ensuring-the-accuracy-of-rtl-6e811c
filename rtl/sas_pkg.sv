// sas_pkg: types, sizes and bit-rearrangement functions shared by the
// Shift-and-Safe (SaS) activation-memory blocks.
//
// Activations are 16-bit fixed-point words. Every activation has two control
// bits (C) fixed at post-fabrication test that classify the bitcells holding it:
//   C_RELIABLE (00) no faulty cell, stored unchanged;
//   C_L        (01) faults only in the low byte, stored shifted left by 2;
//   C_M        (10) faults in the high byte, stored shifted left by 2 then
//                   bit-reversed ("flipped") so the faults land in the low byte;
//   C_ML       (11) faults in both bytes, the value goes to the safe bank.
// A memory access moves one block of 16 consecutive activations (32 bytes).
// The codes, the 2-bit shift that keeps the sign bit, the bit reversal and the
// 16-activation block all follow the paper; the names are this design's own.
package sas_pkg;

  localparam int unsigned ACT_W   = 16;  // activation width in bits
  localparam int unsigned LANES   = 16;  // activations per memory block (32 B)
  localparam int unsigned C_W     = 2;   // control bits per activation
  localparam int unsigned SHIFT   = 2;   // magnitude shift applied to L and M activations

  typedef logic [ACT_W-1:0] act_t;
  typedef act_t [LANES-1:0] block_t;            // one 32-byte block, lane 0 = lowest address
  typedef logic [LANES*C_W-1:0] cblock_t;       // the 32 C bits of one block

  typedef enum logic [C_W-1:0] {
    C_RELIABLE = 2'b00,
    C_L        = 2'b01,
    C_M        = 2'b10,
    C_ML       = 2'b11
  } ctype_e;

  // Bit reversal: bit 15 <-> bit 0, 14 <-> 1, ... (its own inverse).
  function automatic act_t flip(input act_t a);
    act_t r;
    for (int i = 0; i < ACT_W; i++) r[i] = a[ACT_W-1-i];
    return r;
  endfunction

  // Write-side shift: keep the sign, move the magnitude bits 2 places left.
  function automatic act_t shift_store(input act_t a);
    return {a[ACT_W-1], a[ACT_W-2-SHIFT:0], {SHIFT{1'b0}}};
  endfunction

  // Read-side shift: keep the sign, pad the two leftmost magnitude bits with 0,
  // i.e. {s, '00', a[14:2]}.
  function automatic act_t shift_restore(input act_t a);
    return {a[ACT_W-1], {SHIFT{1'b0}}, a[ACT_W-2:SHIFT]};
  endfunction

  function automatic ctype_e ctype_of(input cblock_t c, input int unsigned lane);
    return ctype_e'(c[lane*C_W +: C_W]);
  endfunction

endpackage
