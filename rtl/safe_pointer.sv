// safe_pointer: the Safe Pointer (SP) that runs the safe bank as a FIFO.
//
// SP is the activation address of the next safe-bank entry. It starts at the
// last activation address of the memory (LAST) and moves one entry towards
// lower addresses each time an M&L activation is stored (output role) or
// restored (input role), so activations come back in the order they were
// written. It returns to LAST whenever the memory swaps its input/output role
// (role differs from the role seen on the previous cycle) and on reset.
// overflow is a sticky flag raised when more entries are used than the safe
// bank (SAFE_ENTRIES activations) holds; it clears on the next role swap.
// Starting at the last address, advancing one entry per M&L activation and
// resetting on each role swap follow the paper. The paper says entries
// occupy "ascending addresses" from the last address; as nothing lies above
// the last address, this pointer descends instead. The overflow flag is this
// design's own.
module safe_pointer #(
  parameter int unsigned AW           = 20,        // activation address width
  parameter int unsigned SAFE_ENTRIES = 131072     // activations in the safe bank
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          role,      // 1: output (write) buffer, 0: input (read) buffer
  input  logic          advance,   // an M&L activation used the entry at sp
  output logic [AW-1:0] sp,
  output logic          overflow
);

  localparam logic [AW-1:0] LAST = '1;
  localparam logic [AW-1:0] LIMIT = AW'((64'(1) << AW) - 64'(SAFE_ENTRIES)); // lowest safe entry

  logic role_q;
  logic swap;

  assign swap = (role != role_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      role_q   <= 1'b0;
      sp       <= LAST;
      overflow <= 1'b0;
    end else begin
      role_q <= role;
      if (swap) begin
        sp       <= LAST;
        overflow <= 1'b0;
      end else if (advance) begin
        sp <= sp - 1'b1;
        if (sp == LIMIT - 1'b1) overflow <= 1'b1;   // an entry below the safe bank was used
      end
    end
  end

endmodule
