// act_sram_bank: one bank of an activation scratchpad memory.
//
// A single-port synchronous SRAM of DEPTH words of LANES x ACT_W bits
// (default 8192 x 256 bits = 256 KiB, the bank size of the paper). One access
// per cycle: when en is high, we selects a write, in which only the 16-bit
// lanes whose bit in lane_we is set are written; otherwise it is a read whose
// data appears on rdata on the next clock edge. rdata holds its value between
// reads. Permanent bitcell faults caused by an undervolted supply are not part
// of this model; a testbench can place them in the array.
// The bank size follows the paper; the lane write enables (needed to write one
// activation into the safe bank) and the one-cycle read are this design's own.
module act_sram_bank #(
  parameter int unsigned DEPTH = 8192,
  parameter int unsigned LANES = 16,
  parameter int unsigned ACT_W = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic                   clk,
  input  logic                   en,
  input  logic                   we,
  input  logic [AW-1:0]          addr,
  input  logic [LANES-1:0]       lane_we,
  input  logic [LANES*ACT_W-1:0] wdata,
  output logic [LANES*ACT_W-1:0] rdata
);

  logic [LANES*ACT_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) begin
        for (int l = 0; l < LANES; l++)
          if (lane_we[l]) mem[addr][l*ACT_W +: ACT_W] <= wdata[l*ACT_W +: ACT_W];
      end else begin
        rdata <= mem[addr];
      end
    end
  end

endmodule
