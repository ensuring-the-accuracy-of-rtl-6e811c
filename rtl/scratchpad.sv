// scratchpad: one 2 MiB on-chip scratchpad memory (activation or weight memory).
//
// BANKS single-port banks (default 8 x 256 KiB) behind one read/write port.
// The port addresses 32-byte blocks of LANES 16-bit words; the upper address
// bits pick the bank. A write stores the lanes selected by lane_we, so a single
// activation can be written into the safe bank. A read returns the whole block
// LATENCY cycles after the request (rvalid marks it); one request can be issued
// every cycle. Used as an activation memory, the last bank is the safe bank: in
// silicon it stays at the safe supply while the other banks are undervolted,
// which makes no difference to the logic here. The weight memory uses the same
// module and stays at a safe supply as a whole.
// The 2 MiB size, the eight 256 KiB banks and the single port of the
// activation memories, the 32-byte access and the 3-cycle on-chip access
// latency follow the paper. Organising the weight memory the same way, the
// bank decoding and the read pipeline are this design's own.
module scratchpad #(
  parameter int unsigned BANKS       = 8,
  parameter int unsigned BANK_BLOCKS = 8192,
  parameter int unsigned LANES       = 16,
  parameter int unsigned ACT_W       = 16,
  parameter int unsigned LATENCY     = 3,
  localparam int unsigned BAW        = $clog2(BANK_BLOCKS),
  localparam int unsigned BKW        = (BANKS > 1) ? $clog2(BANKS) : 1,
  localparam int unsigned AW         = $clog2(BANKS * BANK_BLOCKS)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   req,
  input  logic                   we,
  input  logic [AW-1:0]          addr,      // block address
  input  logic [LANES-1:0]       lane_we,
  input  logic [LANES*ACT_W-1:0] wdata,
  output logic                   rvalid,
  output logic [LANES*ACT_W-1:0] rdata
);

  logic [LANES*ACT_W-1:0] bank_rdata [BANKS];
  logic [BKW-1:0]         bank_sel;

  if (BANKS > 1) begin : g_sel
    assign bank_sel = addr[AW-1 -: BKW];
  end else begin : g_nosel
    assign bank_sel = '0;
  end

  for (genvar b = 0; b < BANKS; b++) begin : g_bank
    act_sram_bank #(.DEPTH(BANK_BLOCKS), .LANES(LANES), .ACT_W(ACT_W)) u_bank (
      .clk    (clk),
      .en     (req && (bank_sel == BKW'(b))),
      .we     (we),
      .addr   (addr[BAW-1:0]),
      .lane_we(lane_we),
      .wdata  (wdata),
      .rdata  (bank_rdata[b])
    );
  end

  // Stage 1 is the bank's own read register; LATENCY-1 more stages delay it.
  // LATENCY must be at least 2.
  logic [LATENCY-1:0]     vpipe;
  logic [BKW-1:0]         sel_q;
  logic [LANES*ACT_W-1:0] bank_out;
  logic [LANES*ACT_W-1:0] dpipe [LATENCY-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vpipe <= '0;
      sel_q <= '0;
    end else begin
      vpipe <= {vpipe[LATENCY-2:0], req && !we};
      if (req && !we) sel_q <= bank_sel;
    end
  end

  assign bank_out = bank_rdata[sel_q];

  always_ff @(posedge clk) begin
    dpipe[0] <= bank_out;
    for (int s = 1; s < LATENCY-1; s++) dpipe[s] <= dpipe[s-1];
  end

  assign rvalid = vpipe[LATENCY-1];
  assign rdata  = dpipe[LATENCY-2];

  initial assert (LATENCY >= 2) else $fatal(1, "scratchpad: LATENCY must be at least 2");

endmodule
