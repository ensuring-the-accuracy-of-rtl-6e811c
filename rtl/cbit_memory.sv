// cbit_memory: the control-bit (C-bit) array of one activation memory.
//
// Holds the two C bits of every activation, one word of LANES x 2 bits per
// 32-byte activation block (default 65536 x 32 bits = 256 KiB for a 2 MiB
// activation memory). The bits describe where the undervolted bitcells are
// faulty; they are written once, at post-fabrication test, through the same
// port (en and we high) and are only read afterwards. In silicon the array is
// kept at the safe supply, so it holds no faults itself.
// Timing: a read issued with en high and we low returns the word LATENCY
// cycles later, flagged by rvalid, so that it arrives together with the
// activation block read at the same address and cycle.
// The 2 bits per activation and the 256 KiB size follow the paper; the port,
// the word organisation and the latency matching are this design's own.
module cbit_memory #(
  parameter int unsigned BLOCKS  = 65536,
  parameter int unsigned WIDTH   = 32,
  parameter int unsigned LATENCY = 3,
  localparam int unsigned AW     = $clog2(BLOCKS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic             rvalid,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [BLOCKS];
  logic [WIDTH-1:0] dpipe [LATENCY];
  logic [LATENCY-1:0] vpipe;

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    dpipe[0]  <= mem[addr];
    end
    for (int s = 1; s < LATENCY; s++) dpipe[s] <= dpipe[s-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[LATENCY-2:0], en && !we};
  end

  assign rvalid = vpipe[LATENCY-1];
  assign rdata  = dpipe[LATENCY-1];

  initial assert (LATENCY >= 2) else $fatal(1, "cbit_memory: LATENCY must be at least 2");

endmodule
