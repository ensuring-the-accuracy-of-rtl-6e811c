// output_buffer: intermediate buffer between the PE array and the memories.
//
// On capture it takes all ROWS x COLS accumulators of the array at once,
// converts each to a 16-bit fixed-point activation (arithmetic shift right by
// frac_bits, then saturation to the 16-bit range) and holds them. It then
// hands them out in order, one 32-byte block per array row (row 0 first, lane
// j = column j), on a valid/ready handshake, so the activation memory receives
// them sequentially. busy is high from capture until the last row has been
// taken; capture is ignored while busy.
// The paper says the array has buffers that store output activations and
// arrange them sequentially before they are forwarded; the capture-all scheme
// and the shift-and-saturate rounding are this design's own.
module output_buffer
  import sas_pkg::*;
#(
  parameter int unsigned ROWS  = 16,
  parameter int unsigned COLS  = 16,
  parameter int unsigned ACC_W = 40
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    capture,
  input  logic [4:0]              frac_bits,
  input  logic signed [ACC_W-1:0] acc [ROWS][COLS],
  output logic                    busy,
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic [$clog2(ROWS)-1:0] out_row,
  output block_t                  out_data
);

  localparam logic signed [ACC_W-1:0] MAXV = ACC_W'(32767);
  localparam logic signed [ACC_W-1:0] MINV = -ACC_W'(32768);

  function automatic act_t requant(input logic signed [ACC_W-1:0] v, input logic [4:0] f);
    logic signed [ACC_W-1:0] s;
    s = v >>> f;
    if (s > MAXV)      return act_t'(MAXV);
    else if (s < MINV) return act_t'(MINV);
    else               return act_t'(s);
  endfunction

  block_t rows_q [ROWS];

  always_ff @(posedge clk) begin
    if (capture && !busy)
      for (int i = 0; i < ROWS; i++)
        for (int j = 0; j < COLS; j++)
          rows_q[i][j] <= requant(acc[i][j], frac_bits);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      out_row <= '0;
    end else if (capture && !busy) begin
      busy    <= 1'b1;
      out_row <= '0;
    end else if (busy && out_ready) begin
      out_row <= out_row + 1'b1;
      if (out_row == $clog2(ROWS)'(ROWS - 1)) busy <= 1'b0;
    end
  end

  assign out_valid = busy;
  assign out_data  = rows_q[out_row];

  initial assert (COLS == LANES) else $fatal(1, "output_buffer: COLS must equal LANES");

endmodule
