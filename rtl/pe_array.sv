// pe_array: ROWS x COLS output-stationary systolic array (default 16 x 16).
//
// PEs sit on a 2D mesh: activations enter each row from the left (a_left[i])
// and move one PE to the right per cycle, weights enter each column from the
// top (w_top[j]) and move one PE down per cycle. PE (i,j) therefore sees the
// operands fed at cycle t on cycle t+j (activations) and t+i (weights); the
// feeder skews its inputs so that matching pairs meet (see dispatcher). Every
// PE accumulates its own output; all ROWS*COLS sums are visible on acc.
// clear is broadcast and restarts every accumulator with the current product.
// Size, mesh and output-stationary dataflow follow the paper; the broadcast
// clear and the flat accumulator output are this design's own.
module pe_array #(
  parameter int unsigned ROWS  = 16,
  parameter int unsigned COLS  = 16,
  parameter int unsigned ACT_W = 16,
  parameter int unsigned ACC_W = 40
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic signed [ACT_W-1:0] a_left [ROWS],
  input  logic signed [ACT_W-1:0] w_top  [COLS],
  output logic signed [ACC_W-1:0] acc    [ROWS][COLS]
);

  // a_h[i][j] enters PE (i,j) from the left; w_v[i][j] enters it from above.
  logic signed [ACT_W-1:0] a_h [ROWS][COLS+1];
  logic signed [ACT_W-1:0] w_v [ROWS+1][COLS];

  for (genvar i = 0; i < ROWS; i++) begin : g_left
    assign a_h[i][0] = a_left[i];
  end
  for (genvar j = 0; j < COLS; j++) begin : g_top
    assign w_v[0][j] = w_top[j];
  end

  for (genvar i = 0; i < ROWS; i++) begin : g_row
    for (genvar j = 0; j < COLS; j++) begin : g_col
      pe #(.ACT_W(ACT_W), .ACC_W(ACC_W)) u_pe (
        .clk, .rst_n,
        .clear(clear),
        .a_in (a_h[i][j]),
        .w_in (w_v[i][j]),
        .a_out(a_h[i][j+1]),
        .w_out(w_v[i+1][j]),
        .acc  (acc[i][j])
      );
    end
  end

endmodule
