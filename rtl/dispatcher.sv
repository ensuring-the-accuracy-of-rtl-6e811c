// dispatcher: feeds one tile of activations and weights into the PE array.
//
// It holds an activation tile A (ROWS rows of K = LANES activations, one
// 32-byte block per row) and a weight tile W (K rows of COLS weights, one block
// per row), written one block at a time through a_we/a_row and w_we/w_row.
// A start pulse runs K+ROWS+COLS-2 feed steps. At step t it drives row i of
// the array with A[i][t-i] and column j with W[t-j][j], and zero outside those
// ranges, so that A[i][k] and W[k][j] meet in PE (i,j) at step k+i+j and the
// PE adds their product. clear is high on step 0 so every PE starts a fresh
// sum; done pulses on the cycle after the last step, when every accumulator
// holds its complete dot product.
// The paper says only that dispatchers, driven by the control unit, feed the
// PE array; the tile buffers and this skewed schedule are this design's own.
module dispatcher
  import sas_pkg::*;
#(
  parameter int unsigned ROWS = 16,
  parameter int unsigned COLS = 16,
  localparam int unsigned STEPS = LANES + ROWS + COLS - 2,
  localparam int unsigned SW    = $clog2(STEPS + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  a_we,
  input  logic [$clog2(ROWS)-1:0] a_row,
  input  block_t                a_data,
  input  logic                  w_we,
  input  logic [$clog2(LANES)-1:0] w_row,
  input  block_t                w_data,
  input  logic                  start,
  output logic                  busy,
  output logic                  done,
  output logic                  clear,
  output logic signed [ACT_W-1:0] a_left [ROWS],
  output logic signed [ACT_W-1:0] w_top  [COLS]
);

  block_t a_tile [ROWS];    // a_tile[i][k]
  block_t w_tile [LANES];   // w_tile[k][j]
  logic [SW-1:0] step;

  always_ff @(posedge clk) begin
    if (a_we) a_tile[a_row] <= a_data;
    if (w_we) w_tile[w_row] <= w_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      step <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        step <= '0;
      end else if (busy) begin
        if (step == SW'(STEPS - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        step <= step + 1'b1;
      end
    end
  end

  assign clear = busy && (step == '0);

  always_comb begin
    for (int i = 0; i < ROWS; i++) begin
      a_left[i] = '0;
      if (busy && (int'(step) >= i) && (int'(step) - i < LANES))
        a_left[i] = a_tile[i][int'(step) - i];
    end
    for (int j = 0; j < COLS; j++) begin
      w_top[j] = '0;
      if (busy && (int'(step) >= j) && (int'(step) - j < LANES))
        w_top[j] = w_tile[int'(step) - j][j];
    end
  end

endmodule
