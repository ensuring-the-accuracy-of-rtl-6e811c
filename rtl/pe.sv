// pe: one processing element of the output-stationary systolic array.
//
// Each cycle the PE multiplies the 16-bit fixed-point activation arriving from
// its left neighbour by the weight arriving from its upper neighbour and adds
// the product to its own accumulator (output stationary: the partial sum never
// leaves the PE). It passes the activation to the right and the weight down
// through one register each, so neighbours see the operands one cycle later.
// clear restarts the accumulation with the current product. acc is the full
// precision sum; rounding it back to 16 bits is left to the output buffer.
// The 16-bit fixed-point operands and the output-stationary mesh follow the
// paper; the accumulator width and the clear input are this design's own.
module pe #(
  parameter int unsigned ACT_W = 16,
  parameter int unsigned ACC_W = 40
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic signed [ACT_W-1:0] a_in,
  input  logic signed [ACT_W-1:0] w_in,
  output logic signed [ACT_W-1:0] a_out,
  output logic signed [ACT_W-1:0] w_out,
  output logic signed [ACC_W-1:0] acc
);

  logic signed [2*ACT_W-1:0] prod;
  assign prod = a_in * w_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_out <= '0;
      w_out <= '0;
      acc   <= '0;
    end else begin
      a_out <= a_in;
      w_out <= w_in;
      acc   <= clear ? ACC_W'(prod) : acc + ACC_W'(prod);
    end
  end

endmodule
