// symmetry_inference_unit: rotated quadrant centres of one hierarchy layer.
//
// A layer has its four quadrant centres at (+-dx, +-dy) relative to the
// layer centre. The representative (dx, dy) is rotated by CORDIC, giving
// (X, Y). Rotation is linear, so the opposite quadrant is its negation.
// For a square layer (dx = dy, SQUARE = 1) rotation also commutes with the
// 90-degree symmetries of the square, so the remaining two quadrants
// follow from (X, Y) with swaps and negations only:
//   q = 3  (+d,+d) -> ( X,  Y)      q = 0  (-d,-d) -> (-X, -Y)
//   q = 1  (+d,-d) -> ( Y, -X)      q = 2  (-d,+d) -> (-Y,  X)
// A rectangular layer (SQUARE = 0) needs a second CORDIC result,
// (X2, Y2) = R(dx, -dy), on rep2_*: then q = 1 -> (X2, Y2) and
// q = 2 -> (-X2, -Y2). rep2_* are unused when SQUARE = 1.
// The quadrant index is q = {y_positive, x_positive}. The unit is purely
// combinational; inference costs at most a negation per coordinate.
module symmetry_inference_unit
  import rot_pkg::*;
#(
  parameter int W      = DATA_W,
  parameter bit SQUARE = 1'b1
) (
  input  logic signed [W-1:0] rep_x,
  input  logic signed [W-1:0] rep_y,
  input  logic signed [W-1:0] rep2_x,
  input  logic signed [W-1:0] rep2_y,
  output logic signed [W-1:0] quad_x [4],
  output logic signed [W-1:0] quad_y [4]
);

  always_comb begin
    quad_x[3] = rep_x;   quad_y[3] = rep_y;
    quad_x[0] = -rep_x;  quad_y[0] = -rep_y;
    if (SQUARE) begin
      quad_x[1] = rep_y;   quad_y[1] = -rep_x;
      quad_x[2] = -rep_y;  quad_y[2] = rep_x;
    end else begin
      quad_x[1] = rep2_x;  quad_y[1] = rep2_y;
      quad_x[2] = -rep2_x; quad_y[2] = -rep2_y;
    end
  end

endmodule
