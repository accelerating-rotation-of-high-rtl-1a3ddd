// centre_generator: rotated window-grid centres from the layer centres.
//
// With H hierarchy layers the image is split into a 2^H x 2^H grid of
// windows. Each window centre lies in one quadrant of every layer, and its
// rotated position (relative to the image centre) is the sum of the rotated
// quadrant centres it lies in, one per layer. This unit forms all 4^H sums
// with one vector adder (an x and a y adder), sequentially: H-1 additions
// per centre, 4^H*(H-1) in all (128 for H = 3), one addition per clock.
// Each finished sum is rounded to a signed LOCAL_W-bit integer pixel
// coordinate and written to the centre memory. M (the larger image side)
// only sets the fixed-point format of the quadrant vectors.
//
// Centre index g = {gy, gx}, gx and gy of H bits each, gx = 0 the left-most
// window column and gy = 0 the bottom row (most negative y). At layer l
// (l = 0 the outermost) the window lies in quadrant
// q = {gy[H-1-l], gx[H-1-l]} (bit 1 = positive side).
//
// Interface/timing: `start` (while not busy) begins; the quadrant vectors
// quad_x/quad_y must stay stable while busy. One memory write per
// max(H-1,1) cycles on wr_*; `done` pulses in the cycle after the last
// write. The sequential schedule follows the evaluated engine; the order of
// the centres and the rounding to nearest are this design's own choices.
module centre_generator
  import rot_pkg::*;
#(
  parameter int W      = DATA_W,
  parameter int M      = IMG_M,
  parameter int H      = HIER,
  parameter int LW     = LOCAL_W,
  parameter int NC     = 4 ** H,
  parameter int AW     = (2 * H > 0) ? 2 * H : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic signed [W-1:0]  quad_x [H][4],
  input  logic signed [W-1:0]  quad_y [H][4],
  output logic                 busy,
  output logic                 done,
  output logic                 wr_en,
  output logic [AW-1:0]        wr_addr,
  output logic signed [LW-1:0] wr_x,
  output logic signed [LW-1:0] wr_y
);

  localparam int F     = coord_frac(W, M);
  localparam int NSTEP = (H > 1) ? H - 1 : 1;
  localparam int SW    = (NSTEP > 1) ? $clog2(NSTEP) : 1;

  logic [AW-1:0]       g_q;
  logic [SW-1:0]       s_q;
  logic signed [W-1:0] acc_x, acc_y;
  logic signed [W-1:0] a_x, a_y, b_x, b_y, sum_x, sum_y;
  logic [H-1:0]        gx, gy;
  logic                last_step;

  assign gx = g_q[H-1:0];
  assign gy = g_q[2*H-1:H];

  // Quadrant of layer l for the current centre.
  function automatic logic [1:0] quad_of(logic [H-1:0] cx, logic [H-1:0] cy, int l);
    return {cy[H-1-l], cx[H-1-l]};
  endfunction

  always_comb begin
    a_x = acc_x;
    a_y = acc_y;
    b_x = '0;
    b_y = '0;
    if (s_q == '0) begin
      a_x = quad_x[0][quad_of(gx, gy, 0)];
      a_y = quad_y[0][quad_of(gx, gy, 0)];
    end
    for (int l = 1; l < H; l++) begin
      if (int'(s_q) == l - 1) begin
        b_x = quad_x[l][quad_of(gx, gy, l)];
        b_y = quad_y[l][quad_of(gx, gy, l)];
      end
    end
    sum_x = a_x + b_x;
    sum_y = a_y + b_y;
  end

  assign last_step = (int'(s_q) == NSTEP - 1);

  // Round to nearest integer pixel and keep LW bits.
  function automatic logic signed [LW-1:0] to_local(logic signed [W-1:0] v);
    logic signed [W-1:0] r;
    r = (v + W'(longint'(1) <<< (F - 1))) >>> F;
    return r[LW-1:0];
  endfunction

  assign wr_en   = busy && last_step;
  assign wr_addr = g_q;
  assign wr_x    = to_local(sum_x);
  assign wr_y    = to_local(sum_y);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      g_q   <= '0;
      s_q   <= '0;
      acc_x <= '0;
      acc_y <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          g_q  <= '0;
          s_q  <= '0;
        end
      end else begin
        acc_x <= sum_x;
        acc_y <= sum_y;
        if (last_step) begin
          s_q <= '0;
          if (int'(g_q) == NC - 1) begin
            busy <= 1'b0;
            done <= 1'b1;
          end else begin
            g_q <= g_q + 1'b1;
          end
        end else begin
          s_q <= s_q + 1'b1;
        end
      end
    end
  end

endmodule
