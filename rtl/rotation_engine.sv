// rotation_engine: hierarchical image rotation engine (top level).
//
// Computes, for an angle phi, the rotated position of every pixel of an
// M x MY image (M columns, MY rows) about the image centre, using only H+2
// CORDIC rotations (2H+2 when M != MY) and additions otherwise. The image
// is split hierarchically into H layers of quadrants, giving a 2^H x 2^H
// grid of NC = 4^H windows of WINX x WINY pixels (defaults: M = MY = 512,
// H = 3, 64 windows of 64 x 64).
//   Initialisation: the CORDIC engine rotates one representative quadrant
//   centre per layer (two for a rectangular image); the symmetry inference
//   units derive the other quadrant centres of each layer by swaps and
//   negations; the centre
//   generator adds them in all combinations into the NC rotated window
//   centres, stored in the centre memory.
//   Offsets: the CORDIC engine gives cos/sin of phi and the rotated first
//   pixel of a window; the offset generator walks the window in raster
//   order by adding cos/sin; the local adder array adds each offset to all
//   NC centres, so the same pixel of all NC windows comes out per cycle.
//
// Output: a valid/ready stream of WINX*WINY beats. Beat (out_u, out_v)
// carries out_x[g], out_y[g] for every window g = {gy, gx}: the rotated
// position, relative to the image centre, of the pixel at column
// gx*WINX + out_u and row gy*WINY + out_v of the image, as signed LW-bit
// integers. Pixel (c, r) sits at (c - (M-1)/2, r - (MY-1)/2) before
// rotation, so pixel centres are at half-integers; the output is the
// integer part (floor) of the rotated position, within one pixel, and
// (out_x + M/2, out_y + MY/2) is the
// nearest source pixel for nearest-neighbour mapping (it may lie outside
// the image). The centres are rounded to nearest and the offsets truncated
// before the 10-bit additions.
// Positive angles rotate counter-clockwise (x right, y up). |angle| < 1.74
// rad (CORDIC convergence); larger angles need a quadrant pre-rotation,
// which this engine does not have.
//
// Timing: `start` (while not busy) latches `angle`; with out_ready held high
// the first beat appears NOPS*(ITER+2) + 4^H*max(H-1,1) + 4 cycles later,
// NOPS = H+2 (2H+2 when M != MY),
// and one beat follows per cycle; `done` pulses with the last beat taken.
// The structure and sizes follow the evaluated engine; the fixed-point
// formats, rounding, handshakes and strictly sequential phases are this
// design's own choices.
module rotation_engine
  import rot_pkg::*;
#(
  parameter int W     = DATA_W,
  parameter int M     = IMG_M,
  parameter int MY    = M,
  parameter int H     = HIER,
  parameter int NITER = ITER,
  parameter int LW    = LOCAL_W,
  parameter int NC    = 4 ** H,
  parameter int WINX  = M >> H,
  parameter int WINY  = MY >> H,
  parameter int UW    = ((WINX > WINY ? WINX : WINY) > 1) ? $clog2(WINX > WINY ? WINX : WINY) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic signed [W-1:0]  angle,
  output logic                 busy,
  output logic                 done,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic signed [LW-1:0] out_x [NC],
  output logic signed [LW-1:0] out_y [NC],
  output logic [UW-1:0]        out_u,
  output logic [UW-1:0]        out_v,
  output logic                 out_last
);

  localparam int  MMAX   = (M > MY) ? M : MY;
  localparam int  F      = coord_frac(W, MMAX);
  localparam int  AW     = 2 * H;
  localparam bit  SQUARE = (M == MY);

  // controller <-> CORDIC
  logic                cor_start, cor_busy, cor_done;
  logic signed [W-1:0] cor_x, cor_y, cor_z, cor_rx, cor_ry;
  // layer representatives and inferred quadrant centres
  logic signed [W-1:0] rep_x [H];
  logic signed [W-1:0] rep_y [H];
  logic signed [W-1:0] rep2_x [H];
  logic signed [W-1:0] rep2_y [H];
  logic signed [W-1:0] quad_x [H][4];
  logic signed [W-1:0] quad_y [H][4];
  // centre generation
  logic                cg_start, cg_busy, cg_done, wr_en;
  logic [AW-1:0]       wr_addr;
  logic signed [LW-1:0] wr_x, wr_y;
  logic signed [LW-1:0] cx [NC];
  logic signed [LW-1:0] cy [NC];
  // offsets
  logic                og_start, og_busy, og_done;
  logic signed [W-1:0] cos_v, sin_v, first_x, first_y;
  logic                off_valid, off_ready, off_last;
  logic signed [LW-1:0] off_x, off_y;
  logic [UW-1:0]       off_u, off_v;
  logic                ctrl_busy, ctrl_done;

  rotation_controller #(.W(W), .M(M), .MY(MY), .H(H), .WINX(WINX), .WINY(WINY)) u_ctrl (
    .clk, .rst_n, .start, .angle,
    .busy(ctrl_busy), .done(ctrl_done),
    .cor_start, .cor_x, .cor_y, .cor_z, .cor_done, .cor_rx, .cor_ry,
    .rep_x, .rep_y, .rep2_x, .rep2_y,
    .cg_start, .cg_done,
    .og_start, .cos_out(cos_v), .sin_out(sin_v), .first_x, .first_y, .og_done
  );

  cordic_engine #(.W(W), .NITER(NITER)) u_cordic (
    .clk, .rst_n, .start(cor_start), .x_in(cor_x), .y_in(cor_y), .z_in(cor_z),
    .busy(cor_busy), .done(cor_done), .x_out(cor_rx), .y_out(cor_ry)
  );

  for (genvar l = 0; l < H; l++) begin : g_sym
    symmetry_inference_unit #(.W(W), .SQUARE(SQUARE)) u_sym (
      .rep_x(rep_x[l]), .rep_y(rep_y[l]), .rep2_x(rep2_x[l]), .rep2_y(rep2_y[l]),
      .quad_x(quad_x[l]), .quad_y(quad_y[l])
    );
  end

  centre_generator #(.W(W), .M(MMAX), .H(H), .LW(LW), .NC(NC), .AW(AW)) u_cgen (
    .clk, .rst_n, .start(cg_start), .quad_x, .quad_y,
    .busy(cg_busy), .done(cg_done), .wr_en, .wr_addr, .wr_x, .wr_y
  );

  centre_memory #(.NC(NC), .LW(LW), .AW(AW)) u_cmem (
    .clk, .rst_n, .wr_en, .wr_addr, .wr_x, .wr_y, .cx, .cy
  );

  offset_generator #(.W(W), .WINX(WINX), .WINY(WINY), .LW(LW), .F(F), .UW(UW)) u_ogen (
    .clk, .rst_n, .start(og_start), .cos_in(cos_v), .sin_in(sin_v),
    .x0(first_x), .y0(first_y), .busy(og_busy), .done(og_done),
    .out_valid(off_valid), .out_ready(off_ready), .out_x(off_x), .out_y(off_y),
    .out_u(off_u), .out_v(off_v), .out_last(off_last)
  );

  local_adder_array #(.NC(NC), .LW(LW), .UW(UW)) u_ladd (
    .clk, .rst_n, .cx, .cy,
    .in_valid(off_valid), .in_ready(off_ready), .ox(off_x), .oy(off_y),
    .in_u(off_u), .in_v(off_v), .in_last(off_last),
    .out_valid, .out_ready, .px(out_x), .py(out_y), .out_u, .out_v, .out_last
  );

  assign busy = ctrl_busy || out_valid;
  assign done = out_valid && out_ready && out_last;

  // The units are only started while idle, and only one runs at a time.
  a_cor_idle: assert property (@(posedge clk) disable iff (!rst_n) cor_start |-> !cor_busy);
  a_cg_idle:  assert property (@(posedge clk) disable iff (!rst_n) cg_start |-> !cg_busy);
  a_og_idle:  assert property (@(posedge clk) disable iff (!rst_n) og_start |-> !og_busy);
  a_one_unit: assert property (@(posedge clk) disable iff (!rst_n)
                               $onehot0({cor_busy, cg_busy, og_busy}));
  a_ctrl_done: assert property (@(posedge clk) disable iff (!rst_n) ctrl_done |-> !og_busy);

endmodule
