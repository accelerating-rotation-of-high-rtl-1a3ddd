// offset_generator: rotated offsets of the pixels of one window by addition.
//
// Every window of the grid has the same pixel offsets relative to its
// centre, so the rotated offsets are generated once, for a WINX x WINY
// window (64 x 64 in the evaluated engine). Given the rotated offset of the first
// pixel (x0, y0) and cos/sin of the angle, the others follow from
// neighbouring pixels being one unit apart:
//   R(u+1, v) = R(u, v) + ( cos, sin)   next pixel in a row
//   R(0, v+1) = R(0, v) + (-sin, cos)   first pixel of the next row
// Pixels are produced in raster order, u (x, column) fastest, so each
// offset costs one vector addition: WINX*WINY - 1 additions per window on one
// pair of DATA_W-bit adders. A second register keeps the row start.
// Each offset leaves truncated (floor) to a signed LW-bit integer. The
// local adders add it to centres rounded to nearest, so the sum is the
// integer part of the rotated position within one pixel; see
// rotation_engine for why that is the right output for pixel addresses.
//
// Interface/timing: `start` (while not busy) loads cos/sin/x0/y0 and the
// first offset is valid in the next cycle. A valid/ready stream then gives
// one offset per cycle while out_ready is high; out_valid/out_* hold while
// it is low (stall). out_u/out_v give the pixel within the window,
// out_last marks the final pixel, and `done` pulses in the cycle after it
// is taken. The incremental scheme is the one the engine is built on; the
// raster order, the row-start register and the handshake are this design's
// own choices.
module offset_generator
  import rot_pkg::*;
#(
  parameter int W    = DATA_W,
  parameter int WINX = IMG_M >> HIER,
  parameter int WINY = WINX,
  parameter int LW   = LOCAL_W,
  parameter int F    = coord_frac(DATA_W, IMG_M),
  parameter int UW   = ((WINX > WINY ? WINX : WINY) > 1) ? $clog2(WINX > WINY ? WINX : WINY) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic signed [W-1:0]  cos_in,
  input  logic signed [W-1:0]  sin_in,
  input  logic signed [W-1:0]  x0,
  input  logic signed [W-1:0]  y0,
  output logic                 busy,
  output logic                 done,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic signed [LW-1:0] out_x,
  output logic signed [LW-1:0] out_y,
  output logic [UW-1:0]        out_u,
  output logic [UW-1:0]        out_v,
  output logic                 out_last
);

  logic signed [W-1:0] cos_q, sin_q;
  logic signed [W-1:0] cur_x, cur_y, row_x, row_y;
  logic signed [W-1:0] a_x, a_y, b_x, b_y, nxt_x, nxt_y;
  logic [UW-1:0]       u_q, v_q;
  logic                row_end, fire;

  assign row_end  = (int'(u_q) == WINX - 1);
  assign out_last = row_end && (int'(v_q) == WINY - 1);
  assign fire     = out_valid && out_ready;

  // The single vector adder: along the row, or down from the row start.
  always_comb begin
    if (row_end) begin
      a_x = row_x;   a_y = row_y;
      b_x = -sin_q;  b_y = cos_q;
    end else begin
      a_x = cur_x;   a_y = cur_y;
      b_x = cos_q;   b_y = sin_q;
    end
    nxt_x = a_x + b_x;
    nxt_y = a_y + b_y;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      out_valid <= 1'b0;
      cos_q     <= '0;
      sin_q     <= '0;
      cur_x     <= '0;
      cur_y     <= '0;
      row_x     <= '0;
      row_y     <= '0;
      u_q       <= '0;
      v_q       <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy      <= 1'b1;
          out_valid <= 1'b1;
          cos_q     <= cos_in;
          sin_q     <= sin_in;
          cur_x     <= x0;
          cur_y     <= y0;
          row_x     <= x0;
          row_y     <= y0;
          u_q       <= '0;
          v_q       <= '0;
        end
      end else if (fire) begin
        if (out_last) begin
          busy      <= 1'b0;
          out_valid <= 1'b0;
          done      <= 1'b1;
        end else if (row_end) begin
          cur_x <= nxt_x;
          cur_y <= nxt_y;
          row_x <= nxt_x;
          row_y <= nxt_y;
          u_q   <= '0;
          v_q   <= v_q + 1'b1;
        end else begin
          cur_x <= nxt_x;
          cur_y <= nxt_y;
          u_q   <= u_q + 1'b1;
        end
      end
    end
  end

  // Truncate to the integer part (floor) and keep LW bits.
  function automatic logic signed [LW-1:0] to_local(logic signed [W-1:0] v);
    return v[F+LW-1:F];
  endfunction

  assign out_x = to_local(cur_x);
  assign out_y = to_local(cur_y);
  assign out_u = u_q;
  assign out_v = v_q;

  // Stream rule: an offered offset stays unchanged until it is taken.
  property p_hold;
    @(posedge clk) disable iff (!rst_n)
      out_valid && !out_ready |=> out_valid && $stable(out_x) && $stable(out_y)
                                  && $stable(out_u) && $stable(out_v);
  endproperty
  a_hold: assert property (p_hold);

endmodule
