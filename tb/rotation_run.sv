// rotation_run: test helper that owns one rotation engine of a given size
// (M columns, MY rows, hierarchy H) and, on `go`, rotates the whole image by
// `mdeg` millidegrees and checks every output coordinate against the exact
// rotation (real arithmetic). Allowed error: two roundings to integer
// pixels (0.5 each), the CORDIC angle residue arctan(2^-(ITER-1)) at the
// image corner (at most 0.71*max(M, MY) from the centre) and 0.05 pixel of
// arithmetic rounding. Out_ready is held high. Reports its counts and the
// mean and maximum error when `finished` rises; xy_err is the average of
// the largest x error and the largest y error of the run. Local adder width
// is clog2(max(M, MY))+1 so that the rotated image fits. W sets the CORDIC/offset datapath width;
// with STRICT = 0 the error is only measured, as narrow datapaths are
// expected to exceed the bound.
`timescale 1ns/1ps
module rotation_run
  import rot_pkg::*;
#(
  parameter int M = IMG_M,
  parameter int MY = M,
  parameter int H = HIER,
  parameter int W = DATA_W,
  parameter bit STRICT = 1'b1   // count coordinates outside the bound as failures
) (
  input  logic clk,
  input  logic rst_n,
  input  logic go,
  input  int   mdeg,
  output logic finished,
  output int   checks,
  output int   failures,
  output real  max_err,
  output real  mean_err,
  output real  xy_err,
  output int   cycles
);

  localparam int NC  = 4 ** H;
  localparam int MMAX = (M > MY) ? M : MY;
  localparam int WINX = M >> H;
  localparam int WINY = MY >> H;
  localparam int UW  = ((WINX > WINY ? WINX : WINY) > 1) ? $clog2(WINX > WINY ? WINX : WINY) : 1;
  localparam int LW  = $clog2(MMAX) + 1;
  localparam int AF  = angle_frac(W);
  localparam real PI = 3.14159265358979323846;

  logic start = 1'b0;
  logic signed [W-1:0] angle = '0;
  logic busy, done, out_valid, out_last;
  logic signed [LW-1:0] out_x [NC];
  logic signed [LW-1:0] out_y [NC];
  logic [UW-1:0] out_u, out_v;

  rotation_engine #(.W(W), .M(M), .MY(MY), .H(H), .LW(LW)) dut (
    .clk, .rst_n, .start, .angle, .busy, .done, .out_valid, .out_ready(1'b1),
    .out_x, .out_y, .out_u, .out_v, .out_last
  );

  initial begin
    real phi, c, s, px, py, ex, ey, tol, sum, mx, my;
    int a, n;
    finished = 1'b0;
    checks = 0; failures = 0; max_err = 0.0; mean_err = 0.0; xy_err = 0.0; cycles = 0;
    tol = 1.05 + $atan(2.0 ** (-(ITER - 1))) * 0.71 * real'(MMAX);
    forever begin
      @(posedge go);
      finished = 1'b0;
      a   = int'($floor(real'(mdeg) / 1000.0 * PI / 180.0 * (2.0 ** AF) + 0.5));
      phi = real'(a) / (2.0 ** AF);
      c = $cos(phi);
      s = $sin(phi);
      sum = 0.0; n = 0; max_err = 0.0; mx = 0.0; my = 0.0; cycles = 0;
      @(negedge clk);
      angle = W'(a);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      while (!(out_valid && out_last)) begin
        if (out_valid) begin
          for (int g = 0; g < NC; g++) begin
            px = real'((g % (1 << H)) * WINX + int'(out_u)) - (M - 1) / 2.0;
            py = real'((g / (1 << H)) * WINY + int'(out_v)) - (MY - 1) / 2.0;
            ex = real'(out_x[g]) + 0.5 - (px * c - py * s);
            ey = real'(out_y[g]) + 0.5 - (px * s + py * c);
            if (ex < 0) ex = -ex;
            if (ey < 0) ey = -ey;
            sum += (ex + ey) / 2.0;
            n++;
            if (ex > mx) mx = ex;
            if (ey > my) my = ey;
            if (ex > max_err) max_err = ex;
            if (ey > max_err) max_err = ey;
            checks++;
            if (STRICT && (ex > tol || ey > tol)) begin
              failures++;
              if (failures < 10) $display("FAIL: M=%0d MY=%0d H=%0d %0d mdeg window %0d pixel (%0d,%0d): (%0d,%0d)",
                                          M, MY, H, mdeg, g, out_u, out_v, out_x[g], out_y[g]);
            end
          end
        end
        @(negedge clk);
        cycles++;
      end
      // the last beat
      checks++;
      if (n != NC * (WINX * WINY - 1)) begin
        failures++;
        $display("FAIL: M=%0d MY=%0d H=%0d: %0d coordinates before the last beat", M, MY, H, n);
      end
      mean_err = sum / real'(n);
      xy_err   = (mx + my) / 2.0;
      @(negedge clk);
      finished = 1'b1;
    end
  end

endmodule
