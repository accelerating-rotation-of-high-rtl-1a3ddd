// tb_symmetry_rectangular: the four inferred quadrant centres of the
// rectangular symmetry inference unit (SQUARE = 0) must equal the exact
// rotations of (+-dx, +-dy), computed here with real arithmetic, for random
// dx and dy, when the inputs are the rotations of (dx, dy) and (dx, -dy).
`timescale 1ns/1ps
module tb_symmetry_rectangular;
  import rot_pkg::*;

  localparam int F = coord_frac(DATA_W, IMG_M);

  logic signed [DATA_W-1:0] r_rep_x, r_rep_y, r_rep2_x, r_rep2_y;
  logic signed [DATA_W-1:0] r_quad_x [4];
  logic signed [DATA_W-1:0] r_quad_y [4];
  int checks = 0, failures = 0;

  symmetry_inference_unit #(.SQUARE(1'b0)) dut_rect (
    .rep_x(r_rep_x), .rep_y(r_rep_y), .rep2_x(r_rep2_x), .rep2_y(r_rep2_y),
    .quad_x(r_quad_x), .quad_y(r_quad_y)
  );

  function automatic logic signed [DATA_W-1:0] fx(real v);
    return DATA_W'(longint'($floor(v * 2.0 ** F + 0.5)));
  endfunction

  function automatic void check_q(int q, real got_x, real got_y, real sx, real sy, real phi, string name);
    real ex, ey;
    ex = got_x / 2.0 ** F - (sx * $cos(phi) - sy * $sin(phi));
    ey = got_y / 2.0 ** F - (sx * $sin(phi) + sy * $cos(phi));
    checks++;
    if (ex > 1e-4 || ex < -1e-4 || ey > 1e-4 || ey < -1e-4) begin
      failures++;
      if (failures < 20) $display("FAIL: %s quadrant %0d, (%0.0f,%0.0f), phi %0.4f: error (%g,%g)",
                                  name, q, sx, sy, phi, ex, ey);
    end
  endfunction

  initial begin
    real phi, dx, dy;
    for (int t = 0; t < 500; t++) begin
      phi = (real'($urandom_range(0, 200000)) / 100000.0 - 1.0) * 3.14159265;
      dx  = real'($urandom_range(1, 256));
      dy  = real'($urandom_range(1, 256));
      r_rep_x  = fx(dx * $cos(phi) - dy * $sin(phi));
      r_rep_y  = fx(dx * $sin(phi) + dy * $cos(phi));
      r_rep2_x = fx(dx * $cos(phi) + dy * $sin(phi));
      r_rep2_y = fx(dx * $sin(phi) - dy * $cos(phi));
      #1;
      for (int q = 0; q < 4; q++) begin
        check_q(q, real'(r_quad_x[q]), real'(r_quad_y[q]), q[0] ? dx : -dx, q[1] ? dy : -dy, phi, "rect");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
