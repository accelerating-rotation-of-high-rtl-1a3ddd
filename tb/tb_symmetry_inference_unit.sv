// tb_symmetry_inference_unit: the four inferred quadrant centres of the
// square unit (the default) must equal the exact rotations of (+-d, +-d),
// computed here with real arithmetic, when the input is the rotation of
// (d, d); rep2_* carry random values that must be ignored. The rectangular
// unit is tested by tb_symmetry_rectangular.
`timescale 1ns/1ps
module tb_symmetry_inference_unit;
  import rot_pkg::*;

  localparam int F = coord_frac(DATA_W, IMG_M);

  logic signed [DATA_W-1:0] rep_x, rep_y, rep2_x, rep2_y;
  logic signed [DATA_W-1:0] quad_x [4];
  logic signed [DATA_W-1:0] quad_y [4];
  int checks = 0, failures = 0;

  symmetry_inference_unit dut (.rep_x, .rep_y, .rep2_x, .rep2_y, .quad_x, .quad_y);

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
    real phi, d;
    for (int t = 0; t < 500; t++) begin
      phi = (real'($urandom_range(0, 200000)) / 100000.0 - 1.0) * 3.14159265;
      d   = real'($urandom_range(1, 256));
      rep_x    = fx(d * $cos(phi) - d * $sin(phi));
      rep_y    = fx(d * $sin(phi) + d * $cos(phi));
      rep2_x   = DATA_W'($urandom);
      rep2_y   = DATA_W'($urandom);
      #1;
      for (int q = 0; q < 4; q++) begin
        check_q(q, real'(quad_x[q]), real'(quad_y[q]), q[0] ? d : -d, q[1] ? d : -d, phi, "square");
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
