// tb_cordic_engine: checks the iterative CORDIC against real arithmetic.
//
// Random vectors (|x|,|y| < 200 pixels, so K*|v| stays inside the format, coordinate format of rot_pkg) are
// rotated by random angles within the convergence range. The result must
// equal K times the exactly rotated vector, where K is the 12-iteration
// CORDIC gain, within the angle residue arctan(2^-11)*|v|*K plus 0.01 pixel
// of arithmetic rounding. `done` must come exactly ITER cycles after start,
// with `busy` high in between.
`timescale 1ns/1ps
module tb_cordic_engine;
  import rot_pkg::*;

  localparam int F  = coord_frac(DATA_W, IMG_M);
  localparam int AF = angle_frac(DATA_W);
  localparam int NTEST = 400;

  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  logic signed [DATA_W-1:0] x_in = '0, y_in = '0, z_in = '0;
  logic busy, done;
  logic signed [DATA_W-1:0] x_out, y_out;
  int checks = 0, failures = 0;

  cordic_engine dut (.clk, .rst_n, .start, .x_in, .y_in, .z_in, .busy, .done, .x_out, .y_out);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    real k, xr, yr, zr, ex, ey, tol, mag;
    int lat;
    k = 1.0;
    for (int i = 0; i < ITER; i++) k = k * $sqrt(1.0 + 2.0 ** (-2 * i));
    #1 rst_n = 1'b0;  // asynchronous reset edge
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < NTEST; t++) begin
      @(negedge clk);
      x_in = DATA_W'($signed($urandom_range(0, 2 * 200 * 2 ** F - 1)) - 200 * 2 ** F);
      y_in = DATA_W'($signed($urandom_range(0, 2 * 200 * 2 ** F - 1)) - 200 * 2 ** F);
      z_in = DATA_W'($signed($urandom_range(0, 2 * 1782579)) - 1782579);  // +/-1.70 rad
      if (t == 0) z_in = '0;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      check(busy, "busy after start");
      lat = 0;  // edges after the one that took start
      while (!done && lat < 100) begin
        @(negedge clk);
        lat++;
      end
      check(lat == ITER, $sformatf("latency %0d, expected %0d", lat, ITER));
      xr = real'(x_in) / 2.0 ** F;
      yr = real'(y_in) / 2.0 ** F;
      zr = real'(z_in) / 2.0 ** AF;
      mag = $sqrt(xr * xr + yr * yr);
      tol = $atan(2.0 ** (-(ITER - 1))) * mag * k + 0.01;
      ex = real'(x_out) / 2.0 ** F - k * (xr * $cos(zr) - yr * $sin(zr));
      ey = real'(y_out) / 2.0 ** F - k * (xr * $sin(zr) + yr * $cos(zr));
      check(ex <= tol && -ex <= tol && ey <= tol && -ey <= tol,
            $sformatf("rotate (%0.3f,%0.3f) by %0.4f: error (%0.4f,%0.4f) > %0.4f", xr, yr, zr, ex, ey, tol));
      @(negedge clk);
      check(!done && !busy, "done is a single pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NTEST * (ITER + 10) + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
