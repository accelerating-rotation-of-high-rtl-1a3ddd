// tb_angle_sweep: rotates the 512 x 512 image (default engine: hierarchy 3,
// 64 windows of 64 x 64 pixels) by every angle from 0 to 45 degrees in
// 1-degree steps and checks all 262144 coordinates of each rotation
// against the exact rotation. Prints the mean error per pixel and the
// maximum error for each angle, and checks the cycle count of each
// rotation: (H+2)*(ITER+2) + 4^H*(H-1) + 4 cycles to the first result, then
// one result beat (64 pixels) per cycle.
`timescale 1ns/1ps
module tb_angle_sweep;
  import rot_pkg::*;

  localparam int WIN = IMG_M >> HIER;
  localparam int NC  = 4 ** HIER;
  localparam int EXP_CYCLES = (HIER + 2) * (ITER + 2) + NC * (HIER - 1) + 4 + WIN * WIN - 1;

  logic clk = 1'b0, rst_n = 1'b1, go = 1'b0;
  int mdeg = 0;
  logic finished;
  int r_checks, r_failures, r_cycles;
  real r_max, r_mean, worst_max, worst_mean;
  int checks = 0, failures = 0;

  rotation_run u_run (.clk, .rst_n, .go, .mdeg, .finished, .checks(r_checks),
                      .failures(r_failures), .max_err(r_max), .mean_err(r_mean), .xy_err(), .cycles(r_cycles));

  always #5 clk = ~clk;

  initial begin
    worst_max = 0.0;
    worst_mean = 0.0;
    #1 rst_n = 1'b0;  // asynchronous reset edge
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int d = 0; d <= 45; d++) begin
      @(negedge clk);
      mdeg = d * 1000;
      go = 1'b1;
      @(negedge clk);
      go = 1'b0;
      @(posedge finished);
      checks++;
      if (r_cycles != EXP_CYCLES) begin
        failures++;
        $display("FAIL: %0d deg took %0d cycles, expected %0d", d, r_cycles, EXP_CYCLES);
      end
      $display("angle %2d deg: mean error %0.4f px, max error %0.4f px", d, r_mean, r_max);
      if (r_max > worst_max) worst_max = r_max;
      if (r_mean > worst_mean) worst_mean = r_mean;
    end
    checks += r_checks;
    failures += r_failures;
    $display("sweep 0..45 deg: worst mean error %0.4f px, worst max error %0.4f px", worst_mean, worst_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (46 * (EXP_CYCLES + 20) + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
