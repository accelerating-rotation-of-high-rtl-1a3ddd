// tb_resolutions: runs the engine at other image sizes, each with the
// hierarchy that minimises the latency model for that size (128 -> 3,
// 256 -> 4, 512 -> 4, 1024 -> 4, 2048 -> 5). Each engine rotates its whole
// image by 30 degrees and all coordinates are checked against the exact
// rotation (see rotation_run for the error bound); the cycle count must be
// (H+2)*(ITER+2) + 4^H*(H-1) + 4 to the first beat plus one beat per
// window pixel.
`timescale 1ns/1ps
module tb_resolutions;
  import rot_pkg::*;

  localparam int NCFG = 5;
  localparam int CM [NCFG] = '{128, 256, 512, 1024, 2048};
  localparam int CH [NCFG] = '{3, 4, 4, 4, 5};

  logic clk = 1'b0, rst_n = 1'b1;
  logic go [NCFG];
  logic finished [NCFG];
  int r_checks [NCFG];
  int r_failures [NCFG];
  int r_cycles [NCFG];
  real r_max [NCFG];
  real r_mean [NCFG];
  int checks = 0, failures = 0;

  for (genvar i = 0; i < NCFG; i++) begin : g_cfg
    rotation_run #(.M(CM[i]), .H(CH[i])) u_run (
      .clk, .rst_n, .go(go[i]), .mdeg(30000), .finished(finished[i]),
      .checks(r_checks[i]), .failures(r_failures[i]), .max_err(r_max[i]),
      .mean_err(r_mean[i]), .xy_err(), .cycles(r_cycles[i])
    );
  end

  always #5 clk = ~clk;

  function automatic int exp_cycles(int m, int h);
    return (h + 2) * (ITER + 2) + (4 ** h) * (h - 1) + 4 + (m >> h) * (m >> h) - 1;
  endfunction

  initial begin
    for (int i = 0; i < NCFG; i++) go[i] = 1'b0;
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NCFG; i++) begin
      @(negedge clk);
      go[i] = 1'b1;
      @(negedge clk);
      go[i] = 1'b0;
      wait (finished[i]);
      checks += r_checks[i] + 1;
      failures += r_failures[i];
      if (r_cycles[i] != exp_cycles(CM[i], CH[i])) begin
        failures++;
        $display("FAIL: M=%0d H=%0d took %0d cycles, expected %0d", CM[i], CH[i], r_cycles[i], exp_cycles(CM[i], CH[i]));
      end
      $display("M=%0d H=%0d: %0d windows of %0d x %0d, %0d cycles, mean error %0.4f px, max error %0.4f px",
               CM[i], CH[i], 4 ** CH[i], CM[i] >> CH[i], CM[i] >> CH[i], r_cycles[i], r_mean[i], r_max[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
