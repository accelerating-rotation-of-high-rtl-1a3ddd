// tb_rectangular: runs the engine on rectangular images, where each layer
// needs a second CORDIC rotation for its (dx, -dy) quadrant centre. Each
// engine rotates its whole image by 30 and by -75 degrees and all
// coordinates are checked against the exact rotation (see rotation_run for
// the error bound); the cycle count must be (2H+2)*(ITER+2) +
// 4^H*max(H-1,1) + 4 to the first beat plus one beat per window pixel.
`timescale 1ns/1ps
module tb_rectangular;
  import rot_pkg::*;

  localparam int NCFG = 4;
  localparam int CM  [NCFG] = '{512, 256, 512, 128};
  localparam int CMY [NCFG] = '{256, 512, 384, 64};
  localparam int CH  [NCFG] = '{3, 3, 3, 2};
  localparam int NANG = 2;
  localparam int ANG [NANG] = '{30000, -75000};

  logic clk = 1'b0, rst_n = 1'b1;
  logic go [NCFG];
  logic finished [NCFG];
  int mdeg = 0;
  int r_checks [NCFG];
  int r_failures [NCFG];
  int r_cycles [NCFG];
  real r_max [NCFG];
  real r_mean [NCFG];
  int checks = 0, failures = 0;

  for (genvar i = 0; i < NCFG; i++) begin : g_cfg
    rotation_run #(.M(CM[i]), .MY(CMY[i]), .H(CH[i])) u_run (
      .clk, .rst_n, .go(go[i]), .mdeg, .finished(finished[i]),
      .checks(r_checks[i]), .failures(r_failures[i]), .max_err(r_max[i]),
      .mean_err(r_mean[i]), .xy_err(), .cycles(r_cycles[i])
    );
  end

  always #5 clk = ~clk;

  function automatic int exp_cycles(int m, int my, int h);
    return (2 * h + 2) * (ITER + 2) + (4 ** h) * ((h > 1) ? h - 1 : 1) + 4 + (m >> h) * (my >> h) - 1;
  endfunction

  initial begin
    for (int i = 0; i < NCFG; i++) go[i] = 1'b0;
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NCFG; i++) begin
      for (int a = 0; a < NANG; a++) begin
        @(negedge clk);
        mdeg  = ANG[a];
        go[i] = 1'b1;
        @(negedge clk);
        go[i] = 1'b0;
        wait (finished[i]);
        checks += r_checks[i] + 1;
        failures += r_failures[i];
        if (r_cycles[i] != exp_cycles(CM[i], CMY[i], CH[i])) begin
          failures++;
          $display("FAIL: %0d x %0d H=%0d took %0d cycles, expected %0d", CM[i], CMY[i], CH[i],
                   r_cycles[i], exp_cycles(CM[i], CMY[i], CH[i]));
        end
        $display("%0d x %0d H=%0d, %0d mdeg: %0d windows of %0d x %0d, %0d cycles, mean error %0.4f px, max error %0.4f px",
                 CM[i], CMY[i], CH[i], ANG[a], 4 ** CH[i], CM[i] >> CH[i], CMY[i] >> CH[i], r_cycles[i],
                 r_mean[i], r_max[i]);
      end
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
