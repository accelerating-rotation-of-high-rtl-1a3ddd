// tb_register_length: accuracy against datapath width for the 512 x 512
// engine (hierarchy 3). Engines with W = 12, 16, 20, 25 and 32 bits
// rotate the image by 0, 5, ..., 45 degrees; for each width the worst mean
// error per pixel, the worst maximum error and the worst average of the
// largest x and the largest y error over the angles are printed.
// Checked: W = 25 and 32 stay within the one-pixel bound of rotation_run,
// errors do not grow with the width, and W = 12 is clearly worse than W = 25
// (too few fraction bits for the 63 + 63 accumulated offset additions).
`timescale 1ns/1ps
module tb_register_length;
  import rot_pkg::*;

  localparam int NW = 5;
  localparam int CW [NW] = '{12, 16, 20, 25, 32};
  localparam int NA = 10;

  logic clk = 1'b0, rst_n = 1'b1;
  logic go [NW];
  logic finished [NW];
  int r_checks [NW];
  int r_failures [NW];
  int r_cycles [NW];
  real r_max [NW];
  real r_mean [NW];
  real r_xy [NW];
  real w_xy [NW];
  real w_max [NW];
  real w_mean [NW];
  int checks = 0, failures = 0;
  int mdeg = 0;

  for (genvar i = 0; i < NW; i++) begin : g_w
    rotation_run #(.W(CW[i]), .STRICT(CW[i] >= 25)) u_run (
      .clk, .rst_n, .go(go[i]), .mdeg(mdeg), .finished(finished[i]),
      .checks(r_checks[i]), .failures(r_failures[i]), .max_err(r_max[i]),
      .mean_err(r_mean[i]), .xy_err(r_xy[i]), .cycles(r_cycles[i])
    );
  end


  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int i = 0; i < NW; i++) begin go[i] = 1'b0; w_max[i] = 0.0; w_mean[i] = 0.0; w_xy[i] = 0.0; end
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < NA; a++) begin
      @(negedge clk);
      mdeg = a * 5000;
      for (int i = 0; i < NW; i++) go[i] = 1'b1;
      @(negedge clk);
      for (int i = 0; i < NW; i++) go[i] = 1'b0;
      for (int i = 0; i < NW; i++) begin
        wait (finished[i]);
        if (r_max[i] > w_max[i]) w_max[i] = r_max[i];
        if (r_mean[i] > w_mean[i]) w_mean[i] = r_mean[i];
        if (r_xy[i] > w_xy[i]) w_xy[i] = r_xy[i];
      end
    end
    for (int i = 0; i < NW; i++) begin
      $display("W = %0d bits: worst mean error %0.4f px, worst max error %0.4f px, worst (max x + max y)/2 %0.4f px",
               CW[i], w_mean[i], w_max[i], w_xy[i]);
      checks += r_checks[i];
      if (CW[i] >= 25) failures += r_failures[i];
    end
    for (int i = 1; i < NW; i++)
      check(w_mean[i] <= w_mean[i - 1] + 0.01,
            $sformatf("mean error grows from W = %0d to W = %0d", CW[i - 1], CW[i]));
    check(w_mean[0] > w_mean[3] + 0.1, "W = 12 not worse than W = 25");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NA * 4400 + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
