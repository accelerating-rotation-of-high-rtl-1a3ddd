// tb_cordic_atan_rom: checks every entry of the CORDIC angle table against
// arctan(2^-i) computed with real arithmetic, rounded to the angle format.
`timescale 1ns/1ps
module tb_cordic_atan_rom;
  import rot_pkg::*;

  localparam int AF = angle_frac(DATA_W);

  logic [$clog2(ITER)-1:0] idx;
  logic signed [DATA_W-1:0] angle;
  int checks = 0, failures = 0;

  cordic_atan_rom dut (.idx, .angle);

  initial begin
    longint expv;
    for (int i = 0; i < ITER; i++) begin
      idx = ($clog2(ITER))'(i);
      #1;
      expv = longint'($floor($atan(2.0 ** (-i)) * (2.0 ** AF) + 0.5));
      checks++;
      if (longint'(angle) != expv) begin
        failures++;
        $display("FAIL: entry %0d = %0d, expected %0d", i, angle, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
