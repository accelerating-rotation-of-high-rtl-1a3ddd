// cordic_atan_rom: table of the CORDIC micro-rotation angles.
//
// Entry i holds arctan(2^-i) in radians, in the angle format of rot_pkg
// (DATA_W bits, DATA_W-3 fraction bits), rounded to nearest. One entry per
// CORDIC iteration (ITER entries; 12 in the evaluated engine). The table is
// a small constant ROM: combinational read, the entry for `idx` appears on
// `angle` in the same cycle. Values are formed at elaboration from the
// 2^-32 scaled constants in rot_pkg.
module cordic_atan_rom
  import rot_pkg::*;
#(
  parameter int W    = DATA_W,
  parameter int NITER = ITER
) (
  input  logic [$clog2(NITER)-1:0] idx,
  output logic signed [W-1:0]      angle
);

  localparam int AF = angle_frac(W);

  logic signed [W-1:0] table_q [NITER];

  for (genvar i = 0; i < NITER; i++) begin : g_entry
    localparam longint VAL = (atan_q32(i) + (longint'(1) <<< (31 - AF))) >>> (32 - AF);
    assign table_q[i] = W'(VAL);
  end

  always_comb begin
    angle = '0;
    if (int'(idx) < NITER) angle = table_q[idx];
  end

endmodule
