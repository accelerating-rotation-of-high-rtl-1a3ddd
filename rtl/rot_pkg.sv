// rot_pkg: constants shared by the hierarchical image rotation engine.
//
// The engine rotates the pixel coordinates of an M x M image about its
// centre. Coordinates are two's-complement fixed point numbers of DATA_W
// bits: one sign bit, clog2(M) integer bits and the rest fraction, so that
// every rotated coordinate of the image (at most 0.71*M from the centre)
// fits. Angles use the same width with two integer bits (radians, range
// about +/-2), enough for the CORDIC convergence range of about +/-99.9 deg.
// The default sizes (512 x 512 image, three hierarchy layers, 12 CORDIC
// iterations, 25-bit CORDIC/offset datapath, 10-bit local adders) are the
// configuration the engine was evaluated in; the fixed-point split of the
// 25 bits is this design's own choice.
package rot_pkg;

  localparam int IMG_M      = 512;  // image side length in pixels
  localparam int HIER       = 3;    // number of hierarchical quadrant layers
  localparam int ITER       = 12;   // CORDIC micro-rotations
  localparam int DATA_W     = 25;   // CORDIC and offset adder width
  localparam int LOCAL_W    = 10;   // local adder / centre memory width

  // Fraction bits of a coordinate for a given width and image size.
  function automatic int coord_frac(int w, int m);
    return w - 1 - $clog2(m);
  endfunction

  // Fraction bits of an angle (radians) for a given width.
  function automatic int angle_frac(int w);
    return w - 3;
  endfunction

  // arctan(2^-i) in radians scaled by 2^32, rounded (i = 0..15).
  function automatic longint atan_q32(int i);
    case (i)
      0:  return 64'd3373259426;
      1:  return 64'd1991351318;
      2:  return 64'd1052175346;
      3:  return 64'd534100635;
      4:  return 64'd268086748;
      5:  return 64'd134174063;
      6:  return 64'd67103403;
      7:  return 64'd33553749;
      8:  return 64'd16777131;
      9:  return 64'd8388597;
      10: return 64'd4194303;
      11: return 64'd2097152;
      12: return 64'd1048576;
      13: return 64'd524288;
      14: return 64'd262144;
      default: return 64'd131072;
    endcase
  endfunction

  // 1/K for a 12-iteration CORDIC, K = prod_{i=0}^{11} sqrt(1 + 2^-2i),
  // scaled by 2^32. For more than 12 iterations 1/K changes by < 1e-7.
  localparam longint KINV_Q32 = 64'd2608131600;

  // Value v/2 (v given in half units) times 1/K in a fixed-point format with
  // `frac` fraction bits, rounded. Used to fold the CORDIC gain into the
  // constant operands handed to the CORDIC engine.
  function automatic longint half_units_times_kinv(longint v_half, int frac);
    longint prod;
    prod = v_half * KINV_Q32;              // value * 2^33
    return (prod + (longint'(1) <<< (32 - frac))) >>> (33 - frac);
  endfunction

endpackage
