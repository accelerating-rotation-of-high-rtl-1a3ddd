// tb_rotation_engine: end-to-end test of the rotation engine at its default
// size (512 x 512 image, 3 layers, 64 windows of 64 x 64 pixels).
//
// For several angles it runs one complete rotation and checks every one of
// the 64 x 4096 output coordinates against the exact rotation of the pixel
// position r, computed here with real arithmetic. An output P stands for
// the pixel cell [P, P+1), so P + 0.5 is compared with r; the allowed error
// is 1.2 pixels: rounding of the centre and truncation of the offset (0.5
// each about the cell middle) plus the CORDIC angle residue (at most
// arctan(2^-11) rad, under 0.18 pixels at the image corners). At 0 degrees
// every output must be exactly the pixel's own position, P = column - M/2. It also checks the cycle count of each
// phase and counts that every mechanism happens: the H+2 CORDIC rotations,
// the 4^H*(H-1) centre additions, all four quadrant inferences of every
// layer, the WIN^2-1 offset additions including the row steps, and output
// stalls (the first angle runs without stalls for the latency check, the
// others with random back-pressure).
`timescale 1ns/1ps
module tb_rotation_engine;
  import rot_pkg::*;

  localparam int NC    = 4 ** HIER;
  localparam int WIN   = IMG_M >> HIER;
  localparam int UW    = $clog2(WIN);
  localparam int AF    = angle_frac(DATA_W);
  localparam int NSTEP = (HIER > 1) ? HIER - 1 : 1;
  // Cycles from the edge that takes `start` to the one where out_valid rises;
  // beats are taken on the following edges.
  localparam int FIRST_LAT = (HIER + 2) * (ITER + 2) + NC * NSTEP + 4;
  localparam real PI  = 3.14159265358979323846;
  localparam real TOL = 1.2;
  localparam int NANG = 6;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic start = 1'b0;
  logic signed [DATA_W-1:0] angle = '0;
  logic busy, done, out_valid, out_last;
  logic out_ready = 1'b1;
  logic signed [LOCAL_W-1:0] out_x [NC];
  logic signed [LOCAL_W-1:0] out_y [NC];
  logic [UW-1:0] out_u, out_v;

  int checks = 0, failures = 0;
  int cycle = 0;

  rotation_engine dut (
    .clk, .rst_n, .start, .angle, .busy, .done, .out_valid, .out_ready,
    .out_x, .out_y, .out_u, .out_v, .out_last
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // Mechanism counters, read from inside the engine.
  int n_cordic = 0, n_cadd = 0, n_cwrite = 0, n_oadd = 0, n_rowstep = 0, n_stall = 0;
  int n_beats = 0;
  bit quad_seen [HIER][4];
  always @(posedge clk) if (rst_n) begin
    if (dut.u_cordic.done) n_cordic++;
    if (dut.u_cgen.busy) n_cadd++;
    if (dut.u_cgen.wr_en) begin
      n_cwrite++;
      for (int l = 0; l < HIER; l++)
        quad_seen[l][{dut.u_cgen.wr_addr[2*HIER-1-l], dut.u_cgen.wr_addr[HIER-1-l]}] = 1'b1;
    end
    if (dut.u_ogen.out_valid && dut.u_ogen.out_ready && !dut.u_ogen.out_last) begin
      n_oadd++;
      if (dut.u_ogen.row_end) n_rowstep++;
    end
    if (out_valid && !out_ready) n_stall++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic run_angle(real deg, bit stalls);
    real phi, c, s, px, py, rx, ry, ex, ey, maxe;
    int t0, t_first, t_done, a;
    int c0, ca0, cw0, oa0, rs0;
    bit got_first;
    int exp_u, exp_v;
    a   = int'($floor(deg * PI / 180.0 * (2.0 ** AF) + 0.5));
    phi = real'(a) / (2.0 ** AF);
    c   = $cos(phi);
    s   = $sin(phi);
    c0 = n_cordic; ca0 = n_cadd; cw0 = n_cwrite; oa0 = n_oadd; rs0 = n_rowstep;
    maxe = 0.0;
    exp_u = 0; exp_v = 0;
    got_first = 1'b0;
    t_first = 0;
    @(negedge clk);
    angle = DATA_W'(a);
    start = 1'b1;
    @(posedge clk);
    t0 = cycle;
    forever begin
      @(negedge clk);
      start = 1'b0;
      out_ready = stalls ? ($urandom_range(0, 3) != 0) : 1'b1;
      @(posedge clk);
      if (out_valid && out_ready) begin
        if (!got_first) begin
          got_first = 1'b1;
          t_first = cycle - t0;
        end
        check(int'(out_u) == exp_u && int'(out_v) == exp_v,
              $sformatf("pixel order: got (%0d,%0d) expected (%0d,%0d)", out_u, out_v, exp_u, exp_v));
        check(out_last == (exp_u == WIN - 1 && exp_v == WIN - 1), "last flag");
        for (int g = 0; g < NC; g++) begin
          px = real'((g % (1 << HIER)) * WIN + exp_u) - (IMG_M - 1) / 2.0;
          py = real'((g / (1 << HIER)) * WIN + exp_v) - (IMG_M - 1) / 2.0;
          rx = px * c - py * s;
          ry = px * s + py * c;
          ex = real'(out_x[g]) + 0.5 - rx;
          ey = real'(out_y[g]) + 0.5 - ry;
          if (ex < 0) ex = -ex;
          if (ey < 0) ey = -ey;
          if (ex > maxe) maxe = ex;
          if (ey > maxe) maxe = ey;
          if (deg == 0.0)
            check(int'(out_x[g]) == (g % (1 << HIER)) * WIN + exp_u - IMG_M / 2 &&
                  int'(out_y[g]) == (g / (1 << HIER)) * WIN + exp_v - IMG_M / 2,
                  $sformatf("0 deg window %0d pixel (%0d,%0d) not its own position", g, exp_u, exp_v));
          check(ex <= TOL && ey <= TOL,
                $sformatf("deg %0.1f window %0d pixel (%0d,%0d): got (%0d,%0d) exact (%0.3f,%0.3f)",
                          deg, g, exp_u, exp_v, out_x[g], out_y[g], rx, ry));
        end
        n_beats++;
        if (done !== 1'b1 && exp_u == WIN - 1 && exp_v == WIN - 1) check(0, "done with last beat");
        if (exp_u == WIN - 1 && exp_v == WIN - 1) begin
          t_done = cycle - t0;
          break;
        end
        if (exp_u == WIN - 1) begin exp_u = 0; exp_v++; end
        else exp_u++;
      end
    end
    @(negedge clk);
    out_ready = 1'b1;
    @(posedge clk);
    check(!busy, "idle after the last beat");
    check(n_cordic - c0 == HIER + 2, $sformatf("CORDIC rotations %0d", n_cordic - c0));
    check(n_cadd - ca0 == NC * NSTEP, $sformatf("centre additions %0d", n_cadd - ca0));
    check(n_cwrite - cw0 == NC, $sformatf("centres written %0d", n_cwrite - cw0));
    check(n_oadd - oa0 == WIN * WIN - 1, $sformatf("offset additions %0d", n_oadd - oa0));
    check(n_rowstep - rs0 == WIN - 1, $sformatf("row steps %0d", n_rowstep - rs0));
    if (!stalls) begin
      check(t_first == FIRST_LAT + 1, $sformatf("first beat after %0d cycles, expected %0d", t_first, FIRST_LAT + 1));
      check(t_done == FIRST_LAT + WIN * WIN,
            $sformatf("last beat after %0d cycles, expected %0d", t_done, FIRST_LAT + WIN * WIN));
    end
    $display("angle %0.1f deg: max error %0.3f px, first beat %0d, last beat %0d cycles after start",
             deg, maxe, t_first, t_done);
  endtask

  initial begin
    real degs [NANG] = '{17.0, 0.0, 45.0, -30.0, 1.0, 90.0};
    #1 rst_n = 1'b0;  // asynchronous reset edge
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    for (int i = 0; i < NANG; i++) run_angle(degs[i], i != 0);
    check(n_stall > 0, "output stall never happened");
    for (int l = 0; l < HIER; l++)
      for (int q = 0; q < 4; q++)
        check(quad_seen[l][q], $sformatf("quadrant %0d of layer %0d never inferred", q, l));
    $display("mechanisms: CORDIC rotations %0d, centre additions %0d, offset additions %0d, row steps %0d, stall cycles %0d, beats %0d",
             n_cordic, n_cadd, n_oadd, n_rowstep, n_stall, n_beats);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NANG * 2 * (FIRST_LAT + WIN * WIN) + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
