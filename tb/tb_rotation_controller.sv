// tb_rotation_controller: the controller is driven by simple stand-ins for
// the CORDIC engine, centre generator and offset generator that answer
// after random delays (the CORDIC stand-in returns random results). Checked:
// the order of events (H CORDIC rotations, centre phase, two CORDIC
// rotations, offset phase, done); the CORDIC operands of each rotation
// against the gain-compensated constants computed here with real
// arithmetic (layer representatives (d_l, d_l) with d_l = M/2^(l+2), the
// unit vector, the window's first pixel); the angle; and that each CORDIC
// result lands in the right output register.
`timescale 1ns/1ps
module tb_rotation_controller;
  import rot_pkg::*;

  localparam int H   = HIER;
  localparam int WIN = IMG_M >> HIER;
  localparam int F   = coord_frac(DATA_W, IMG_M);
  localparam int NRUN = 10;

  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  logic signed [DATA_W-1:0] angle = '0;
  logic busy, done, cor_start, cg_start, og_start;
  logic cor_done = 1'b0, cg_done = 1'b0, og_done = 1'b0;
  logic signed [DATA_W-1:0] cor_x, cor_y, cor_z, cos_out, sin_out, first_x, first_y;
  logic signed [DATA_W-1:0] cor_rx = '0, cor_ry = '0;
  logic signed [DATA_W-1:0] rep_x [H];
  logic signed [DATA_W-1:0] rep_y [H];
  int checks = 0, failures = 0;
  logic signed [DATA_W-1:0] angle_sent = '0;

  rotation_controller dut (
    .clk, .rst_n, .start, .angle, .busy, .done,
    .cor_start, .cor_x, .cor_y, .cor_z, .cor_done, .cor_rx, .cor_ry,
    .rep_x, .rep_y, .cg_start, .cg_done,
    .og_start, .cos_out, .sin_out, .first_x, .first_y, .og_done
  );

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Event log: 1 = CORDIC start, 2 = centre start, 3 = offset start, 4 = done.
  int events [$];
  logic signed [DATA_W-1:0] res_x [$];
  logic signed [DATA_W-1:0] res_y [$];
  logic signed [DATA_W-1:0] opx [$];
  logic signed [DATA_W-1:0] opy [$];

  // Stand-in units: count down a random delay, then pulse done.
  int cor_cnt = 0, cg_cnt = 0, og_cnt = 0;
  always @(posedge clk) begin
    cor_done <= 1'b0;
    cg_done  <= 1'b0;
    og_done  <= 1'b0;
    if (cor_start) begin
      events.push_back(1);
      opx.push_back(cor_x);
      opy.push_back(cor_y);
      check(cor_z == angle_sent, "CORDIC angle");
      cor_cnt <= $urandom_range(1, 20);
    end else if (cor_cnt == 1) begin
      cor_cnt  <= 0;
      cor_done <= 1'b1;
      cor_rx   <= DATA_W'($urandom);
      cor_ry   <= DATA_W'($urandom);
    end else if (cor_cnt > 1) cor_cnt <= cor_cnt - 1;
    if (cor_done) begin
      res_x.push_back(cor_rx);
      res_y.push_back(cor_ry);
    end
    if (cg_start) begin events.push_back(2); cg_cnt <= $urandom_range(1, 30); end
    else if (cg_cnt == 1) begin cg_cnt <= 0; cg_done <= 1'b1; end
    else if (cg_cnt > 1) cg_cnt <= cg_cnt - 1;
    if (og_start) begin events.push_back(3); og_cnt <= $urandom_range(1, 30); end
    else if (og_cnt == 1) begin og_cnt <= 0; og_done <= 1'b1; end
    else if (og_cnt > 1) og_cnt <= og_cnt - 1;
    if (done) events.push_back(4);
  end

  // Events expected after the centre phase starts: rep_* must already hold
  // the first H results.
  always @(posedge clk) if (cg_start) begin
    for (int l = 0; l < H; l++)
      check(rep_x[l] == res_x[l] && rep_y[l] == res_y[l], $sformatf("layer %0d representative", l));
  end
  always @(posedge clk) if (og_start) begin
    check(cos_out == res_x[H] && sin_out == res_y[H], "cos/sin register");
    check(first_x == res_x[H + 1] && first_y == res_y[H + 1], "first pixel register");
  end

  function automatic real op_value(int k);
    real kk;
    kk = 1.0;
    for (int i = 0; i < ITER; i++) kk = kk * $sqrt(1.0 + 2.0 ** (-2 * i));
    if (k < H) return real'(IMG_M) / (2.0 ** (k + 2)) / kk;
    else if (k == H) return 1.0 / kk;
    else return -(real'(WIN) - 1.0) / 2.0 / kk;
  endfunction

  initial begin
    int exp_ev [$];
    real ex, ey;
    #1 rst_n = 1'b0;  // asynchronous reset edge
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < NRUN; run++) begin
      events.delete(); res_x.delete(); res_y.delete(); opx.delete(); opy.delete();
      @(negedge clk);
      angle = DATA_W'($urandom);
      angle_sent = angle;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      angle = '0;     // the controller must have latched it
      while (!done) @(negedge clk);
      @(negedge clk);
      check(!busy, "idle after done");
      exp_ev.delete();
      for (int k = 0; k < H; k++) exp_ev.push_back(1);
      exp_ev.push_back(2);
      exp_ev.push_back(1);
      exp_ev.push_back(1);
      exp_ev.push_back(3);
      exp_ev.push_back(4);
      check(events == exp_ev, $sformatf("event order %p", events));
      for (int k = 0; k < H + 2 && k < opx.size(); k++) begin
        ex = real'(opx[k]) / 2.0 ** F - op_value(k);
        ey = real'(opy[k]) / 2.0 ** F - ((k == H) ? 0.0 : op_value(k));
        check(ex < 2.0 ** (-F) && -ex < 2.0 ** (-F) && ey < 2.0 ** (-F) && -ey < 2.0 ** (-F),
              $sformatf("operand of rotation %0d: (%0d,%0d)", k, opx[k], opy[k]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NRUN * 300 + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
