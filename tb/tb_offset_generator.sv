// tb_offset_generator: the incremental offsets must equal the direct formula
//   offset(u, v) = floor((x0 + u*cos - v*sin) / 2^F, (y0 + u*sin + v*cos) / 2^F)
// evaluated here in integer arithmetic for every pixel of the window, in
// raster order. Random cos/sin/x0/y0; the first run never stalls and must
// take exactly WIN^2 cycles, later runs apply random back-pressure and the
// stream must hold its beat while stalled.
`timescale 1ns/1ps
module tb_offset_generator;
  import rot_pkg::*;

  localparam int WIN = IMG_M >> HIER;
  localparam int UW  = $clog2(WIN);
  localparam int F   = coord_frac(DATA_W, IMG_M);
  localparam int NRUN = 6;

  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0, out_ready = 1'b1;
  logic signed [DATA_W-1:0] cos_in = '0, sin_in = '0, x0 = '0, y0 = '0;
  logic busy, done, out_valid, out_last;
  logic signed [LOCAL_W-1:0] out_x, out_y;
  logic [UW-1:0] out_u, out_v;
  int checks = 0, failures = 0, stalls = 0;

  offset_generator dut (.clk, .rst_n, .start, .cos_in, .sin_in, .x0, .y0, .busy, .done,
                        .out_valid, .out_ready, .out_x, .out_y, .out_u, .out_v, .out_last);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic longint rnd(longint v);
    return v >>> F;
  endfunction

  initial begin
    real phi;
    int u, v, cyc;
    longint ex, ey;
    logic signed [LOCAL_W-1:0] hx, hy;
    bit held;
    #1 rst_n = 1'b0;  // asynchronous reset edge
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < NRUN; run++) begin
      phi = real'($urandom_range(0, 62831)) / 10000.0;
      @(negedge clk);
      cos_in = DATA_W'(longint'($floor($cos(phi) * 2.0 ** F + 0.5)));
      sin_in = DATA_W'(longint'($floor($sin(phi) * 2.0 ** F + 0.5)));
      x0 = DATA_W'($signed($urandom_range(0, 2 ** (F + 7))) - 2 ** (F + 6));
      y0 = DATA_W'($signed($urandom_range(0, 2 ** (F + 7))) - 2 ** (F + 6));
      start = 1'b1;
      u = 0; v = 0; cyc = 0; held = 1'b0;
      forever begin
        @(negedge clk);
        start = 1'b0;
        if (held) check(out_valid && out_x == hx && out_y == hy, "beat held while stalled");
        out_ready = (run == 0) ? 1'b1 : ($urandom_range(0, 2) != 0);
        cyc++;
        held = out_valid && !out_ready;
        hx = out_x;
        hy = out_y;
        if (held) stalls++;
        if (out_valid && out_ready) begin
          ex = rnd(longint'(x0) + u * longint'(cos_in) - v * longint'(sin_in));
          ey = rnd(longint'(y0) + u * longint'(sin_in) + v * longint'(cos_in));
          check(int'(out_u) == u && int'(out_v) == v, "pixel order");
          check(longint'(out_x) == ex && longint'(out_y) == ey,
                $sformatf("pixel (%0d,%0d): got (%0d,%0d) expected (%0d,%0d)", u, v, out_x, out_y, ex, ey));
          check(out_last == (u == WIN - 1 && v == WIN - 1), "last flag");
          if (u == WIN - 1 && v == WIN - 1) break;
          if (u == WIN - 1) begin u = 0; v++; end
          else u++;
        end
      end
      if (run == 0) check(cyc == WIN * WIN, $sformatf("%0d cycles for %0d offsets", cyc, WIN * WIN));
      @(negedge clk);
      check(done && !out_valid, "done after the last offset");
      @(negedge clk);
      check(!done && !busy, "idle");
    end
    check(stalls > 0, "no stall happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NRUN * 3 * WIN * WIN + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
