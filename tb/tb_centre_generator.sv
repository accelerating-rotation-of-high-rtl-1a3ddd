// tb_centre_generator: random quadrant centres for each of the H layers are
// applied; every written centre g must be the rounded sum of the quadrant
// centres selected by g's digits, one per layer, computed here from the
// window-grid position of g. Writes must come in order 0..NC-1, one per
// H-1 cycles, and `done` must follow the last write; the number of busy
// cycles (one addition each) must be 4^H*(H-1).
`timescale 1ns/1ps
module tb_centre_generator;
  import rot_pkg::*;

  localparam int H  = HIER;
  localparam int NC = 4 ** H;
  localparam int F  = coord_frac(DATA_W, IMG_M);
  localparam int NSTEP = (H > 1) ? H - 1 : 1;

  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  logic signed [DATA_W-1:0] quad_x [H][4];
  logic signed [DATA_W-1:0] quad_y [H][4];
  logic busy, done, wr_en;
  logic [2*H-1:0] wr_addr;
  logic signed [LOCAL_W-1:0] wr_x, wr_y;
  int checks = 0, failures = 0;

  centre_generator dut (.clk, .rst_n, .start, .quad_x, .quad_y, .busy, .done,
                        .wr_en, .wr_addr, .wr_x, .wr_y);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Reference: window column gx, row gy; layer l splits on bit H-1-l.
  function automatic longint ref_sum(int g, bit is_y);
    int gx, gy, q;
    longint s;
    gx = g % (1 << H);
    gy = g / (1 << H);
    s = 0;
    for (int l = 0; l < H; l++) begin
      q = ((gy >> (H - 1 - l)) & 1) * 2 + ((gx >> (H - 1 - l)) & 1);
      s += is_y ? longint'(quad_y[l][q]) : longint'(quad_x[l][q]);
    end
    return (s + (longint'(1) <<< (F - 1))) >>> F;
  endfunction

  initial begin
    int nexp, busy_cycles, last_wr_cycle, cyc;
    for (int l = 0; l < H; l++)
      for (int q = 0; q < 4; q++) begin
        quad_x[l][q] = '0;
        quad_y[l][q] = '0;
      end
    #1 rst_n = 1'b0;  // asynchronous reset edge
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 20; run++) begin
      @(negedge clk);
      for (int l = 0; l < H; l++)
        for (int q = 0; q < 4; q++) begin
          quad_x[l][q] = DATA_W'($signed($urandom_range(0, 2 ** (F + 8))) - 2 ** (F + 7));
          quad_y[l][q] = DATA_W'($signed($urandom_range(0, 2 ** (F + 8))) - 2 ** (F + 7));
        end
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      nexp = 0;
      busy_cycles = 0;
      cyc = 0;
      last_wr_cycle = 0;
      while (!done && cyc < 10 * NC * NSTEP) begin
        if (busy) busy_cycles++;
        if (wr_en) begin
          check(int'(wr_addr) == nexp, $sformatf("write order: %0d, expected %0d", wr_addr, nexp));
          check(longint'(wr_x) == ref_sum(int'(wr_addr), 1'b0) && longint'(wr_y) == ref_sum(int'(wr_addr), 1'b1),
                $sformatf("centre %0d: got (%0d,%0d) expected (%0d,%0d)", wr_addr, wr_x, wr_y,
                          ref_sum(int'(wr_addr), 1'b0), ref_sum(int'(wr_addr), 1'b1)));
          nexp++;
          last_wr_cycle = cyc;
        end
        @(negedge clk);
        cyc++;
      end
      check(nexp == NC, $sformatf("%0d centres written", nexp));
      check(busy_cycles == NC * NSTEP, $sformatf("%0d additions, expected %0d", busy_cycles, NC * NSTEP));
      check(last_wr_cycle + 1 == cyc, "done in the cycle after the last write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * (NC * NSTEP + 10) + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
