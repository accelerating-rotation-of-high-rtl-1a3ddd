// tb_centre_memory: after reset all entries read zero; random writes (with
// wr_en low in between) must appear on the parallel read ports from the next
// cycle, and every entry must always match a model array kept here.
`timescale 1ns/1ps
module tb_centre_memory;
  import rot_pkg::*;

  localparam int NC = 4 ** HIER;

  logic clk = 1'b0, rst_n = 1'b1, wr_en = 1'b0;
  logic [$clog2(NC)-1:0] wr_addr = '0;
  logic signed [LOCAL_W-1:0] wr_x = '0, wr_y = '0;
  logic signed [LOCAL_W-1:0] cx [NC];
  logic signed [LOCAL_W-1:0] cy [NC];
  logic signed [LOCAL_W-1:0] mx [NC];
  logic signed [LOCAL_W-1:0] my [NC];
  int checks = 0, failures = 0;

  centre_memory dut (.clk, .rst_n, .wr_en, .wr_addr, .wr_x, .wr_y, .cx, .cy);

  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < NC; i++) begin mx[i] = '0; my[i] = '0; end
    #1 rst_n = 1'b0;  // asynchronous reset edge
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      for (int i = 0; i < NC; i++) begin
        checks++;
        if (cx[i] != mx[i] || cy[i] != my[i]) begin
          failures++;
          if (failures < 20) $display("FAIL: step %0d entry %0d: (%0d,%0d) expected (%0d,%0d)", t, i, cx[i], cy[i], mx[i], my[i]);
        end
      end
      wr_en   = ($urandom_range(0, 3) != 0);
      wr_addr = ($clog2(NC))'($urandom_range(0, NC - 1));
      wr_x    = LOCAL_W'($urandom);
      wr_y    = LOCAL_W'($urandom);
      if (wr_en) begin
        mx[wr_addr] = wr_x;
        my[wr_addr] = wr_y;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
