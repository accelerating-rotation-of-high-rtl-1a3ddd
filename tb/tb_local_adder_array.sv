// tb_local_adder_array: random centres and a random offset stream with
// random gaps and back-pressure. Every output beat must carry, for all NC
// centres, centre + offset (wrapping at LOCAL_W bits), with the offset and
// pixel index of the matching input beat, in order, one cycle after it was
// taken when the output is free.
`timescale 1ns/1ps
module tb_local_adder_array;
  import rot_pkg::*;

  localparam int NC = 4 ** HIER;
  localparam int UW = $clog2(IMG_M >> HIER);
  localparam int NBEAT = 2000;

  logic clk = 1'b0, rst_n = 1'b1;
  logic signed [LOCAL_W-1:0] cx [NC];
  logic signed [LOCAL_W-1:0] cy [NC];
  logic in_valid = 1'b0, in_ready, in_last = 1'b0, out_valid, out_ready = 1'b0, out_last;
  logic signed [LOCAL_W-1:0] ox = '0, oy = '0;
  logic [UW-1:0] in_u = '0, in_v = '0, out_u, out_v;
  logic signed [LOCAL_W-1:0] px [NC];
  logic signed [LOCAL_W-1:0] py [NC];
  int checks = 0, failures = 0, stalls = 0;

  // queue of offsets/indices sent
  logic [2*LOCAL_W+2*UW:0] sent [$];

  local_adder_array dut (.clk, .rst_n, .cx, .cy, .in_valid, .in_ready, .ox, .oy, .in_u, .in_v,
                         .in_last, .out_valid, .out_ready, .px, .py, .out_u, .out_v, .out_last);

  always #5 clk = ~clk;

  initial begin
    int nin, nout;
    bit pending;
    logic [2*LOCAL_W+2*UW:0] e;
    logic signed [LOCAL_W-1:0] eox, eoy, sx, sy;
    for (int i = 0; i < NC; i++) begin
      cx[i] = LOCAL_W'($urandom);
      cy[i] = LOCAL_W'($urandom);
    end
    #1 rst_n = 1'b0;  // asynchronous reset edge
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    nin = 0; nout = 0;
    pending = 1'b0;
    while (nout < NBEAT) begin
      @(negedge clk);
      // stimulus for the coming edge; an input beat not yet taken is held
      if (!pending) begin
        in_valid = ($urandom_range(0, 4) != 0);
        ox = LOCAL_W'($urandom);
        oy = LOCAL_W'($urandom);
        in_u = UW'($urandom);
        in_v = UW'($urandom);
        in_last = 1'($urandom);
      end
      out_ready = ($urandom_range(0, 3) != 0);
      #1;
      // output beat taken at the coming edge
      if (out_valid && out_ready) begin
        e = sent.pop_front();
        eox = e[2*LOCAL_W+2*UW:LOCAL_W+2*UW+1];
        eoy = e[LOCAL_W+2*UW:2*UW+1];
        checks++;
        if (out_u != e[2*UW:UW+1] || out_v != e[UW:1] || out_last != e[0]) begin
          failures++;
          if (failures < 20) $display("FAIL: beat %0d index", nout);
        end
        for (int i = 0; i < NC; i++) begin
          sx = cx[i] + eox;
          sy = cy[i] + eoy;
          checks++;
          if (px[i] != sx || py[i] != sy) begin
            failures++;
            if (failures < 20) $display("FAIL: beat %0d centre %0d: (%0d,%0d) expected (%0d,%0d)", nout, i, px[i], py[i], sx, sy);
          end
        end
        nout++;
      end
      if (out_valid && !out_ready) stalls++;
      // input beat taken at the coming edge
      if (in_valid && in_ready) begin
        sent.push_back({ox, oy, in_u, in_v, in_last});
        nin++;
      end
      pending = in_valid && !in_ready;
    end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL: no stall"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NBEAT * 10 + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
