// local_adder_array: adds one offset to every rotated window centre at once.
//
// NC pairs of signed LW-bit adders (64 pairs of 10-bit adders in the
// evaluated engine). Each cycle the current pixel offset (ox, oy) is added
// to all NC rotated centres, giving the rotated position of the same pixel
// (u, v) in every window of the grid: NC rotated pixel coordinates per
// cycle, relative to the image centre, in integer pixels. The sums wrap at
// LW bits, which cannot happen for positions inside the rotated image.
//
// Interface/timing: a one-stage valid/ready pipeline. An input beat
// (in_valid && in_ready) appears registered on out_* in the next cycle;
// in_ready = !out_valid || out_ready, so the stage stalls with its output
// while out_ready is low. The adder array follows the evaluated engine; the
// output register and handshake are this design's own.
module local_adder_array
  import rot_pkg::*;
#(
  parameter int NC = 4 ** HIER,
  parameter int LW = LOCAL_W,
  parameter int UW = $clog2(IMG_M >> HIER)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [LW-1:0] cx [NC],
  input  logic signed [LW-1:0] cy [NC],
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [LW-1:0] ox,
  input  logic signed [LW-1:0] oy,
  input  logic [UW-1:0]        in_u,
  input  logic [UW-1:0]        in_v,
  input  logic                 in_last,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic signed [LW-1:0] px [NC],
  output logic signed [LW-1:0] py [NC],
  output logic [UW-1:0]        out_u,
  output logic [UW-1:0]        out_v,
  output logic                 out_last
);

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_u     <= '0;
      out_v     <= '0;
      out_last  <= 1'b0;
      for (int i = 0; i < NC; i++) begin
        px[i] <= '0;
        py[i] <= '0;
      end
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_u    <= in_u;
        out_v    <= in_v;
        out_last <= in_last;
        for (int i = 0; i < NC; i++) begin
          px[i] <= cx[i] + ox;
          py[i] <= cy[i] + oy;
        end
      end
    end
  end

  property p_hold;
    @(posedge clk) disable iff (!rst_n)
      out_valid && !out_ready |=> out_valid && $stable(out_u) && $stable(out_v);
  endproperty
  a_hold: assert property (p_hold);

endmodule
