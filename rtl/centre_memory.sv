// centre_memory: storage for the rotated window-grid centres.
//
// NC entries, each a pair of signed LW-bit integer coordinates (x, y) of a
// rotated window centre relative to the image centre (64 entries of 10-bit
// coordinates in the evaluated engine). Built from flip-flops, as every
// local adder reads its own centre in every cycle: one synchronous write
// port, all entries readable in parallel. Cleared by reset.
//
// Timing: a write on wr_en is visible on cx/cy from the next cycle.
module centre_memory
  import rot_pkg::*;
#(
  parameter int NC = 4 ** HIER,
  parameter int LW = LOCAL_W,
  parameter int AW = $clog2(NC)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 wr_en,
  input  logic [AW-1:0]        wr_addr,
  input  logic signed [LW-1:0] wr_x,
  input  logic signed [LW-1:0] wr_y,
  output logic signed [LW-1:0] cx [NC],
  output logic signed [LW-1:0] cy [NC]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NC; i++) begin
        cx[i] <= '0;
        cy[i] <= '0;
      end
    end else if (wr_en) begin
      cx[wr_addr] <= wr_x;
      cy[wr_addr] <= wr_y;
    end
  end

endmodule
