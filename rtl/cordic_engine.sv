// cordic_engine: iterative rotation-mode CORDIC.
//
// Rotates the vector (x_in, y_in) by the angle z_in (radians) with ITER
// micro-rotations of angle arctan(2^-i), i = 0..ITER-1:
//   d = sign(z);  x <- x - d*(y >>> i);  y <- y + d*(x >>> i);
//   z <- z - d*arctan(2^-i)
// The result is the rotated vector multiplied by the CORDIC gain
// K = prod sqrt(1 + 2^-2i) (about 1.6468 for 12 iterations). The engine does
// not correct the gain: callers fold 1/K into their operands, which in this
// design are all constants. The |z_in| range that converges is the sum of
// the table angles, about 1.74 rad (99.9 deg).
//
// One iteration per clock: an X, a Y and a Z adder/subtractor and two
// barrel shifters (the variable shift `>>> iter`), with the angle table in
// cordic_atan_rom. The iterative structure, 12 iterations and 25-bit width
// are those of the evaluated engine; the handshake is this design's own.
//
// Interface/timing: `start` (while not busy) loads the operands; `busy` is
// high for ITER cycles, one per iteration; `done` pulses for one cycle when
// the result is on x_out/y_out, ITER cycles after `start`. The outputs hold
// until the next start. Coordinates use any fixed-point format (the engine
// is format-agnostic); the angle uses rot_pkg's angle format.
module cordic_engine
  import rot_pkg::*;
#(
  parameter int W     = DATA_W,
  parameter int NITER = ITER
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic signed [W-1:0] x_in,
  input  logic signed [W-1:0] y_in,
  input  logic signed [W-1:0] z_in,
  output logic                busy,
  output logic                done,
  output logic signed [W-1:0] x_out,
  output logic signed [W-1:0] y_out
);

  localparam int IW = $clog2(NITER);

  logic signed [W-1:0] x_q, y_q, z_q;
  logic [IW-1:0]       iter_q;
  logic signed [W-1:0] atan_i;
  logic signed [W-1:0] x_sh, y_sh;
  logic                dneg;

  cordic_atan_rom #(.W(W), .NITER(NITER)) u_rom (.idx(iter_q), .angle(atan_i));

  // Barrel shifters and direction of this micro-rotation.
  assign x_sh = x_q >>> iter_q;
  assign y_sh = y_q >>> iter_q;
  assign dneg = z_q[W-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q    <= '0;
      y_q    <= '0;
      z_q    <= '0;
      iter_q <= '0;
      busy   <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          x_q    <= x_in;
          y_q    <= y_in;
          z_q    <= z_in;
          iter_q <= '0;
          busy   <= 1'b1;
        end
      end else begin
        if (dneg) begin
          x_q <= x_q + y_sh;
          y_q <= y_q - x_sh;
          z_q <= z_q + atan_i;
        end else begin
          x_q <= x_q - y_sh;
          y_q <= y_q + x_sh;
          z_q <= z_q - atan_i;
        end
        if (int'(iter_q) == NITER - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          iter_q <= iter_q + 1'b1;
        end
      end
    end
  end

  assign x_out = x_q;
  assign y_out = y_q;

endmodule
