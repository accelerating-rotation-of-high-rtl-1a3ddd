// rotation_controller: sequences one image rotation.
//
// For an angle phi a square image (M = MY) needs H+2 CORDIC rotations and
// two adder phases, run one after the other:
//   1. for each layer l = 0..H-1, rotate the layer's representative quadrant
//      centre (dx_l, dy_l), dx_l = M / 2^(l+2), dy_l = MY / 2^(l+2), and keep
//      the result (rep_*); for a rectangular image (M != MY) also rotate
//      (dx_l, -dy_l) right after it (rep2_*), 2H+2 rotations in all;
//   2. start the centre generator, which builds all rotated window centres
//      from the symmetry-inferred quadrant centres of the H layers;
//   3. rotate (1, 0) to get (cos phi, sin phi);
//   4. rotate the first pixel of a window, (-(WINX-1)/2, -(WINY-1)/2)
//      relative to the window centre, to get the first offset;
//   5. start the offset generator and wait for it to stream all WINX*WINY
//      offsets through the local adders.
// All CORDIC operands except the angle are constants; each is pre-multiplied
// by 1/K so the CORDIC results carry no gain. The order of the phases and
// their number of CORDIC operations follow the evaluated engine; running
// them strictly one after another (no overlap) and the handshakes are this
// design's own choices.
//
// Interface/timing: `start` (while not busy) latches `angle` (radians, the
// angle format of rot_pkg, |angle| < 1.74). `busy` stays high until the
// last offset is taken, then `done` pulses for one cycle. The *_start
// outputs are one-cycle pulses to the units, whose `done` pulses end each
// phase. Each CORDIC operation takes ITER+2 cycles here, the centre phase
// 4^H*max(H-1,1)+2 and the offset phase WINX*WINY+2 when never stalled.
module rotation_controller
  import rot_pkg::*;
#(
  parameter int W    = DATA_W,
  parameter int M    = IMG_M,
  parameter int MY   = M,
  parameter int H    = HIER,
  parameter int WINX = M >> H,
  parameter int WINY = MY >> H
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic signed [W-1:0] angle,
  output logic                busy,
  output logic                done,
  // CORDIC engine
  output logic                cor_start,
  output logic signed [W-1:0] cor_x,
  output logic signed [W-1:0] cor_y,
  output logic signed [W-1:0] cor_z,
  input  logic                cor_done,
  input  logic signed [W-1:0] cor_rx,
  input  logic signed [W-1:0] cor_ry,
  // rotated representative centre of each layer
  output logic signed [W-1:0] rep_x [H],
  output logic signed [W-1:0] rep_y [H],
  // rotated second representative (dx, -dy), rectangular images only
  output logic signed [W-1:0] rep2_x [H],
  output logic signed [W-1:0] rep2_y [H],
  // centre generator
  output logic                cg_start,
  input  logic                cg_done,
  // offset generator
  output logic                og_start,
  output logic signed [W-1:0] cos_out,
  output logic signed [W-1:0] sin_out,
  output logic signed [W-1:0] first_x,
  output logic signed [W-1:0] first_y,
  input  logic                og_done
);

  localparam int  MMAX   = (M > MY) ? M : MY;
  localparam int  F      = coord_frac(W, MMAX);
  localparam bit  SQUARE = (M == MY);
  localparam int  NLOPS  = SQUARE ? H : 2 * H;   // layer rotations
  localparam int  NOPS   = NLOPS + 2;
  localparam int  KW     = $clog2(NOPS + 1);
  localparam int  OP_SC  = NLOPS;       // sin/cos operation
  localparam int  OP_FP  = NLOPS + 1;   // first pixel operation

  typedef enum logic [2:0] {
    S_IDLE, S_COR_REQ, S_COR_WAIT, S_CG_REQ, S_CG_WAIT, S_OG_REQ, S_OG_WAIT
  } state_t;

  state_t              state_q;
  logic [KW-1:0]       k_q;
  logic signed [W-1:0] angle_q;

  // Layer of layer rotation k, and whether it is the (dx, -dy) one.
  function automatic int layer_of(int k);
    return SQUARE ? k : k / 2;
  endfunction
  function automatic bit is_second(int k);
    return !SQUARE && (k % 2 == 1);
  endfunction

  // CORDIC operands of operation k, in half units, before 1/K scaling.
  function automatic longint op_half_x(int k);
    if (k < NLOPS)       return longint'(M) >>> (layer_of(k) + 1);   // 2*dx
    else if (k == OP_SC) return 64'sd2;                               // 1.0
    else                 return 64'sd1 - longint'(WINX);              // first pixel
  endfunction
  function automatic longint op_half_y(int k);
    if (k < NLOPS)       return is_second(k) ? -(longint'(MY) >>> (layer_of(k) + 1))
                                             : longint'(MY) >>> (layer_of(k) + 1);
    else if (k == OP_SC) return 64'sd0;
    else                 return 64'sd1 - longint'(WINY);
  endfunction

  logic signed [W-1:0] op_x [NOPS];
  logic signed [W-1:0] op_y [NOPS];
  for (genvar k = 0; k < NOPS; k++) begin : g_ops
    localparam longint VX = half_units_times_kinv(op_half_x(k), F);
    localparam longint VY = half_units_times_kinv(op_half_y(k), F);
    assign op_x[k] = W'(VX);
    assign op_y[k] = W'(VY);
  end

  always_comb begin
    cor_x = '0;
    cor_y = '0;
    for (int k = 0; k < NOPS; k++) begin
      if (int'(k_q) == k) begin
        cor_x = op_x[k];
        cor_y = op_y[k];
      end
    end
  end

  assign cor_z     = angle_q;
  assign cor_start = (state_q == S_COR_REQ);
  assign cg_start  = (state_q == S_CG_REQ);
  assign og_start  = (state_q == S_OG_REQ);
  assign busy      = (state_q != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      k_q     <= '0;
      angle_q <= '0;
      done    <= 1'b0;
      cos_out <= '0;
      sin_out <= '0;
      first_x <= '0;
      first_y <= '0;
      for (int l = 0; l < H; l++) begin
        rep_x[l]  <= '0;
        rep_y[l]  <= '0;
        rep2_x[l] <= '0;
        rep2_y[l] <= '0;
      end
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          angle_q <= angle;
          k_q     <= '0;
          state_q <= S_COR_REQ;
        end
        S_COR_REQ: state_q <= S_COR_WAIT;
        S_COR_WAIT: if (cor_done) begin
          for (int k = 0; k < NLOPS; k++) begin
            if (int'(k_q) == k) begin
              if (is_second(k)) begin
                rep2_x[layer_of(k)] <= cor_rx;
                rep2_y[layer_of(k)] <= cor_ry;
              end else begin
                rep_x[layer_of(k)] <= cor_rx;
                rep_y[layer_of(k)] <= cor_ry;
              end
            end
          end
          if (int'(k_q) == OP_SC) begin
            cos_out <= cor_rx;
            sin_out <= cor_ry;
          end else if (int'(k_q) == OP_FP) begin
            first_x <= cor_rx;
            first_y <= cor_ry;
          end
          k_q <= k_q + 1'b1;
          if (int'(k_q) == NLOPS - 1)  state_q <= S_CG_REQ;
          else if (int'(k_q) == OP_FP) state_q <= S_OG_REQ;
          else                         state_q <= S_COR_REQ;
        end
        S_CG_REQ: state_q <= S_CG_WAIT;
        S_CG_WAIT: if (cg_done) state_q <= S_COR_REQ;
        S_OG_REQ: state_q <= S_OG_WAIT;
        S_OG_WAIT: if (og_done) begin
          state_q <= S_IDLE;
          done    <= 1'b1;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
