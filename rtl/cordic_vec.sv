// cordic_vec: pipelined CORDIC in vectoring mode; returns the angle of the
// vector (x, y). Plays the role of the "CORDIC ATAN" block of the phase
// recovery; the magnitude, which the source leaves unconnected, is not
// produced.
//
// The vector is first moved into the right half plane (a half-turn
// pre-rotation), then CORDIC_ITER micro-rotations drive y to zero while the
// applied rotations are summed. Angles are 16-bit two's complement turns:
// 65536 = 2*pi, so the value wraps naturally. Accuracy is a few LSBs.
//
// Timing: one stage per clock; in_valid/x/y in, out_valid/angle out
// CORDIC_ITER + 1 clocks later. A new input may be given every clock.
module cordic_vec
  import rx_pkg::*;
#(
  parameter int IW = 24
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] x,
  input  logic signed [IW-1:0] y,
  output logic                 out_valid,
  output logic        [15:0]   angle
);
  localparam int N  = CORDIC_ITER;
  localparam int XW = IW + 2;     // room for the CORDIC gain (1.65) and negation

  logic signed [XW-1:0] xs [N+1];
  logic signed [XW-1:0] ys [N+1];
  logic        [15:0]   zs [N+1];
  logic                 vs [N+1];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i <= N; i++) begin
        xs[i] <= '0; ys[i] <= '0; zs[i] <= '0; vs[i] <= 1'b0;
      end
    end else begin
      // stage 0: half-turn pre-rotation into x >= 0
      vs[0] <= in_valid;
      if (x < 0) begin
        xs[0] <= -XW'(x);
        ys[0] <= -XW'(y);
        zs[0] <= 16'h8000;
      end else begin
        xs[0] <= XW'(x);
        ys[0] <= XW'(y);
        zs[0] <= 16'h0000;
      end
      // micro-rotations
      for (int i = 0; i < N; i++) begin
        vs[i+1] <= vs[i];
        if (ys[i] >= 0) begin
          xs[i+1] <= xs[i] + (ys[i] >>> i);
          ys[i+1] <= ys[i] - (xs[i] >>> i);
          zs[i+1] <= zs[i] + ATAN_TAB[i];
        end else begin
          xs[i+1] <= xs[i] - (ys[i] >>> i);
          ys[i+1] <= ys[i] + (xs[i] >>> i);
          zs[i+1] <= zs[i] - ATAN_TAB[i];
        end
      end
    end
  end

  assign out_valid = vs[N];
  assign angle     = zs[N];
endmodule
