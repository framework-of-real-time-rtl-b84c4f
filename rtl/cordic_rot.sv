// cordic_rot: pipelined CORDIC in rotation mode; returns cos and sin of an
// angle. Plays the role of the "CORDIC SINCOS" block of the phase recovery.
//
// Starts from (K, 0), K = 1/1.64676 in Q2.14, so the CORDIC gain is already
// compensated, and rotates by the input angle in CORDIC_ITER micro-steps.
// The angle is 16-bit turns (65536 = 2*pi) and must lie within +/-90
// degrees, which holds for the quarter angles the phase recovery feeds it.
// Outputs are Q2.14 (16384 = 1.0), accurate to a few LSBs.
//
// Timing: out_valid/cos_o/sin_o follow in_valid/angle by CORDIC_ITER clocks.
module cordic_rot
  import rx_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               in_valid,
  input  logic        [15:0] angle,
  output logic               out_valid,
  output logic signed [15:0] cos_o,
  output logic signed [15:0] sin_o
);
  localparam int N = CORDIC_ITER;
  localparam int XW = 18;

  logic signed [XW-1:0] xs [N+1];
  logic signed [XW-1:0] ys [N+1];
  logic signed [15:0]   zs [N+1];
  logic                 vs [N+1];

  always_comb begin
    xs[0] = XW'(CORDIC_K_Q14);
    ys[0] = '0;
    zs[0] = $signed(angle);
    vs[0] = in_valid;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 1; i <= N; i++) begin
        xs[i] <= '0; ys[i] <= '0; zs[i] <= '0; vs[i] <= 1'b0;
      end
    end else begin
      for (int i = 0; i < N; i++) begin
        vs[i+1] <= vs[i];
        if (zs[i] >= 0) begin
          xs[i+1] <= xs[i] - (ys[i] >>> i);
          ys[i+1] <= ys[i] + (xs[i] >>> i);
          zs[i+1] <= zs[i] - $signed(ATAN_TAB[i]);
        end else begin
          xs[i+1] <= xs[i] + (ys[i] >>> i);
          ys[i+1] <= ys[i] - (xs[i] >>> i);
          zs[i+1] <= zs[i] + $signed(ATAN_TAB[i]);
        end
      end
    end
  end

  assign out_valid = vs[N];
  assign cos_o     = 16'(xs[N]);
  assign sin_o     = 16'(ys[N]);
endmodule
