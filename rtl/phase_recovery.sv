// phase_recovery: Viterbi-Viterbi carrier phase recovery for 4-QAM.
//
// The fourth power of each complex sample removes the modulation (the
// constellation points sit at 0/90/180/270 degrees), leaving four times the
// carrier phase. The fourth powers are summed over VV_LEN = 64 samples, built
// as in the source from a chain of four 16-sample delay sections, each with
// its own 16-sample running sum, and a final four-input sum. A vectoring
// CORDIC takes the angle of the sum, a right shift by two divides it by four,
// and a rotation CORDIC turns the quarter angle into cos/sin. Each sample is
// then multiplied by cos - j*sin, which rotates the constellation back onto
// the axes. A phase ambiguity of a multiple of 90 degrees remains; the
// ninety-degree shift stage resolves it later.
//
// As in the source, the sample is not re-centred in its averaging window:
// each sample is rotated by the most recent estimate, about five samples
// old. The derivative inputs pass through unrotated, delayed to stay aligned.
// Word widths and the scaling after each squaring (>>> 11) are this design's.
//
// Timing: one in_valid every few clocks (every 8 in the receiver); outputs
// i2/q2/id2/qd2 appear one clock after in_valid with out_valid.
module phase_recovery
  import rx_pkg::*;
#(
  parameter int VV_LEN = 64,
  parameter int SEG    = 16
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    in_valid,
  input  sample_t i1,
  input  sample_t q1,
  input  sample_t id1,
  input  sample_t qd1,
  output logic    out_valid,
  output sample_t i2,
  output sample_t q2,
  output sample_t id2,
  output sample_t qd2
);
  localparam int NSEG = VV_LEN / SEG;
  localparam int P2W  = 14;                       // (a+jb)^2 >>> 11
  localparam int P4W  = 17;                       // ((a+jb)^2)^2 >>> 11
  localparam int SUMW = P4W + $clog2(VV_LEN) + 1; // 64-point sum
  localparam int IW   = 24;

  // ---- (a + jb)^4 --------------------------------------------------------
  logic signed [P2W-1:0] p2_re, p2_im;
  logic signed [P4W-1:0] p4_re, p4_im;
  logic                  v_p2, v_p4;

  logic signed [2*SW:0]    sq_re_full, sq_im_full;
  logic signed [2*P2W+1:0] q4_re_full, q4_im_full;
  always_comb begin
    sq_re_full = (2*SW+1)'(i1) * (2*SW+1)'(i1) - (2*SW+1)'(q1) * (2*SW+1)'(q1);
    sq_im_full = ((2*SW+1)'(i1) * (2*SW+1)'(q1)) <<< 1;
    q4_re_full = (2*P2W+2)'(p2_re) * (2*P2W+2)'(p2_re) - (2*P2W+2)'(p2_im) * (2*P2W+2)'(p2_im);
    q4_im_full = ((2*P2W+2)'(p2_re) * (2*P2W+2)'(p2_im)) <<< 1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      p2_re <= '0; p2_im <= '0; p4_re <= '0; p4_im <= '0;
      v_p2 <= 1'b0; v_p4 <= 1'b0;
    end else begin
      v_p2 <= in_valid;
      v_p4 <= v_p2;
      if (in_valid) begin
        p2_re <= P2W'(sq_re_full >>> 11);
        p2_im <= P2W'(sq_im_full >>> 11);
      end
      if (v_p2) begin
        p4_re <= P4W'(q4_re_full >>> 11);
        p4_im <= P4W'(q4_im_full >>> 11);
      end
    end
  end

  // ---- 64-point sum: NSEG sections of SEG delays, each with a running sum --
  logic signed [P4W-1:0]  dl_re [NSEG][SEG];
  logic signed [P4W-1:0]  dl_im [NSEG][SEG];
  logic signed [SUMW-1:0] ss_re [NSEG];
  logic signed [SUMW-1:0] ss_im [NSEG];
  logic signed [SUMW-1:0] tot_re, tot_im;
  logic                   v_ss, v_tot;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int s = 0; s < NSEG; s++) begin
        ss_re[s] <= '0; ss_im[s] <= '0;
        for (int k = 0; k < SEG; k++) begin
          dl_re[s][k] <= '0; dl_im[s][k] <= '0;
        end
      end
      tot_re <= '0; tot_im <= '0; v_ss <= 1'b0; v_tot <= 1'b0;
    end else begin
      v_ss  <= v_p4;
      v_tot <= v_ss;
      if (v_p4) begin
        for (int s = 0; s < NSEG; s++) begin
          // section input: the new sample, or what falls out of the previous section
          dl_re[s][0] <= (s == 0) ? p4_re : dl_re[(s == 0) ? 0 : s-1][SEG-1];
          dl_im[s][0] <= (s == 0) ? p4_im : dl_im[(s == 0) ? 0 : s-1][SEG-1];
          for (int k = 1; k < SEG; k++) begin
            dl_re[s][k] <= dl_re[s][k-1];
            dl_im[s][k] <= dl_im[s][k-1];
          end
          ss_re[s] <= ss_re[s] + ((s == 0) ? SUMW'(p4_re) : SUMW'(dl_re[(s == 0) ? 0 : s-1][SEG-1]))
                               - SUMW'(dl_re[s][SEG-1]);
          ss_im[s] <= ss_im[s] + ((s == 0) ? SUMW'(p4_im) : SUMW'(dl_im[(s == 0) ? 0 : s-1][SEG-1]))
                               - SUMW'(dl_im[s][SEG-1]);
        end
      end
      if (v_ss) begin
        logic signed [SUMW-1:0] a_re, a_im;
        a_re = '0; a_im = '0;
        for (int s = 0; s < NSEG; s++) begin
          a_re += ss_re[s];
          a_im += ss_im[s];
        end
        tot_re <= a_re;
        tot_im <= a_im;
      end
    end
  end

  // ---- angle / 4, sin and cos --------------------------------------------
  logic        ang_v, sc_v;
  logic [15:0] ang;
  logic signed [15:0] c_new, s_new;

  cordic_vec #(.IW(IW)) u_atan (
    .clk, .rst, .in_valid(v_tot), .x(IW'(tot_re)), .y(IW'(tot_im)),
    .out_valid(ang_v), .angle(ang));

  cordic_rot u_sincos (
    .clk, .rst, .in_valid(ang_v), .angle(16'($signed(ang) >>> 2)),
    .out_valid(sc_v), .cos_o(c_new), .sin_o(s_new));

  logic signed [15:0] cos_r, sin_r;
  always_ff @(posedge clk) begin
    if (rst) begin
      cos_r <= 16'sd16384;   // no rotation until the first estimate
      sin_r <= '0;
    end else if (sc_v) begin
      cos_r <= c_new;
      sin_r <= s_new;
    end
  end

  // ---- rotate the current sample by (cos - j sin) --------------------------
  logic signed [SW+17:0] r_re, r_im;
  always_comb begin
    r_re = ((SW+18)'(i1) * (SW+18)'(cos_r) + (SW+18)'(q1) * (SW+18)'(sin_r)) >>> 14;
    r_im = ((SW+18)'(q1) * (SW+18)'(cos_r) - (SW+18)'(i1) * (SW+18)'(sin_r)) >>> 14;
  end

  localparam logic signed [SW+17:0] LIM = (SW+18)'(FULL);
  function automatic sample_t sat(logic signed [SW+17:0] v);
    if (v > LIM)       return sample_t'(FULL);
    else if (v < -LIM) return sample_t'(-FULL);
    else                return sample_t'(v);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      i2 <= '0; q2 <= '0; id2 <= '0; qd2 <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        i2  <= sat(r_re);
        q2  <= sat(r_im);
        id2 <= id1;
        qd2 <= qd1;
      end
    end
  end
endmodule
