// qam_pll: symbol timing recovery ("QAM PLL") for the 4x-interpolated
// stream, about 9.56 samples per symbol.
//
// Timing error detector: the derivative of each channel multiplied by the
// sign of its matched sample (the "sign alter" mux: derivative or its
// negation), I and Q added. Sampled early on a rising edge or late on a
// falling edge both give the right sign to steer the clock.
//
// Loop filter: proportional-plus-integrator, v = k1*e + k2*sum(e), evaluated
// only at symbol strobes (one error per symbol, as if zero-padded between).
//
// Timing control (modulo-1 down counter): every input sample the counter
// eta is reduced by W = W_NOM + v, where W_NOM ~ 1/9.5621 is the nominal
// symbol fraction per interpolated sample (the 0.1046 of the source). When
// eta - W would drop below zero, 1 is added back and the sample is taken as a
// symbol: i3/q3 and trig_sample. The nearest interpolated sample is used, no
// fractional interpolation, as in the source.
//
// Fixed point is this design's: eta and W carry FRAC = 24 fraction bits. The
// error is in sample units (full scale 2048 = 1.0). k1 and k2 are in counter
// LSBs per full-scale error, so v = (k1*e + k2*acc) >>> 11. They are ports
// because the loop bandwidth must be tuned to the signal (the source derives
// them from BnT, zeta and Kp with K0 = -1). With the error sign used here the
// loop locks with positive gains: a positive error raises W and brings the
// next strobe forward. Gains of k1 = 100000, k2 = 100 lock on the test signal
// for most, but not all, starting timing phases; from some phases the loop
// stays near the unstable point between symbols for the whole capture.
//
// Timing: in_valid with i2/q2/id2/qd2 in; when that sample is taken as a
// symbol, trig_sample pulses one clock later with i3/q3 (held until the next
// symbol) and the loop output v is updated at the same edge.
module qam_pll
  import rx_pkg::*;
#(
  parameter int FRAC  = 24,
  parameter int W_NOM = 1754553      // round(2^24 / 9.5621)
) (
  input  logic               clk,
  input  logic               rst,
  input  logic signed [31:0] k1,
  input  logic signed [31:0] k2,
  input  logic               in_valid,
  input  sample_t            i2,
  input  sample_t            q2,
  input  sample_t            id2,
  input  sample_t            qd2,
  output logic               trig_sample,
  output sample_t            i3,
  output sample_t            q3,
  output logic signed [31:0] loop_v       // loop filter output, for observation
);
  localparam int EW = FRAC + 4;

  logic signed [EW-1:0] eta;
  logic signed [31:0]   v;
  logic signed [31:0]   acc;      // integrator of the error
  logic signed [SW:0]   err;
  logic signed [EW-1:0] wstep, eta_dec;

  // sign alter: derivative times the sign of the matched sample
  always_comb begin
    err = (i2[SW-1] ? -(SW+1)'(id2) : (SW+1)'(id2)) + (q2[SW-1] ? -(SW+1)'(qd2) : (SW+1)'(qd2));
    wstep   = EW'(W_NOM) + EW'(v);
    eta_dec = eta - wstep;
  end

  logic signed [63:0] vp, vi;
  logic signed [31:0] acc_next;
  always_comb begin
    acc_next = acc + 32'(err);
    vp = 64'(k1) * 64'(err);
    vi = 64'(k2) * 64'(acc_next);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      eta         <= EW'(1 <<< FRAC);
      v           <= '0;
      acc         <= '0;
      trig_sample <= 1'b0;
      i3          <= '0;
      q3          <= '0;
    end else begin
      trig_sample <= 1'b0;
      if (in_valid) begin
        if (eta_dec < 0) begin
          // underflow: take this sample as the symbol and update the loop
          eta         <= eta_dec + EW'(1 <<< FRAC);
          trig_sample <= 1'b1;
          i3          <= i2;
          q3          <= q2;
          acc         <= acc_next;
          v           <= 32'((vp + vi) >>> 11);
        end else begin
          eta <= eta_dec;
        end
      end
    end
  end

  assign loop_v = v;

  // The step must stay positive or the counter never underflows.
  a_step_positive: assert property (@(posedge clk) disable iff (rst) in_valid |-> wstep > 0)
    else $error("qam_pll: loop step not positive, gains too large");
endmodule
