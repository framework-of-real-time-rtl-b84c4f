// iq_filter: matched filtering, 4x interpolation and differentiation of the
// I and Q streams, the front of the receiver's DSP chain.
//
// Per channel: a 100-tap interpolating matched filter (L = 4) turns each
// input sample into four samples; its output, requantised to 12 bits, feeds
// a 50-tap derivative filter. The matched-filter output is delayed by
// MATCH_DELAY = 27 interpolated samples so that it lines up with the
// derivative, as in the source. Filter orders, interpolation factor and the
// delay are the source's; coefficient values are inputs, because the source
// designs them with a filter tool per channel spacing.
//
// Clocking follows the source's overclocking: one input sample every 32
// clocks, four matched-filter outputs 8 clocks apart, and a derivative
// filter that has 8 clocks per sample. The multiplier counts (4 for the
// matched filter, 7 for the derivative filter, per channel) are this design's
// choice: the fewest that fit those cycle budgets.
//
// Outputs i1/q1 (delayed matched output) and ideriv1/qderiv1 are valid
// together on out_valid, once per interpolated sample, 9 clocks after the
// matched-filter output they differentiate; i1 is matched output n - 25 when
// ideriv1 is the derivative at n.
module iq_filter
  import rx_pkg::*;
#(
  parameter int MF_TAPS     = 100,
  parameter int DF_TAPS     = 50,
  parameter int L           = 4,
  parameter int MF_MACS     = 4,
  parameter int DF_MACS     = 7,
  parameter int OUT_CYCLES  = 8,
  parameter int MATCH_DELAY = 27
) (
  input  logic    clk,
  input  logic    rst,
  input  coef_t   mf_coef [MF_TAPS],
  input  coef_t   df_coef [DF_TAPS],
  input  logic    in_valid,
  input  sample_t i_in,
  input  sample_t q_in,
  output logic    out_valid,
  output sample_t i1,
  output sample_t q1,
  output sample_t ideriv1,
  output sample_t qderiv1
);
  logic    mf_v_i, mf_v_q, df_v_i, df_v_q;
  sample_t mf_i, mf_q, df_i, df_q;

  tdm_fir #(.TAPS(MF_TAPS), .L(L), .MACS(MF_MACS), .OUT_CYCLES(OUT_CYCLES), .DW(SW), .CW(CW), .CFRAC(CFRAC))
    u_mf_i (.clk, .rst, .coef(mf_coef), .in_valid, .din(i_in), .out_valid(mf_v_i), .dout(mf_i));
  tdm_fir #(.TAPS(MF_TAPS), .L(L), .MACS(MF_MACS), .OUT_CYCLES(OUT_CYCLES), .DW(SW), .CW(CW), .CFRAC(CFRAC))
    u_mf_q (.clk, .rst, .coef(mf_coef), .in_valid, .din(q_in), .out_valid(mf_v_q), .dout(mf_q));

  tdm_fir #(.TAPS(DF_TAPS), .L(1), .MACS(DF_MACS), .OUT_CYCLES(OUT_CYCLES), .DW(SW), .CW(CW), .CFRAC(CFRAC))
    u_df_i (.clk, .rst, .coef(df_coef), .in_valid(mf_v_i), .din(mf_i), .out_valid(df_v_i), .dout(df_i));
  tdm_fir #(.TAPS(DF_TAPS), .L(1), .MACS(DF_MACS), .OUT_CYCLES(OUT_CYCLES), .DW(SW), .CW(CW), .CFRAC(CFRAC))
    u_df_q (.clk, .rst, .coef(df_coef), .in_valid(mf_v_q), .din(mf_q), .out_valid(df_v_q), .dout(df_q));

  // Delay line of matched-filter outputs, advanced once per interpolated sample.
  sample_t dly_i [MATCH_DELAY];
  sample_t dly_q [MATCH_DELAY];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < MATCH_DELAY; k++) begin
        dly_i[k] <= '0;
        dly_q[k] <= '0;
      end
    end else if (mf_v_i) begin
      dly_i[0] <= mf_i;
      dly_q[0] <= mf_q;
      for (int k = 1; k < MATCH_DELAY; k++) begin
        dly_i[k] <= dly_i[k-1];
        dly_q[k] <= dly_q[k-1];
      end
    end
  end

  // The derivative of matched sample n leaves its filter OUT_CYCLES + 1
  // clocks after sample n, when the delay line has just taken sample n + 1.
  // With inputs every L*OUT_CYCLES clocks, the pair presented together is
  // therefore (matched n + 2 - MATCH_DELAY, derivative n): the matched
  // sample is 25 interpolated samples older than the derivative's newest
  // input, close to the 24.5-sample group delay of a 50-tap filter. (The
  // very last derivative of a stream, with no later input, pairs with
  // matched n + 1 - MATCH_DELAY.)
  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      i1 <= '0; q1 <= '0; ideriv1 <= '0; qderiv1 <= '0;
    end else begin
      out_valid <= df_v_i;
      if (df_v_i) begin
        i1      <= dly_i[MATCH_DELAY-1];
        q1      <= dly_q[MATCH_DELAY-1];
        ideriv1 <= df_i;
        qderiv1 <= df_q;
      end
    end
  end

  // The I and Q filters run in lock-step.
  a_lockstep: assert property (@(posedge clk) disable iff (rst) (mf_v_i == mf_v_q) && (df_v_i == df_v_q));
endmodule
