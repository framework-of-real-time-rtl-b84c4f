// tb_receiver_final: end-to-end test of the receiver chain without the
// capture logic. A generated capture (8192 samples per channel, one every
// 32 clocks, i.e. 6.25 MHz on 200 MHz) of the repeated test block is fed
// in, once with a 10-degree carrier rotation and once with 190 degrees.
// Checks: the state machine goes stRst, stWrFIFO, stRdFIFO, stDoneRd; the
// symbol FIFOs fill (3072 symbols) and empty; the data checker finds the
// block and finishes with at most 4 of 2176 bits wrong (checkdoneright;
// 0 with the default loop gains k1 = 100000, k2 = 100, which plusargs
// +k1= +k2= and a symbol-rate offset +ppm= can change); with 190
// degrees the 180-degree correction (Filt3) latches, with 10 degrees no
// correction latches; checkdonewrong follows when the FIFOs run empty; the
// timing loop gives about 4 * 8192 / 9.5621 strobes. Prints TB_RESULT.
module tb_receiver_final;
  import rx_pkg::*;
  import tb_sig_pkg::*;
  logic clk = 0, ce = 0, rst = 1, in_valid = 0;
  coef_t mf_coef [100], df_coef [50];
  logic signed [31:0] k1, k2, loop_v;
  sample_t i_in, q_in;
  logic [11:0] errorcount, errorcount_last, check_index;
  logic checkdone, checkdoneright, checkdonewrong, trig_sample, barker_trig_i, barker_trig_q;
  logic shift_phase, fifo_full, fifo_empty;
  logic [1:0] state_o;
  logic [2:0] shift_trig, shift_pulse;
  logic [11:0] fifo_count;
  int checks = 0, failures = 0;
  receiver_final dut (.*);
  always #2.5 clk = ~clk;
  initial begin #20ms; $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures + 1); $finish; end

  int cnt = 0;
  always @(posedge clk) begin cnt <= (cnt + 1) % 32; ce <= (cnt == 31); end

  int n_strobe = 0, n_right = 0, n_wrong = 0, st_mask = 0;
  logic [2:0] trig_at_done;
  always @(posedge clk) if (!rst) begin
    if (trig_sample) n_strobe++;
    if (checkdoneright) begin n_right++; trig_at_done = shift_trig;
      $display("  check done: %0d errors, correction trigger %b", errorcount_last, shift_trig); end
    if (checkdonewrong && !$past(checkdonewrong)) n_wrong++;
    st_mask |= (1 << state_o);
  end

  initial begin
    real rots [2] = '{10.0, 190.0};
    logic [2:0] exp_trig [2] = '{3'b000, 3'b100};
    real ppm;
    mf_coefs(mf_coef); df_coefs(df_coef);
    ppm = 0;
    void'($value$plusargs("ppm=%f", ppm));
    k1 = 100000; k2 = 100;
    void'($value$plusargs("k1=%d", k1)); void'($value$plusargs("k2=%d", k2));
    foreach (rots[r]) begin
      int si [], sq [];
      int errs_right;
      gen_capture(8192, 2 * int'($urandom % 1024), rots[r], 900.0, SPS * (1.0 + ppm * 1e-6), si, sq);
      rst <= 1; repeat (3) @(posedge clk); rst <= 0;
      n_strobe = 0; n_right = 0; n_wrong = 0; st_mask = 0; errs_right = -1;
      for (int n = 0; n < 8192; n++) begin
        @(posedge clk iff ce);
        in_valid <= 1; i_in <= sample_t'(si[n]); q_in <= sample_t'(sq[n]);
        if (checkdoneright) errs_right = errorcount_last;
        @(posedge clk); in_valid <= 0;
      end
      // let the FIFOs drain
      repeat (40000) @(posedge clk);
      $display("rotation %0.0f: %0d strobes, %0d right, %0d wrong, states %b, trigger %b, last errors %0d",
               rots[r], n_strobe, n_right, n_wrong, st_mask, shift_trig, errorcount_last);
      checks++; if (n_strobe < 3400 || n_strobe > 3460) begin failures++; $display("strobe count off"); end
      checks++; if (st_mask != 4'b1111) begin failures++; $display("not all states visited"); end
      checks++; if (n_right < 1) begin failures++; $display("no finished check"); end
      checks++; if (errorcount_last > 4) begin failures++; $display("too many bit errors"); end
      checks++; if (trig_at_done != exp_trig[r]) begin failures++; $display("correction %b expected %b", trig_at_done, exp_trig[r]); end
      checks++; if (n_wrong < 1) begin failures++; $display("no checkdonewrong after the FIFOs emptied"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
