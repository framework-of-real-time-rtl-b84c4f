// tb_top_level_design: end-to-end test of the whole receiver at full size
// (no parameter overrides): 100/50-tap filters, 1024-word capture FIFOs per
// lane, 3072-symbol receiver FIFOs, 13 synthesizer words.
//
// Stimulus: a 200 MHz system clock; 400 MHz ADC data clocks with their
// halves; a band-limited 4-QAM signal carrying the test block (from
// tb_sig_pkg) on the I and Q buses in DDR form, four consecutive samples per
// data-clock period (dd then d on the rising edge, dd then d on the falling
// edge). A fresh signal starts when a capture starts (write enable seen in
// the data-clock domain), so every capture holds one continuous stretch of
// signal. Capture 1 is rotated by 10 degrees (residual phase only), capture
// 2 by 190 degrees (needs the 180-degree correction), captures 3 and 4 by
// 100 and 280 degrees (the two quarter-turn corrections). Capture 2 also
// carries a pair of sign-inverted samples every 600 samples, so some bits
// must be counted as errors. The lock inputs come up one after another; the
// synthesizer lock follows the last programming word.
//
// Every mechanism of the design is counted and each one that never occurs is
// a failure: 6.25 MHz tick (and its 32-clock period), synthesizer words and
// bit clocks, every acquisition state, capture writes and reads (8192
// samples per channel per capture, one per tick), normalizer maximum
// updates, symbol strobes, loop-filter activity, receiver FIFO full and
// empty, receiver states, Barker-13 start detection, the 180-degree and
// quarter-turn correction triggers, checkdoneright and checkdonewrong, the
// check-done hold set and cleared, the receiver reset between captures, error accumulation,
// trial and attempt counters. Results: four finished checks, at most 4 bit
// errors in each clean capture and 1..60 in the impaired one, the expected
// correction per capture, accumulator totals, symbol count per
// capture within 3400..3460. Prints TB_RESULT.
module tb_top_level_design;
  import rx_pkg::*;
  import tb_sig_pkg::*;

  localparam int NREG = 13;
  localparam int CAP  = 8192 + 256;

  logic clk = 0, rst = 1;
  logic dcm100_locked = 0, pll_locked = 0, dcm_i_locked = 0, dcm_q_locked = 0;
  logic dclk_i = 0, dclk_div2_i = 0, dclk_q, dclk_div2_q;
  logic [SW-1:0] adc_i_d = '0, adc_i_dd = '0, adc_q_d = '0, adc_q_dd = '0;
  coef_t mf_coef [100];
  coef_t df_coef [50];
  logic signed [31:0] k1, k2;
  logic [19:0] pll_reg_data [NREG];
  logic [3:0]  pll_reg_addr [NREG];
  logic pll_data, pll_clk, pll_le, pll_ce, dclk_rst, checkdone_hold;
  logic [31:0] error_accum, trial_count, attempt_count;
  logic [11:0] errorcount;
  logic [3:0]  ds_state;
  logic [1:0]  rx_state;
  rx_debug_t   dbg;
  int checks = 0, failures = 0;

  top_level_design dut (.*);

  always #2.5 clk = ~clk;
  initial begin #20ms; $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures + 1); $finish; end

  // ---- ADC signal source -----------------------------------------------------
  int   si [], sq [];
  real  rot_now = 10.0;
  int   p = 0, base = 0;
  logic capturing = 0;
  int   n_capture = 0;

  function automatic logic [SW-1:0] smp(ref int s [], input int k);
    return (k >= 0 && k < s.size()) ? SW'(s[k]) : '0;
  endfunction

  always begin
    int k;
    k = 4 * (p - base);
    adc_i_dd = smp(si, k);     adc_i_d = smp(si, k + 1);
    adc_q_dd = smp(sq, k);     adc_q_d = smp(sq, k + 1);
    #0.625 dclk_i = 1; dclk_div2_i = ~dclk_div2_i; #0.625;
    adc_i_dd = smp(si, k + 2); adc_i_d = smp(si, k + 3);
    adc_q_dd = smp(sq, k + 2); adc_q_d = smp(sq, k + 3);
    #0.625 dclk_i = 0; #0.625;
    p++;
    if (dbg.we_net && !capturing) begin
      capturing = 1; base = p;
      gen_capture(CAP, 2 * int'($urandom % 1024), rot_now, 900.0, SPS, si, sq);
      // capture 2: short bursts of inverted samples, which the error
      // counters must see
      if (n_capture == 1)
        for (int b = 300; b < 8000; b += 600) begin
          si[b] = -si[b]; sq[b] = -sq[b]; si[b+1] = -si[b+1]; sq[b+1] = -sq[b+1];
        end
      n_capture++;
    end else if (!dbg.we_net) capturing = 0;
  end
  assign dclk_q = dclk_i, dclk_div2_q = dclk_div2_i;

  // ---- mechanism counters ------------------------------------------------------
  int n_tick = 0, bad_tick = 0, last_tick = -1, n_le = 0, n_pllclk = 0;
  int ds_visits [10];
  int n_we = 0, n_rd = 0, n_samples = 0, n_maxupd = 0, n_strobe = 0, n_loop = 0;
  int n_full = 0, n_empty = 0, rx_visits [4];
  int n_btrig_i = 0, n_trig180 = 0, n_right = 0, n_wrong = 0, n_hold_set = 0, n_hold_clr = 0;
  int n_rxrst = 0, n_accum = 0;
  int cap_samples [$], cap_strobes [$], err_right [$];
  logic [2:0] trig_right [$];
  int cur_samples = 0, cur_strobes = 0, clk_n = 0;
  logic le_d = 0, pc_d = 0, full_d = 0, empty_d = 0, bi_d = 0, t180_d = 0, wrong_d = 0, hold_d = 0;
  logic [3:0] ds_d = '1;
  logic [SW-1:0] max_d = '0;
  logic [31:0] acc_d = '0;

  always @(posedge clk) begin
    clk_n++;
    if (!rst) begin
      if (dut.ce6) begin
        n_tick++;
        if (last_tick >= 0 && clk_n - last_tick != 32) bad_tick++;
        last_tick = clk_n;
      end
      if (pll_le && !le_d) n_le++;
      if (pll_clk && !pc_d) n_pllclk++;
      ds_visits[ds_state]++;
      rx_visits[rx_state]++;
      if (dbg.we_net) n_we++;
      if (dbg.rd_net) n_rd++;
      if (ds_state != ds_d && ds_state == 4'd8) cur_samples = 0;
      if (dut.ds_valid) begin n_samples++; cur_samples++; end
      if (ds_state != ds_d && ds_state == 4'd9) cap_samples.push_back(cur_samples);
      if (dut.u_receiver.u_norm_i.maxreg != max_d) n_maxupd++;
      if (dbg.trig_sample) begin n_strobe++; cur_strobes++; end
      if (dbg.trig_sample && dbg.loop_v != 0) n_loop++;
      if (dbg.fifo_full && !full_d) n_full++;
      if (dbg.fifo_empty && !empty_d) n_empty++;
      if (dbg.barker_trig_i && !bi_d) n_btrig_i++;
      if (dbg.shift_trig == 3'b100 && !t180_d) n_trig180++;
      if (dbg.checkdoneright) begin
        n_right++; err_right.push_back(int'(dbg.errorcount_last)); trig_right.push_back(dbg.shift_trig);
        $display("  check finished: %0d bit errors, correction trigger %b", dbg.errorcount_last, dbg.shift_trig);
      end
      if (dbg.checkdonewrong && !wrong_d) n_wrong++;
      if (checkdone_hold && !hold_d) n_hold_set++;
      if (!checkdone_hold && hold_d) n_hold_clr++;
      if (dut.rx_rst) begin
        if (cur_strobes > 0) cap_strobes.push_back(cur_strobes);
        cur_strobes = 0; n_rxrst++;
      end
      if (error_accum != acc_d) n_accum++;
    end
    le_d <= pll_le; pc_d <= pll_clk; full_d <= dbg.fifo_full; empty_d <= dbg.fifo_empty;
    bi_d <= dbg.barker_trig_i; t180_d <= (dbg.shift_trig == 3'b100); wrong_d <= dbg.checkdonewrong;
    hold_d <= checkdone_hold; ds_d <= ds_state; max_d <= dut.u_receiver.u_norm_i.maxreg; acc_d <= error_accum;
  end

  task automatic need(string what, int n);
    checks++;
    if (n <= 0) begin failures++; $display("mechanism never seen: %s", what); end
  endtask

  initial begin
    string ds_names [10] = '{"stclkinit", "ststart", "stwaitPLLlock", "stwaitDCMlock", "strst_if_fifo",
                             "stwait", "stwrite", "stclktransition", "stread", "st_w8_Rxcheck"};
    string rx_names [4] = '{"stRst", "stWrFIFO", "stRdFIFO", "stDoneRd"};
    mf_coefs(mf_coef); df_coefs(df_coef);
    k1 = 100000; k2 = 100;
    for (int r = 0; r < NREG; r++) begin
      pll_reg_data[r] = 20'(32'h5A3C1 * (r + 1));
      pll_reg_addr[r] = 4'(NREG - 1 - r);
    end
    repeat (5) @(posedge clk); rst <= 0;
    #2us dcm100_locked = 1;
    wait (n_le == NREG);
    #1us pll_locked = 1;
    wait (!dclk_rst);
    #1us dcm_i_locked = 1;
    #1us dcm_q_locked = 1;
    // capture 1 at 10 degrees, then 190, 100 and 280 degrees, each set once
    // the previous check has finished
    wait (trial_count == 1);
    rot_now = 190.0;
    wait (trial_count == 2);
    rot_now = 100.0;
    wait (trial_count == 3);
    rot_now = 280.0;
    wait (trial_count == 4 && ds_state == 4'd6);
    repeat (100) @(posedge clk);
    if (cur_strobes > 0) cap_strobes.push_back(cur_strobes);

    $display("ticks %0d, words %0d, bit clocks %0d, samples %0d, strobes %0d, checks %0d/%0d, accum %0d, trials %0d, attempts %0d",
             n_tick, n_le, n_pllclk, n_samples, n_strobe, n_right, n_wrong, error_accum, trial_count, attempt_count);
    need("6.25 MHz tick", n_tick);
    checks++; if (bad_tick != 0) begin failures++; $display("%0d ticks off the 32-clock period", bad_tick); end
    need("synthesizer word latched", n_le);
    checks++; if (n_le != NREG || n_pllclk != NREG * 24) begin failures++; $display("synthesizer: %0d words, %0d bit clocks", n_le, n_pllclk); end
    foreach (ds_visits[s]) need(ds_names[s], ds_visits[s]);
    need("capture write", n_we);
    need("capture read", n_rd);
    need("captured sample", n_samples);
    checks++;
    if (cap_samples.size() < 4) begin failures++; $display("only %0d captures read", cap_samples.size()); end
    else foreach (cap_samples[c]) if (cap_samples[c] != 8192) begin failures++; $display("capture %0d: %0d samples", c, cap_samples[c]); end
    need("normalizer maximum update", n_maxupd);
    need("symbol strobe", n_strobe);
    need("loop filter correction", n_loop);
    checks++;
    foreach (cap_strobes[c]) if (c < 4 && (cap_strobes[c] < 3400 || cap_strobes[c] > 3460)) begin
      failures++; $display("capture %0d: %0d symbol strobes", c, cap_strobes[c]); end
    need("receiver FIFO full", n_full);
    need("receiver FIFO empty", n_empty);
    foreach (rx_visits[s]) need(rx_names[s], rx_visits[s]);
    need("Barker-13 start detection", n_btrig_i);
    need("180-degree correction trigger", n_trig180);
    need("checkdoneright", n_right);
    need("checkdonewrong", n_wrong);
    need("check-done hold set", n_hold_set);
    need("check-done hold cleared", n_hold_clr);
    need("receiver reset between captures", n_rxrst);
    need("error accumulation", n_accum);
    need("trial counter", int'(trial_count));
    need("second attempt", int'(attempt_count) - 1);
    checks++;
    if (n_right < 4) begin failures++; $display("only %0d finished checks", n_right); end
    else begin
      if (trig_right[0] != 3'b000) begin failures++; $display("capture 1 correction %b", trig_right[0]); end
      if (trig_right[1] != 3'b100) begin failures++; $display("capture 2 correction %b", trig_right[1]); end
      if (trig_right[2] != 3'b010) begin failures++; $display("capture 3 correction %b", trig_right[2]); end
      if (trig_right[3] != 3'b001) begin failures++; $display("capture 4 correction %b", trig_right[3]); end
      if (err_right[2] > 4 || err_right[3] > 4) begin failures++; $display("captures 3/4: %0d/%0d bit errors", err_right[2], err_right[3]); end
      if (err_right[0] > 4) begin failures++; $display("check 1: %0d bit errors", err_right[0]); end
      if (err_right[1] == 0 || err_right[1] > 60) begin failures++; $display("check 2: %0d bit errors", err_right[1]); end
    end
    checks++;
    if (int'(error_accum) != err_right.sum() || trial_count != 32'(n_right)) begin
      failures++; $display("accumulators %0d/%0d, expected %0d/%0d", error_accum, trial_count, err_right.sum(), n_right);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
