// tb_data_sort: runs the acquisition state machine through initialisation
// and two capture loops. The lock inputs are raised one after another with
// delays; the ADC buses carry consecutive sample numbers (I) and the same
// plus 1000 (Q), in DDR form. Checks: the state order stclkinit, ststart,
// stwaitPLLlock, stwaitDCMlock, then twice strst_if_fifo, stwait, stwrite,
// stclktransition, stread, st_w8_Rxcheck; state changes only on the
// 6.25 MHz tick; every control output matches its state in every clock;
// each capture reads 8192 consecutive samples per channel, one per tick;
// the machine waits in st_w8_Rxcheck until the receiver's check done.
// Prints TB_RESULT.
module tb_data_sort;
  logic clk = 0, ce = 0, rst = 1;
  logic dcm100_locked = 0, pll_init_done = 0, pll_locked = 0, dcm_i_locked = 0, dcm_q_locked = 0, rx_checkdone = 0;
  logic dclk_i = 0, dclk_div2_i = 0, dclk_q, dclk_div2_q;
  logic [11:0] adc_i_d, adc_i_dd, adc_q_d, adc_q_dd, i_out, q_out;
  logic pllstart, pll_ce, dclk_rst, rst_if_fifo, we_net, rd_net, out_valid;
  logic [3:0] state_o;
  int checks = 0, failures = 0;
  data_sort dut (.*);
  initial begin #30ms; $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures + 1); $finish; end

  always #2.5 clk = ~clk;
  int cnt = 0;
  always @(posedge clk) begin cnt <= (cnt + 1) % 32; ce <= (cnt == 31); end

  // ADC: 400 MHz data clock, samples 4p..4p+3 per period (Q: +1000)
  int p = 0;
  always begin
    adc_i_dd = 12'(4 * p);     adc_i_d = 12'(4 * p + 1);
    adc_q_dd = 12'(4 * p + 1000); adc_q_d = 12'(4 * p + 1001);
    #0.625 dclk_i = 1; dclk_div2_i = ~dclk_div2_i; #0.625;
    adc_i_dd = 12'(4 * p + 2); adc_i_d = 12'(4 * p + 3);
    adc_q_dd = 12'(4 * p + 1002); adc_q_d = 12'(4 * p + 1003);
    #0.625 dclk_i = 0; #0.625;
    p++;
  end
  assign dclk_q = dclk_i, dclk_div2_q = dclk_div2_i;

  // state order and output table
  int seq [$];
  logic [3:0] st_prev = 0;
  always @(posedge clk) if (!rst) begin
    logic e_ps, e_dr, e_rf, e_we, e_rd;
    e_ps = (state_o == 0); e_dr = (state_o <= 2); e_rf = (state_o == 4);
    e_we = (state_o == 6); e_rd = (state_o == 8);
    checks++;
    if (pllstart !== e_ps || pll_ce !== 1 || dclk_rst !== e_dr || rst_if_fifo !== e_rf || we_net !== e_we || rd_net !== e_rd) begin
      failures++; if (failures < 6) $display("outputs wrong in state %0d", state_o);
    end
    if (state_o != st_prev) begin
      seq.push_back(state_o);
      checks++;
      if (!$past(ce)) begin failures++; $display("state changed without a tick"); end
    end
    st_prev <= state_o;
  end

  // sample stream of each capture
  int nsamp = 0, prev = -1, bad = 0, last_t = -1, bad_rate = 0;
  always @(posedge clk) if (out_valid) begin
    if (prev >= 0 && int'(i_out) != (prev + 1) % 4096) bad++;
    if (int'(q_out) != (int'(i_out) + 1000) % 4096) bad++;
    if (last_t >= 0 && $time - last_t != 160) bad_rate++;
    prev = i_out; last_t = $time; nsamp++;
  end

  initial begin
    int expect_seq [$] = '{1, 2, 3, 4, 5, 6, 7, 8, 9, 4, 5, 6, 7, 8, 9, 4};
    repeat (5) @(posedge clk); rst <= 0;
    #3us dcm100_locked = 1;
    #3us pll_init_done = 1;
    #3us pll_locked = 1;
    #2us dcm_i_locked = 1;
    #2us dcm_q_locked = 1;
    for (int loopn = 0; loopn < 2; loopn++) begin
      wait (state_o == 8); nsamp = 0; prev = -1; last_t = -1;
      wait (state_o == 9);
      repeat (200) @(posedge clk);
      checks++; if (state_o != 9) begin failures++; $display("left st_w8_Rxcheck without check done"); end
      checks++; if (nsamp != 8192) begin failures++; $display("capture %0d: %0d samples", loopn, nsamp); end
      @(posedge clk); rx_checkdone <= 1;
      wait (state_o == 4); @(posedge clk); rx_checkdone <= 0;
    end
    repeat (100) @(posedge clk);
    checks++; if (bad != 0 || bad_rate != 0) begin failures++; $display("%0d samples out of order, %0d off rate", bad, bad_rate); end
    checks++;
    if (seq.size() < expect_seq.size()) begin failures++; $display("only %0d state changes", seq.size()); end
    else foreach (expect_seq[k]) if (seq[k] != expect_seq[k]) begin failures++; $display("state change %0d: %0d expected %0d", k, seq[k], expect_seq[k]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
