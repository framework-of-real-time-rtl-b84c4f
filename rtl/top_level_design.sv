// top_level_design: the FPGA design of the real-time receiver: acquisition
// control and ADC capture (data_sort), synthesizer programming (pll_init),
// the receiver (receiver_final) and the bit-error counters.
//
// Clocking: clk is the 200 MHz clock (the doubled output of the 100 MHz
// clock manager in the source). The 6.25 MHz sample clock of the source is
// replaced by a one-clock tick ce6 every 32 clocks, taken from the rising
// edge of bit 3 of generic_counter (which counts every second clock); all
// 6.25 MHz processes advance on that tick. The ADC data clocks (dclk_*,
// 400 MHz) and their halves (dclk_div2_*) come from the ADC clock managers,
// which are outside this design, as are the differential input buffers, the
// synthesizer chip and the 100 MHz clock manager: their lock signals and
// single-ended buses are ports.
//
// Reset and check-done handshake (the source's two flip-flops):
//   rx_rst: the DataSort FIFO reset delayed by one clock, which resets the
//     receiver after the accumulators have seen the last done.
//   checkdone_hold: set by the receiver's checkdone, cleared by the DataSort
//     FIFO reset (clear wins), otherwise holds; it is DataSort's "receiver
//     check done" event.
// Counters: error_accum adds errorcount_last and trial_count adds 1 on each
// finished check (checkdoneright); attempt_count counts every rising
// checkdone, including captures where no data block was found. The source
// reads these through a logic analyzer core; here they are ports, and dbg
// carries the internal signals worth watching. BER =
// error_accum / (trial_count * 2176).
//
// pll_ce is constant 1, as in the source's control table (the synthesizer's
// chip enable is never dropped).
//
// Coefficients, loop gains and synthesizer register words are ports: the
// source computes them offline for each channel spacing and crystal.
module top_level_design
  import rx_pkg::*;
#(
  parameter int MF_TAPS       = 100,
  parameter int DF_TAPS       = 50,
  parameter int FIFO_DEPTH    = 1024,
  parameter int RX_FIFO_DEPTH = 3072,
  parameter int NREG          = 13
) (
  input  logic               clk,
  input  logic               rst,
  // lock indications of the clock managers and the synthesizer
  input  logic               dcm100_locked,
  input  logic               pll_locked,
  input  logic               dcm_i_locked,
  input  logic               dcm_q_locked,
  // ADC channels, after the input buffers and clock managers
  input  logic               dclk_i,
  input  logic               dclk_div2_i,
  input  logic [SW-1:0]      adc_i_d,
  input  logic [SW-1:0]      adc_i_dd,
  input  logic               dclk_q,
  input  logic               dclk_div2_q,
  input  logic [SW-1:0]      adc_q_d,
  input  logic [SW-1:0]      adc_q_dd,
  // settings
  input  coef_t              mf_coef [MF_TAPS],
  input  coef_t              df_coef [DF_TAPS],
  input  logic signed [31:0] k1,
  input  logic signed [31:0] k2,
  input  logic [19:0]        pll_reg_data [NREG],
  input  logic [3:0]         pll_reg_addr [NREG],
  // synthesizer and clock-manager control
  output logic               pll_data,
  output logic               pll_clk,
  output logic               pll_le,
  output logic               pll_ce,
  output logic               dclk_rst,
  // results
  output logic [31:0]        error_accum,
  output logic [31:0]        trial_count,
  output logic [31:0]        attempt_count,
  output logic [11:0]        errorcount,
  output logic               checkdone_hold,
  output logic [3:0]         ds_state,
  output logic [1:0]         rx_state,
  output rx_debug_t          dbg
);
  // ---- 6.25 MHz tick -----------------------------------------------------------
  logic [7:0] cnt;
  logic       c3_d, ce6;
  generic_counter #(.N(8)) u_counter (.clk, .clr(rst), .count(cnt));
  always_ff @(posedge clk) c3_d <= rst ? 1'b0 : cnt[3];
  assign ce6 = cnt[3] && !c3_d;

  // ---- synthesizer programming -------------------------------------------------
  logic pllstart, pll_init_done;
  pll_init #(.NREG(NREG)) u_pll_init (
    .clk, .rst, .ce(ce6), .start(pllstart), .reg_data(pll_reg_data), .reg_addr(pll_reg_addr),
    .pll_data, .pll_clk, .pll_le, .done(pll_init_done));

  // ---- acquisition ---------------------------------------------------------------
  logic    rst_if_fifo, we_net, rd_net, ds_valid;
  sample_t ds_i, ds_q;
  data_sort #(.DEPTH(FIFO_DEPTH), .W(SW)) u_data_sort (
    .clk, .ce(ce6), .rst,
    .dcm100_locked, .pll_init_done, .pll_locked, .dcm_i_locked, .dcm_q_locked,
    .rx_checkdone(checkdone_hold),
    .dclk_i, .dclk_div2_i, .adc_i_d, .adc_i_dd,
    .dclk_q, .dclk_div2_q, .adc_q_d, .adc_q_dd,
    .pllstart, .pll_ce, .dclk_rst, .rst_if_fifo, .we_net, .rd_net, .state_o(ds_state),
    .i_out(ds_i), .q_out(ds_q), .out_valid(ds_valid));

  // ---- receiver ------------------------------------------------------------------
  logic rst_if_fifo_d, rx_rst;
  always_ff @(posedge clk) rst_if_fifo_d <= rst ? 1'b0 : rst_if_fifo;
  assign rx_rst = rst || rst_if_fifo_d;

  logic [11:0] errorcount_last;
  logic        checkdone, checkdoneright, checkdonewrong;
  logic        trig_sample, b_trig_i, b_trig_q, shift_phase, fifo_full, fifo_empty;
  logic [2:0]  shift_trig, shift_pulse;
  logic [$clog2(RX_FIFO_DEPTH+1)-1:0] fifo_count;
  logic [11:0] check_index;
  logic signed [31:0] loop_v;

  receiver_final #(.MF_TAPS(MF_TAPS), .DF_TAPS(DF_TAPS), .RX_FIFO_DEPTH(RX_FIFO_DEPTH)) u_receiver (
    .clk, .ce(ce6), .rst(rx_rst), .mf_coef, .df_coef, .k1, .k2,
    .in_valid(ds_valid), .i_in(ds_i), .q_in(ds_q),
    .errorcount, .errorcount_last, .checkdone, .checkdoneright, .checkdonewrong,
    .state_o(rx_state), .trig_sample, .shift_trig, .barker_trig_i(b_trig_i), .barker_trig_q(b_trig_q),
    .shift_pulse, .shift_phase, .fifo_full, .fifo_empty, .fifo_count, .check_index, .loop_v);

  always_comb begin
    dbg.tick_count      = cnt;
    dbg.we_net          = we_net;
    dbg.rd_net          = rd_net;
    dbg.checkdoneright  = checkdoneright;
    dbg.checkdonewrong  = checkdonewrong;
    dbg.trig_sample     = trig_sample;
    dbg.loop_v          = loop_v;
    dbg.fifo_full       = fifo_full;
    dbg.fifo_empty      = fifo_empty;
    dbg.fifo_count      = 12'(fifo_count);
    dbg.shift_trig      = shift_trig;
    dbg.shift_pulse     = shift_pulse;
    dbg.shift_phase     = shift_phase;
    dbg.barker_trig_i   = b_trig_i;
    dbg.barker_trig_q   = b_trig_q;
    dbg.check_index     = check_index;
    dbg.errorcount_last = errorcount_last;
  end

  // ---- check-done hold and counters ------------------------------------------------
  logic checkdone_d;
  always_ff @(posedge clk) begin
    if (rst) begin
      checkdone_hold <= 1'b0;
      checkdone_d    <= 1'b0;
      error_accum    <= '0;
      trial_count    <= '0;
      attempt_count  <= '0;
    end else begin
      checkdone_d <= checkdone;
      if (rst_if_fifo)    checkdone_hold <= 1'b0;
      else if (checkdone) checkdone_hold <= 1'b1;
      if (checkdoneright) begin
        error_accum <= error_accum + 32'(errorcount_last);
        trial_count <= trial_count + 1'b1;
      end
      if (checkdone && !checkdone_d) attempt_count <= attempt_count + 1'b1;
    end
  end
endmodule
