// data_sort: capture of the two ADC channels and the acquisition state
// machine (initialise, then repeat: reset, write, read, wait for the
// receiver).
//
// Per channel, adc_data_interface turns the DDR buses into four words per
// data clock and demux_fifo_sort stores them and reads them back in order.
// The state machine runs on clk and moves only on the 6.25 MHz tick ce
// (every event of the source's table includes that tick):
//   stclkinit      -> ststart         tick and 100 MHz clock manager locked
//   ststart        -> stwaitPLLlock   synthesizer programming done
//   stwaitPLLlock  -> stwaitDCMlock   synthesizer locked
//   stwaitDCMlock  -> strst_if_fifo   both ADC clock managers locked
//   strst_if_fifo  -> stwait          next tick
//   stwait         -> stwrite         next tick
//   stwrite        -> stclktransition all FIFOs full
//   stclktransition-> stread          FIFOs not empty
//   stread         -> st_w8_Rxcheck   all FIFOs empty
//   st_w8_Rxcheck  -> strst_if_fifo   receiver check done
// Outputs follow the source's control-signal table: pllstart in stclkinit;
// pll_ce always 1; dclk_rst in stclkinit, ststart and stwaitPLLlock;
// rst_if_fifo in strst_if_fifo (it also resets the receiver chain); we in
// stwrite; rd in stread. The source's debug "set" signal is never active and
// is not built. rx_checkdone is held by the caller until the machine leaves
// st_w8_Rxcheck. Using a tick on one clock instead of a separate 6.25 MHz
// clock, and the two-flip-flop synchronisers, are this design's choices.
//
// Timing: i_out/q_out with out_valid, one sample per tick while reading.
module data_sort #(
  parameter int DEPTH = 1024,
  parameter int W     = 12
) (
  input  logic         clk,
  input  logic         ce,
  input  logic         rst,
  // events
  input  logic         dcm100_locked,
  input  logic         pll_init_done,
  input  logic         pll_locked,
  input  logic         dcm_i_locked,
  input  logic         dcm_q_locked,
  input  logic         rx_checkdone,
  // ADC channel I
  input  logic         dclk_i,
  input  logic         dclk_div2_i,
  input  logic [W-1:0] adc_i_d,
  input  logic [W-1:0] adc_i_dd,
  // ADC channel Q
  input  logic         dclk_q,
  input  logic         dclk_div2_q,
  input  logic [W-1:0] adc_q_d,
  input  logic [W-1:0] adc_q_dd,
  // control outputs
  output logic         pllstart,
  output logic         pll_ce,
  output logic         dclk_rst,
  output logic         rst_if_fifo,
  output logic         we_net,
  output logic         rd_net,
  output logic [3:0]   state_o,
  // sorted samples
  output logic [W-1:0] i_out,
  output logic [W-1:0] q_out,
  output logic         out_valid
);
  typedef enum logic [3:0] {
    stclkinit, ststart, stwaitPLLlock, stwaitDCMlock, strst_if_fifo,
    stwait, stwrite, stclktransition, stread, st_w8_Rxcheck
  } state_t;
  state_t state;

  logic full_i, full_q, empty_i, empty_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= stclkinit;
    end else if (ce) begin
      case (state)
        stclkinit:       if (dcm100_locked)                state <= ststart;
        ststart:         if (pll_init_done)                state <= stwaitPLLlock;
        stwaitPLLlock:   if (pll_locked)                   state <= stwaitDCMlock;
        stwaitDCMlock:   if (dcm_i_locked && dcm_q_locked) state <= strst_if_fifo;
        strst_if_fifo:                                     state <= stwait;
        stwait:                                            state <= stwrite;
        stwrite:         if (full_i && full_q)             state <= stclktransition;
        stclktransition: if (!empty_i && !empty_q)         state <= stread;
        stread:          if (empty_i && empty_q)           state <= st_w8_Rxcheck;
        st_w8_Rxcheck:   if (rx_checkdone)                 state <= strst_if_fifo;
        default:                                           state <= stclkinit;
      endcase
    end
  end

  always_comb begin
    pllstart    = (state == stclkinit);
    pll_ce      = 1'b1;
    dclk_rst    = (state == stclkinit) || (state == ststart) || (state == stwaitPLLlock);
    rst_if_fifo = (state == strst_if_fifo);
    we_net      = (state == stwrite);
    rd_net      = (state == stread);
    state_o     = state;
  end

  // interface reset into each data-clock domain
  logic [1:0] irst_i, irst_q;
  always_ff @(posedge dclk_i) irst_i <= {irst_i[0], rst_if_fifo};
  always_ff @(posedge dclk_q) irst_q <= {irst_q[0], rst_if_fifo};

  logic [W-1:0] i1d, i1, i2d, i2, q1d, q1, q2d, q2;

  adc_data_interface #(.W(W)) u_if_i (
    .dclk(dclk_i), .rst(irst_i[1]), .d(adc_i_d), .dd(adc_i_dd),
    .d1d(i1d), .d1(i1), .d2d(i2d), .d2(i2));
  adc_data_interface #(.W(W)) u_if_q (
    .dclk(dclk_q), .rst(irst_q[1]), .d(adc_q_d), .dd(adc_q_dd),
    .d1d(q1d), .d1(q1), .d2d(q2d), .d2(q2));

  logic v_i, v_q;
  demux_fifo_sort #(.DEPTH(DEPTH), .W(W)) u_sort_i (
    .dclk(dclk_i), .dclk_div2(dclk_div2_i), .d1d(i1d), .d1(i1), .d2d(i2d), .d2(i2),
    .clk(clk), .ce(ce), .rst(rst_if_fifo || rst), .we(we_net), .rd(rd_net),
    .dout(i_out), .dout_valid(v_i), .all_full(full_i), .all_empty(empty_i));
  demux_fifo_sort #(.DEPTH(DEPTH), .W(W)) u_sort_q (
    .dclk(dclk_q), .dclk_div2(dclk_div2_q), .d1d(q1d), .d1(q1), .d2d(q2d), .d2(q2),
    .clk(clk), .ce(ce), .rst(rst_if_fifo || rst), .we(we_net), .rd(rd_net),
    .dout(q_out), .dout_valid(v_q), .all_full(full_q), .all_empty(empty_q));

  assign out_valid = v_i;

  // both channels capture and read the same number of words
  a_lockstep: assert property (@(posedge clk) disable iff (rst) v_i == v_q);
endmodule
