// receiver_final: the receiver's DSP chain, its two symbol FIFOs and the
// small state machine that decides when a capture has been checked.
//
// Chain: normalizer (per channel) -> iq_filter (matched filter, 4x
// interpolation, derivative) -> phase_recovery (Viterbi-Viterbi) ->
// qam_pll (symbol timing) -> two FIFOs (I and Q symbols) -> qam_demod ->
// ninety_degree_shift -> barker_data_checker. Everything runs on one clock
// (200 MHz in the source's overclocked filter domain) with valid strobes:
// one input sample per 6.25 MHz tick, interpolated samples every 8 clocks,
// FIFO reads every SYM_CLKS = 8 clocks (25 MHz symbols, 50 MHz bits).
//
// State machine (moves on the 6.25 MHz tick ce, as in the source):
//   stRst    -> stWrFIFO  tick
//   stWrFIFO -> stRdFIFO  both FIFOs full
//   stRdFIFO -> stDoneRd  both FIFOs empty
//   stDoneRd -> stRst     next tick
// rst (the DataSort reset, held one clock longer by the caller) returns it
// to stRst from any state and clears the chain. FIFOs are written with the
// timing recovery's symbols in stWrFIFO and read in stRdFIFO.
// checkdonewrong is high in stDoneRd (the FIFOs emptied without a finished
// check); checkdoneright is the checker's done pulse; checkdone is their OR.
// The FIFO depth (3072 symbols, enough to hold more than one 1024-symbol
// block wherever it starts) is this design's choice; the source does not
// give it.
module receiver_final
  import rx_pkg::*;
#(
  parameter int MF_TAPS       = 100,
  parameter int DF_TAPS       = 50,
  parameter int RX_FIFO_DEPTH = 3072,
  parameter int SYM_CLKS      = 8
) (
  input  logic               clk,
  input  logic               ce,
  input  logic               rst,
  input  coef_t              mf_coef [MF_TAPS],
  input  coef_t              df_coef [DF_TAPS],
  input  logic signed [31:0] k1,
  input  logic signed [31:0] k2,
  input  logic               in_valid,
  input  sample_t            i_in,
  input  sample_t            q_in,
  output logic [11:0]        errorcount,
  output logic [11:0]        errorcount_last,
  output logic               checkdone,
  output logic               checkdoneright,
  output logic               checkdonewrong,
  // observation
  output logic [1:0]         state_o,
  output logic               trig_sample,
  output logic [2:0]         shift_trig,
  output logic               barker_trig_i,
  output logic               barker_trig_q,
  output logic [2:0]         shift_pulse,
  output logic               shift_phase,
  output logic               fifo_full,
  output logic               fifo_empty,
  output logic [$clog2(RX_FIFO_DEPTH+1)-1:0] fifo_count,
  output logic [11:0]        check_index,
  output logic signed [31:0] loop_v
);
  typedef enum logic [1:0] {stRst, stWrFIFO, stRdFIFO, stDoneRd} state_t;
  state_t state;

  // ---- DSP chain up to the symbol FIFOs ------------------------------------
  logic    nv_i, nv_q;
  sample_t ni, nq;
  normalizer #(.W(SW), .FULL_SCALE(FULL)) u_norm_i (
    .clk, .rst, .in_valid, .din(i_in), .out_valid(nv_i), .dout(ni));
  normalizer #(.W(SW), .FULL_SCALE(FULL)) u_norm_q (
    .clk, .rst, .in_valid, .din(q_in), .out_valid(nv_q), .dout(nq));

  logic    f_v;
  sample_t i1, q1, id1, qd1;
  iq_filter #(.MF_TAPS(MF_TAPS), .DF_TAPS(DF_TAPS)) u_iq_filter (
    .clk, .rst, .mf_coef, .df_coef, .in_valid(nv_i), .i_in(ni), .q_in(nq),
    .out_valid(f_v), .i1, .q1, .ideriv1(id1), .qderiv1(qd1));

  logic    p_v;
  sample_t i2, q2, id2, qd2;
  phase_recovery u_phase_recovery (
    .clk, .rst, .in_valid(f_v), .i1, .q1, .id1, .qd1,
    .out_valid(p_v), .i2, .q2, .id2, .qd2);

  sample_t i3, q3;
  qam_pll u_qam_pll (
    .clk, .rst, .k1, .k2, .in_valid(p_v), .i2, .q2, .id2, .qd2,
    .trig_sample, .i3, .q3, .loop_v);

  // ---- symbol FIFOs ----------------------------------------------------------
  logic    wr_en, rd_en, full_i, full_q, empty_i, empty_q;
  sample_t fi, fq;
  logic [$clog2(RX_FIFO_DEPTH+1)-1:0] cnt_q;

  assign wr_en = (state == stWrFIFO) && trig_sample;

  sync_fifo #(.DEPTH(RX_FIFO_DEPTH), .W(SW)) u_fifo_i (
    .clk, .rst, .wr_en, .din(i3), .rd_en, .dout(fi), .full(full_i), .empty(empty_i), .count(fifo_count));
  sync_fifo #(.DEPTH(RX_FIFO_DEPTH), .W(SW)) u_fifo_q (
    .clk, .rst, .wr_en, .din(q3), .rd_en, .dout(fq), .full(full_q), .empty(empty_q), .count(cnt_q));

  assign fifo_full  = full_i && full_q;
  assign fifo_empty = empty_i && empty_q;

  // read pacing: one symbol every SYM_CLKS clocks in stRdFIFO
  logic [$clog2(SYM_CLKS)-1:0] pace;
  logic sym_valid;
  assign rd_en = (state == stRdFIFO) && (pace == 0) && !empty_i;

  always_ff @(posedge clk) begin
    if (rst) begin
      pace <= '0; sym_valid <= 1'b0;
    end else begin
      sym_valid <= rd_en;
      pace      <= (state == stRdFIFO) ? pace + 1'b1 : '0;
    end
  end

  // ---- binary section --------------------------------------------------------
  logic b_v, b_ph, b_iq, b_inq;
  qam_demod u_qam_demod (
    .clk, .rst, .sym_valid, .i(fi), .q(fq),
    .bit_valid(b_v), .bit_phase(b_ph), .iq_bit(b_iq), .inq_bit(b_inq));

  logic s_v, s_d;
  ninety_degree_shift u_ninety (
    .clk, .rst, .bit_valid(b_v), .iq_bit(b_iq), .inq_bit(b_inq), .bit_phase(b_ph),
    .dout_valid(s_v), .dout(s_d), .dout_phase(shift_phase), .trig(shift_trig), .trig_pulse(shift_pulse));

  barker_data_checker u_checker (
    .clk, .rst, .bit_valid(s_v), .din(s_d),
    .trig_i(barker_trig_i), .trig_q(barker_trig_q), .done(checkdoneright),
    .error_count(errorcount), .error_last(errorcount_last), .rom_index(check_index));

  // ---- state machine ---------------------------------------------------------
  always_ff @(posedge clk) begin
    if (rst) begin
      state <= stRst;
    end else if (ce) begin
      case (state)
        stRst:    state <= stWrFIFO;
        stWrFIFO: if (full_i && full_q)   state <= stRdFIFO;
        stRdFIFO: if (empty_i && empty_q) state <= stDoneRd;
        default:  state <= stRst;        // stDoneRd
      endcase
    end
  end

  assign checkdonewrong = (state == stDoneRd);
  assign checkdone      = checkdoneright || checkdonewrong;
  assign state_o        = state;

  // the two channels share one timing, and the two FIFOs move together
  a_norm_lockstep: assert property (@(posedge clk) disable iff (rst) nv_i == nv_q);
  a_fifo_lockstep: assert property (@(posedge clk) disable iff (rst) fifo_count == cnt_q);
endmodule
