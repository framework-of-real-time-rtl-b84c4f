// ninety_degree_shift: resolves the 90/180/270-degree ambiguity left by the
// Viterbi-Viterbi phase recovery, using the Barker-11 preamble.
//
// The transmitted block carries Barker-11, a spare bit, the negated
// Barker-11 and another spare bit, starting on a symbol boundary. If the
// constellation is still rotated, the decoded bits of that preamble take one
// of three other forms. Three correlators (Filt1..3) compare the last 24
// received I/Q bits against the preamble as it would look after a rotation
// of -90, +90 and 180 degrees; the source's correlator FIRs with +/-1
// coefficients become agreement counts here. A trigger needs all 11 code bits
// and, 12 bits later, all 11 negated-code bits to agree (the source's "two
// magnitude-11 spikes 12 samples apart"). The first trigger is held in a flip-
// flop until reset.
//
// Correction (source's three-mux chain and its trigger table):
//   MUX1: I/Q stream or I/-Q stream        (mirror over the I axis)
//   MUX2: MUX1 output or every second bit inverted (180 degrees)
//   MUX3: MUX2 output or all bits inverted (mirror over the I=Q diagonal)
//   Filt1 -> MUX1, MUX3 (+90)   Filt2 -> MUX1, MUX2, MUX3 (-90)
//   Filt3 -> MUX2 (180)         none  -> straight through
// The source's schematic wires MUX3 to Filt1 only; the trigger table, which
// is followed here, also sets it for Filt2, which is what makes Filt2 a
// rotation. The correlator patterns are derived from the rotations (see
// rx_pkg::rotated_b11); the second, negated half is checked against its own
// rotated image, because for +/-90 degrees a rotated negated code is not the
// negation of the rotated code.
//
// The data lines are delayed by DELAY bits (24, the preamble length, this
// design's choice) so the preamble itself also leaves corrected.
//
// Timing: bit_valid/iq_bit/inq_bit/bit_phase in; dout_valid/dout/dout_phase
// one clock later, DELAY bits behind. trig_pulse marks the bit completing a
// preamble match.
module ninety_degree_shift
  import rx_pkg::*;
#(
  parameter int DELAY = 24
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       bit_valid,
  input  logic       iq_bit,
  input  logic       inq_bit,
  input  logic       bit_phase,
  output logic       dout_valid,
  output logic       dout,
  output logic       dout_phase,
  output logic [2:0] trig,          // latched Filt1..Filt3 triggers
  output logic [2:0] trig_pulse     // one-clock match pulses
);
  // received rotation (quarter turns counter-clockwise) detected by Filt1..3
  localparam int ROT [3] = '{3, 1, 2};

  logic [23:0] win;                 // win[0] = newest I/Q bit
  logic [DELAY-1:0] d_iq, d_inq, d_ph;

  // agreement counts of the two halves against each rotated pattern
  logic [2:0] match;
  always_comb begin
    for (int f = 0; f < 3; f++) begin
      logic [10:0] pa, pb;
      int ca, cb;
      pa = rotated_b11(ROT[f], 1'b0);
      pb = rotated_b11(ROT[f], 1'b1);
      ca = 0; cb = 0;
      for (int i = 0; i < 11; i++) begin
        ca += (win[23-i] == pa[i]) ? 1 : -1;
        cb += (win[11-i] == pb[i]) ? 1 : -1;
      end
      match[f] = (ca == 11) && (cb == 11);
    end
  end

  logic checking;   // window updated since the last evaluation
  always_ff @(posedge clk) begin
    if (rst) begin
      win <= '0; d_iq <= '0; d_inq <= '0; d_ph <= '0;
      trig <= '0; trig_pulse <= '0; checking <= 1'b0;
    end else begin
      checking   <= bit_valid;
      trig_pulse <= '0;
      if (bit_valid) begin
        win   <= {win[22:0], iq_bit};
        d_iq  <= {d_iq[DELAY-2:0], iq_bit};
        d_inq <= {d_inq[DELAY-2:0], inq_bit};
        d_ph  <= {d_ph[DELAY-2:0], bit_phase};
      end
      if (checking) begin
        trig_pulse <= match;
        if (trig == 3'b000) begin
          if (match[0])      trig <= 3'b001;
          else if (match[1]) trig <= 3'b010;
          else if (match[2]) trig <= 3'b100;
        end
      end
    end
  end

  // mux chain on the delayed data lines
  logic sel1, sel2, sel3;
  logic m1, flip, m2, m3;
  always_comb begin
    sel1 = trig[0] | trig[1];
    sel2 = trig[1] | trig[2];
    sel3 = trig[0] | trig[1];
    m1   = sel1 ? d_inq[DELAY-1] : d_iq[DELAY-1];
    flip = d_ph[DELAY-1] ? ~m1 : m1;
    m2   = sel2 ? flip : m1;
    m3   = sel3 ? ~m2 : m2;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      dout_valid <= 1'b0; dout <= 1'b0; dout_phase <= 1'b0;
    end else begin
      dout_valid <= bit_valid;
      if (bit_valid) begin
        dout       <= m3;
        dout_phase <= d_ph[DELAY-1];
      end
    end
  end

  a_one_trigger: assert property (@(posedge clk) disable iff (rst) $onehot0(trig));
endmodule
