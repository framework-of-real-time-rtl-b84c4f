// qam_demod: 4-QAM decision and bit serialisation.
//
// Decision (from the source's constellation): the axis is chosen by the
// larger magnitude, |Q| > |I| gives first bit 1; the second bit is the sign
// of the dominant component: for I, 1 when I < 0 (00 = +I, 01 = -I); for Q,
// 1 when Q > 0 (11 = +Q, 10 = -Q). No amplitude normalisation is needed.
// Ties |I| = |Q| go to the I axis (this design's choice).
//
// Two decoders run side by side: one on (I, Q) and one on (I, -Q). The
// second gives the ninety-degree shift stage the constellation mirrored over
// the I axis without extra logic there.
//
// The symbol's two bits are sent one after the other, first bit first, so
// the bit rate is twice the symbol rate. bit_phase is 0 for the first bit
// and 1 for the second; it plays the role of the source's 50 MHz bit clock.
//
// Timing: sym_valid with i/q; the first bit leaves one clock later, the
// second BIT_GAP clocks after it. Symbols must be at least 2*BIT_GAP clocks
// apart.
module qam_demod
  import rx_pkg::*;
#(
  parameter int BIT_GAP = 4
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    sym_valid,
  input  sample_t i,
  input  sample_t q,
  output logic    bit_valid,
  output logic    bit_phase,
  output logic    iq_bit,
  output logic    inq_bit
);
  function automatic logic [1:0] decide(sample_t di, sample_t dq);
    logic [SW-1:0] mag_i, mag_q;
    mag_i = di[SW-1] ? SW'(-di) : SW'(di);
    mag_q = dq[SW-1] ? SW'(-dq) : SW'(dq);
    if (mag_q > mag_i) return {1'b1, (dq > 0)};
    else         return {1'b0, di[SW-1]};
  endfunction

  logic w_iq, w_inq;          // second bits, sent BIT_GAP clocks later
  logic [$clog2(BIT_GAP+1)-1:0] gap;
  logic pending;

  always_ff @(posedge clk) begin
    if (rst) begin
      w_iq <= 1'b0; w_inq <= 1'b0; gap <= '0; pending <= 1'b0;
      bit_valid <= 1'b0; bit_phase <= 1'b0; iq_bit <= 1'b0; inq_bit <= 1'b0;
    end else begin
      bit_valid <= 1'b0;
      if (sym_valid) begin
        logic [1:0] a, b;
        a = decide(i, q);
        b = decide(i, sample_t'(-q));
        w_iq      <= a[0];
        w_inq     <= b[0];
        iq_bit    <= a[1];
        inq_bit   <= b[1];
        bit_phase <= 1'b0;
        bit_valid <= 1'b1;
        pending   <= 1'b1;
        gap       <= '0;
      end else if (pending) begin
        if (int'(gap) == BIT_GAP - 1) begin
          iq_bit    <= w_iq;
          inq_bit   <= w_inq;
          bit_phase <= 1'b1;
          bit_valid <= 1'b1;
          pending   <= 1'b0;
        end
        gap <= gap + 1'b1;
      end
    end
  end
endmodule
