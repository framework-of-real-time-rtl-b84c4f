// tdm_fir: time-multiplexed ("overclocked") FIR filter with optional
// L-fold interpolation.
//
// The source design cannot afford one multiplier per tap, so its filters run
// at a clock many times the sample rate and reuse a few multipliers. This
// module does the same: for every input sample it produces L outputs, one
// every OUT_CYCLES clocks, and each output is accumulated over
// ceil((TAPS/L)/MACS) cycles with MACS multipliers.
//
// Interpolation is polyphase: y[L*m+p] = sum_k h[p+L*k] * x[m-k], which is
// the zero-stuffed upsample-then-filter of the source. With L = 1 it is a
// plain FIR. Coefficients are 18-bit Q2.16 (a port, since they come from a
// filter design tool and depend on channel spacing); the accumulator is
// shifted right by 16 and saturated to the output width.
//
// Timing: an input accepted in cycle t gives outputs after t+OUT_CYCLES,
// t+2*OUT_CYCLES, ... t+L*OUT_CYCLES (out_valid pulses one cycle each). A new
// input may arrive at the earliest in the cycle the last output is produced;
// inputs are expected every L*OUT_CYCLES clocks or slower.
module tdm_fir #(
  parameter int TAPS       = 100,
  parameter int L          = 4,
  parameter int MACS       = 4,
  parameter int OUT_CYCLES = 8,
  parameter int DW         = 12,
  parameter int CW         = 18,
  parameter int CFRAC      = 16
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic signed [CW-1:0] coef [TAPS],
  input  logic                 in_valid,
  input  logic signed [DW-1:0] din,
  output logic                 out_valid,
  output logic signed [DW-1:0] dout
);
  localparam int P    = TAPS / L;                  // taps per phase
  localparam int NCYC = (P + MACS - 1) / MACS;     // busy cycles per output
  localparam int AW   = DW + CW + $clog2(P + 1) + 1;
  localparam int PW   = $clog2(L + 1);
  localparam int YW   = $clog2(OUT_CYCLES + 1);
  localparam logic signed [AW-1:0] MAXV = AW'((1 <<< (DW - 1)) - 1);
  localparam logic signed [AW-1:0] MINV = -MAXV;

  logic signed [DW-1:0] hist [P];
  logic                 busy;
  logic [PW-1:0]        phase;
  logic [YW-1:0]        cyc;
  logic signed [AW-1:0] acc, acc_next, part, shifted;

  wire last_cyc = busy && (int'(cyc) == OUT_CYCLES - 1);
  wire finish   = last_cyc && (int'(phase) == L - 1);
  wire start    = in_valid && (!busy || finish);

  // MACS products for the current phase and cycle
  always_comb begin
    part = '0;
    for (int m = 0; m < MACS; m++) begin
      int k;
      k = int'(cyc) * MACS + m;
      if (k < P && int'(cyc) < NCYC)
        part += AW'(hist[k]) * AW'(coef[int'(phase) + L * k]);
    end
    acc_next = acc + part;
    shifted  = acc_next >>> CFRAC;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < P; k++) hist[k] <= '0;
      busy      <= 1'b0;
      phase     <= '0;
      cyc       <= '0;
      acc       <= '0;
      out_valid <= 1'b0;
      dout      <= '0;
    end else begin
      out_valid <= 1'b0;
      if (busy) begin
        if (last_cyc) begin
          acc       <= '0;
          cyc       <= '0;
          out_valid <= 1'b1;
          if (shifted > MAXV)      dout <= DW'(MAXV);
          else if (shifted < MINV) dout <= DW'(MINV);
          else                     dout <= DW'(shifted);
          if (int'(phase) == L - 1) begin
            busy  <= 1'b0;
            phase <= '0;
          end else begin
            phase <= phase + 1'b1;
          end
        end else begin
          acc <= acc_next;
          cyc <= cyc + 1'b1;
        end
      end
      if (start) begin
        hist[0] <= din;
        for (int k = 1; k < P; k++) hist[k] <= hist[k-1];
        busy  <= 1'b1;
        phase <= '0;
        cyc   <= '0;
        acc   <= '0;
      end
    end
  end

  // An input that arrives while an earlier one is still being filtered is lost.
  a_no_overrun: assert property (@(posedge clk) disable iff (rst) in_valid |-> (!busy || finish))
    else $error("tdm_fir: input arrived while busy");
endmodule
