// normalizer: scales a sample stream so that its largest sample becomes
// full scale (2047).
//
// A register holds the largest sample seen since reset; it loads whenever a
// new sample is greater (signed compare). The first load sets a flag that
// enables the divider, which forms the ratio 2047/max with 12 fraction bits.
// Each sample is multiplied by that ratio and shifted back right by 12 bits.
// This is the structure of the source's normalizer model (delay, register,
// relational block, divider, multiplier, shift). The divider is written as a
// combinational divide registered once per sample, and the output saturates
// at +/-2047, since a negative sample may exceed the positive maximum; both
// are choices of this design. Before any positive sample the output is 0.
//
// Interface: in_valid/din in, out_valid/dout out, two cycles later. The
// ratio applied to a sample includes that sample's own update of the maximum.
module normalizer
#(
  parameter int W    = 12,
  parameter int FULL_SCALE = 2047
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  logic signed [W-1:0] din,
  output logic                out_valid,
  output logic signed [W-1:0] dout
);
  localparam int QW = W + 12;   // ratio width: 2047*2^12 / 1 needs W+12 bits

  logic signed [W-1:0] maxreg, d1;
  logic                en_div, v1;
  logic [QW-1:0]       ratio;

  // stage 1: track the maximum and delay the sample
  always_ff @(posedge clk) begin
    if (rst) begin
      maxreg <= '0;
      en_div <= 1'b0;
      d1     <= '0;
      v1     <= 1'b0;
    end else begin
      v1 <= in_valid;
      if (in_valid) begin
        d1 <= din;
        if (din > maxreg) begin
          maxreg <= din;
          en_div <= 1'b1;
        end
      end
    end
  end

  // divider: (2047 << 12) / max, valid once a positive maximum exists
  logic [QW-1:0] quot;
  always_comb begin
    quot = '0;
    if (en_div && maxreg > 0)
      quot = QW'((FULL_SCALE * 4096) / int'(maxreg));
  end
  assign ratio = quot;

  // stage 2: multiply, shift back, saturate
  logic signed [W+QW:0] prod;
  logic signed [W+QW:0] scaled;
  localparam logic signed [W+QW:0] LIM = (W+QW+1)'(FULL_SCALE);
  always_comb begin
    prod   = d1 * $signed({1'b0, ratio});
    scaled = prod >>> 12;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      dout      <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= v1;
      if (v1) begin
        if (scaled > LIM)       dout <= W'(FULL_SCALE);
        else if (scaled < -LIM) dout <= W'(-FULL_SCALE);
        else                           dout <= W'(scaled);
      end
    end
  end
endmodule
