// adc_data_interface: double-data-rate capture of one ADC channel.
//
// The channel delivers two 12-bit buses (DEMUX value 0 = d, DEMUX value 1 =
// dd), each changing on both edges of the data clock dclk. Every bit is
// captured once on the rising and once on the falling edge; the falling-edge
// captures are re-registered on the next rising edge so that all four words
// of one dclk period leave together on the rising edge (the same-edge,
// pipelined form of an input DDR register). Output names follow the source's
// signal table:
//   d1d: rising edge, DEMUX 1    d1: rising edge, DEMUX 0
//   d2d: falling edge, DEMUX 1   d2: falling edge, DEMUX 0
// The differential-to-single-ended input buffers are outside this module.
// Taking d1d, d1, d2d, d2 as the time order of the samples is this design's
// reading of the table order.
//
// Timing: the four outputs change on rising dclk edges, two edges after the
// rising-edge sample was taken. rst (synchronous to dclk) clears the
// registers; the source resets them at each start of a write.
module adc_data_interface #(
  parameter int W = 12
) (
  input  logic         dclk,
  input  logic         rst,
  input  logic [W-1:0] d,
  input  logic [W-1:0] dd,
  output logic [W-1:0] d1d,
  output logic [W-1:0] d1,
  output logic [W-1:0] d2d,
  output logic [W-1:0] d2
);
  logic [W-1:0] r_d, r_dd;      // rising-edge captures
  logic [W-1:0] f_d, f_dd;      // falling-edge captures

  always_ff @(posedge dclk) begin
    if (rst) begin
      r_d <= '0; r_dd <= '0;
    end else begin
      r_d <= d; r_dd <= dd;
    end
  end

  always_ff @(negedge dclk) begin
    if (rst) begin
      f_d <= '0; f_dd <= '0;
    end else begin
      f_d <= d; f_dd <= dd;
    end
  end

  always_ff @(posedge dclk) begin
    if (rst) begin
      d1d <= '0; d1 <= '0; d2d <= '0; d2 <= '0;
    end else begin
      d1d <= r_dd; d1 <= r_d;
      d2d <= f_dd; d2 <= f_d;
    end
  end
endmodule
