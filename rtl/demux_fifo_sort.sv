// demux_fifo_sort: stores one channel's ADC words and reads them back in
// time order at the 6.25 MHz sample rate.
//
// Write side (ADC clock domains): the four words of each data clock period
// (d1d, d1, d2d, d2) are registered on dclk (the source's data register) and
// written into eight DEPTH x 12 FIFOs: each line goes to two FIFOs, one
// written on the rising and one on the falling edge of the divide-by-2 data
// clock, so each FIFO runs at a quarter of the ADC word rate. The rising-edge
// FIFOs hold the even data-clock periods, the falling-edge FIFOs the odd ones.
// we and wrst come from the read-side controller and are synchronised into
// the dclk_div2 domain here. A falling-edge FIFO writes only half a period
// after its rising-edge partner wrote, so the pairs always hold consecutive
// data-clock periods, rising first.
//
// Read side (clk, advancing on the 6.25 MHz tick ce): while rd is high, one
// word per tick is read, cycling through rise-d1d, rise-d1, rise-d2d,
// rise-d2, fall-d1d, fall-d1, fall-d2d, fall-d2, which restores sample order
// (this order is this design's reading of the source's table). dout_valid
// marks the word one clock after the read. all_full (synchronised into clk)
// and all_empty are the AND of the eight flags.
//
// FIFO count, depth and the rising/falling split follow the source; the
// synchronisers and the read order are this design's choices.
//
// Timing: one word per ce tick while rd and the current FIFO is not empty.
// The capture holds 8 * DEPTH samples.
module demux_fifo_sort #(
  parameter int DEPTH = 1024,
  parameter int W     = 12
) (
  // ADC side
  input  logic         dclk,
  input  logic         dclk_div2,
  input  logic [W-1:0] d1d,
  input  logic [W-1:0] d1,
  input  logic [W-1:0] d2d,
  input  logic [W-1:0] d2,
  // read side
  input  logic         clk,
  input  logic         ce,
  input  logic         rst,          // FIFO reset, clk domain
  input  logic         we,           // write enable, clk domain
  input  logic         rd,
  output logic [W-1:0] dout,
  output logic         dout_valid,
  output logic         all_full,
  output logic         all_empty
);
  // data register
  logic [W-1:0] reg_w [4];
  always_ff @(posedge dclk) begin
    reg_w[0] <= d1d;
    reg_w[1] <= d1;
    reg_w[2] <= d2d;
    reg_w[3] <= d2;
  end

  // control into the write domain
  logic [1:0] we_s, rst_s;
  logic       we_fall;     // the rising-edge FIFOs wrote at the last rising edge
  always_ff @(posedge dclk_div2) begin
    we_s    <= {we_s[0], we};
    rst_s   <= {rst_s[0], rst};
    we_fall <= we_s[1];
  end

  logic         full_v [8];
  logic         empty_v [8];
  logic [W-1:0] q_v [8];
  logic [7:0]   re_v;

  for (genvar k = 0; k < 8; k++) begin : g_fifo
    // k < 4: rising edge of dclk_div2, k >= 4: falling edge
    wire wclk = (k < 4) ? dclk_div2 : ~dclk_div2;
    async_fifo #(.DEPTH(DEPTH), .W(W)) u_fifo (
      .wclk  (wclk),
      .wrst  (rst_s[1]),
      .we    ((k < 4) ? we_s[1] : we_fall),
      .din   (reg_w[k % 4]),
      .full  (full_v[k]),
      .rclk  (clk),
      .rrst  (rst),
      .re    (re_v[k]),
      .dout  (q_v[k]),
      .empty (empty_v[k])
    );
  end

  // flags
  logic       full_and, empty_and;
  always_comb begin
    full_and = 1'b1; empty_and = 1'b1;
    for (int k = 0; k < 8; k++) begin
      full_and  &= full_v[k];
      empty_and &= empty_v[k];
    end
  end

  logic [1:0] full_s;
  always_ff @(posedge clk) full_s <= {full_s[0], full_and};
  assign all_full  = full_s[1];
  assign all_empty = empty_and;

  // serial read-out
  logic [2:0] sel, sel_d;
  always_comb begin
    re_v = '0;
    if (ce && rd && !empty_v[sel]) re_v[sel] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sel <= '0; sel_d <= '0; dout_valid <= 1'b0;
    end else begin
      dout_valid <= |re_v;
      if (|re_v) begin
        sel_d <= sel;
        sel   <= sel + 1'b1;
      end
    end
  end

  assign dout = q_v[sel_d];
endmodule
