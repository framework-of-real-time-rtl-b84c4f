// async_fifo: dual-clock FIFO, DEPTH x W, used to carry the ADC words from
// the ADC clock domain to the 6.25 MHz read clock.
//
// Binary pointers one bit wider than the address, converted to Gray code and
// passed through two-flip-flop synchronisers into the other domain. full is
// computed in the write domain, empty in the read domain; both are
// pessimistic (they clear a few clocks late), never optimistic. DEPTH must be
// a power of two. Depth and width follow the source (1024 x 12); the
// structure is the usual Gray-pointer FIFO, this design's choice.
//
// Timing: write when we and not full on a wclk rising edge; read when re and
// not empty, dout is valid after that rclk rising edge. Each reset is
// synchronous to its own clock and both must be applied together.
module async_fifo #(
  parameter int DEPTH = 1024,
  parameter int W     = 12
) (
  input  logic         wclk,
  input  logic         wrst,
  input  logic         we,
  input  logic [W-1:0] din,
  output logic         full,
  input  logic         rclk,
  input  logic         rrst,
  input  logic         re,
  output logic [W-1:0] dout,
  output logic         empty
);
  localparam int AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wbin, rbin, wgray, rgray;
  logic [AW:0]  rgray_w1, rgray_w2;   // read pointer in the write domain
  logic [AW:0]  wgray_r1, wgray_r2;   // write pointer in the read domain

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  wire do_wr = we && !full;
  wire do_rd = re && !empty;

  // write domain
  always_ff @(posedge wclk) begin
    if (do_wr) mem[wbin[AW-1:0]] <= din;
  end

  logic [AW:0] wbin_next;
  assign wbin_next = wbin + (AW+1)'(do_wr);

  always_ff @(posedge wclk) begin
    if (wrst) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0; full <= 1'b0;
    end else begin
      wbin     <= wbin_next;
      wgray    <= bin2gray(wbin_next);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      full     <= bin2gray(wbin_next) == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]};
    end
  end

  // read domain
  logic [AW:0] rbin_next;
  assign rbin_next = rbin + (AW+1)'(do_rd);

  always_ff @(posedge rclk) begin
    if (rrst) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0; empty <= 1'b1;
      dout <= '0;
    end else begin
      if (do_rd) dout <= mem[rbin[AW-1:0]];
      rbin     <= rbin_next;
      rgray    <= bin2gray(rbin_next);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      empty    <= bin2gray(rbin_next) == wgray_r2;
    end
  end
endmodule
