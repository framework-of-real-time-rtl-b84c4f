// sync_fifo: single-clock FIFO, used between the symbol timing recovery and
// the QAM decoder to hold one capture's worth of symbols.
//
// A memory array with binary read and write pointers and an occupancy
// count. DEPTH need not be a power of two. Write when wr_en and not full;
// read when rd_en and not empty, dout is valid the clock after the read.
// full and empty are registered-state flags (no combinational path from
// wr_en/rd_en). Depth, width and flag behaviour are this design's choices.
module sync_fifo #(
  parameter int DEPTH = 3072,
  parameter int W     = 12
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         wr_en,
  input  logic [W-1:0] din,
  input  logic         rd_en,
  output logic [W-1:0] dout,
  output logic         full,
  output logic         empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;

  wire do_wr = wr_en && !full;
  wire do_rd = rd_en && !empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
      dout  <= '0;
    end else begin
      if (do_wr) wp <= (int'(wp) == DEPTH - 1) ? '0 : wp + 1'b1;
      if (do_rd) begin
        dout <= mem[rp];
        rp   <= (int'(rp) == DEPTH - 1) ? '0 : rp + 1'b1;
      end
      if (do_wr && !do_rd)      count <= count + 1'b1;
      else if (do_rd && !do_wr) count <= count - 1'b1;
    end
  end

  assign full  = (int'(count) == DEPTH);
  assign empty = (count == 0);
endmodule
