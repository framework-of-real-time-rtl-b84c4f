// tb_demux_fifo_sort: drives the four ADC words of each 400 MHz data-clock
// period with consecutive sample numbers (d1d, d1, d2d, d2 = 4p .. 4p+3),
// writes until all eight FIFOs report full, then reads at one word per
// 6.25 MHz tick (every 32 clocks of 200 MHz) until all are empty. The read
// stream must be 8 * 1024 consecutive sample numbers, one word per tick.
// Prints TB_RESULT.
module tb_demux_fifo_sort;
  localparam int DEPTH = 1024;
  logic dclk = 0, dclk_div2 = 0, clk = 0, ce = 0, rst = 1, we = 0, rd = 0;
  logic [11:0] d1d, d1, d2d, d2, dout;
  logic dout_valid, all_full, all_empty;
  int checks = 0, failures = 0;
  demux_fifo_sort #(.DEPTH(DEPTH), .W(12)) dut (.*);
  initial begin #10ms; $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures + 1); $finish; end

  // 400 MHz data clock and its half, rising edges aligned
  always begin #1.25 dclk = 1; dclk_div2 = ~dclk_div2; #1.25 dclk = 0; end
  always #2.5 clk = ~clk;      // 200 MHz, its own phase
  int cnt = 0;
  always @(posedge clk) begin cnt <= (cnt + 1) % 32; ce <= (cnt == 31); end

  int p = 0;
  always @(posedge dclk) begin
    d1d <= 12'(4 * p); d1 <= 12'(4 * p + 1); d2d <= 12'(4 * p + 2); d2 <= 12'(4 * p + 3);
    p <= p + 1;
  end

  int nread = 0, prev = -1, bad_seq = 0, bad_rate = 0;
  longint last_t = -1;
  always @(posedge clk) if (dout_valid && !rst) begin
    if (prev >= 0 && int'(dout) != (prev + 1) % 4096) bad_seq++;
    if (last_t >= 0 && $time - last_t != 32 * 5) bad_rate++;
    prev = int'(dout); last_t = longint'($time); nread++;
  end

  initial begin
    repeat (40) @(posedge clk); rst <= 0;
    repeat (10) @(posedge clk);
    we <= 1;
    wait (all_full);
    @(posedge clk); we <= 0;
    checks++; if (all_empty) begin failures++; $display("empty while full"); end
    repeat (10) @(posedge clk);
    rd <= 1;
    wait (all_empty);
    repeat (40) @(posedge clk);
    rd <= 0;
    checks++; if (nread != 8 * DEPTH) begin failures++; $display("%0d words read, expected %0d", nread, 8 * DEPTH); end
    checks++; if (bad_seq != 0) begin failures++; $display("%0d words out of order", bad_seq); end
    checks++; if (bad_rate != 0) begin failures++; $display("%0d words not one tick apart", bad_rate); end
    checks += nread;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
