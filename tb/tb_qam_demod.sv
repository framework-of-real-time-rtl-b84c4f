// tb_qam_demod: random I/Q symbols near the four constellation points (and
// random points anywhere); checks both decoded bit pairs against the
// constellation map (00 = +I, 01 = -I, 11 = +Q, 10 = -Q), the I/-Q decoder,
// the bit order and that the second bit follows the first by BIT_GAP = 4
// clocks (50 MHz bits on a 200 MHz clock). Prints TB_RESULT.
module tb_qam_demod;
  import rx_pkg::*;
  logic clk = 0, rst = 1, sym_valid = 0;
  sample_t i, q;
  logic bit_valid, bit_phase, iq_bit, inq_bit;
  int checks = 0, failures = 0;
  qam_demod #(.BIT_GAP(4)) dut (.*);
  always #2.5 clk = ~clk;
  initial begin #1ms; $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures + 1); $finish; end

  function automatic logic [1:0] ref_bits(int x, int y);
    int ax = x < 0 ? -x : x, ay = y < 0 ? -y : y;
    if (ay > ax) return y > 0 ? 2'b11 : 2'b10;
    return x < 0 ? 2'b01 : 2'b00;
  endfunction

  initial begin
    repeat (3) @(posedge clk); rst <= 0;
    for (int n = 0; n < 2000; n++) begin
      int x, y, t0;
      logic [1:0] e, en;
      if (n % 2 == 0) begin
        int pt;
        pt = $urandom % 4;
        x = (pt == 0) ? 1500 : (pt == 1) ? -1500 : 0;
        y = (pt == 2) ? 1500 : (pt == 3) ? -1500 : 0;
        x += int'($urandom % 601) - 300; y += int'($urandom % 601) - 300;
      end else begin
        x = int'($urandom % 4095) - 2047; y = int'($urandom % 4095) - 2047;
      end
      e = ref_bits(x, y); en = ref_bits(x, -y);
      @(posedge clk); sym_valid <= 1; i <= sample_t'(x); q <= sample_t'(y);
      @(posedge clk); sym_valid <= 0; t0 = $time;
      #1;
      checks++;
      if (!bit_valid || bit_phase || iq_bit !== e[1] || inq_bit !== en[1]) begin
        failures++; if (failures < 5) $display("(%0d,%0d) first bit %b/%b expected %b/%b", x, y, iq_bit, inq_bit, e[1], en[1]);
      end
      do begin @(posedge clk); #1; end while (!bit_valid);
      checks++;
      if (($time - 1 - t0) / 5 != 4) begin failures++; $display("gap %0d clocks", ($time - 1 - t0) / 5); end
      checks++;
      if (!bit_phase || iq_bit !== e[0] || inq_bit !== en[0]) begin
        failures++; if (failures < 5) $display("(%0d,%0d) second bit %b/%b expected %b/%b", x, y, iq_bit, inq_bit, e[0], en[0]);
      end
      repeat ($urandom % 4) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
