// tb_qam_pll: checks the symbol timing loop.
//  1. Loop gains zero: over 9562 input samples the modulo-1 counter must
//     give 1000 +/- 1 strobes (nominal 9.5621 samples per symbol), spaced 9
//     or 10 samples; each strobe comes one clock after its input and i3/q3
//     hold that input's I/Q.
//  2. Proportional gain only (k1 < 0): a constant positive timing error
//     (derivative in phase with the sample sign) must lengthen the symbol
//     period and a negative one shorten it, with the loop output equal to
//     (k1 * e) >>> 11.
//  3. Integral gain only: with a constant error the loop output must grow
//     in magnitude strobe after strobe.
// Inputs come every 8 clocks (25 MHz on 200 MHz). Prints TB_RESULT.
module tb_qam_pll;
  import rx_pkg::*;
  logic clk = 0, rst = 1, in_valid = 0, trig_sample;
  logic signed [31:0] k1 = 0, k2 = 0, loop_v;
  sample_t i2, q2, id2, qd2, i3, q3;
  int checks = 0, failures = 0;
  qam_pll dut (.*);
  always #2.5 clk = ~clk;
  initial begin #20ms; $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures + 1); $finish; end

  // sends n samples; mode 0 random, +1 constant positive error, -1 negative;
  // returns the number of strobes
  task automatic run(int n, int mode, output int strobes, output int bad_gap, output int bad_data);
    int last = -1;
    strobes = 0; bad_gap = 0; bad_data = 0;
    for (int s = 0; s < n; s++) begin
      sample_t a, b, da, db;
      a = sample_t'(int'($urandom % 4095) - 2047); b = sample_t'(int'($urandom % 4095) - 2047);
      if (mode == 0) begin da = sample_t'(int'($urandom % 4095) - 2047); db = sample_t'(int'($urandom % 4095) - 2047); end
      else begin
        // error = sign(a)*da + sign(b)*db = 2 * 200 * mode
        da = (a < 0) ? sample_t'(-200 * mode) : sample_t'(200 * mode);
        db = (b < 0) ? sample_t'(-200 * mode) : sample_t'(200 * mode);
      end
      @(posedge clk); in_valid <= 1; i2 <= a; q2 <= b; id2 <= da; qd2 <= db;
      @(posedge clk); in_valid <= 0;
      #1;
      if (trig_sample) begin
        strobes++;
        if (i3 !== a || q3 !== b) bad_data++;
        if (last >= 0 && (s - last < 9 || s - last > 10) && mode == 0) bad_gap++;
        last = s;
      end
      repeat (6) @(posedge clk);
    end
  endtask

  initial begin
    int st, bg, bd, st_pos, st_neg;
    repeat (3) @(posedge clk); rst <= 0;
    // 1
    run(9562, 0, st, bg, bd);
    checks++; if (st < 999 || st > 1001) begin failures++; $display("free run: %0d strobes", st); end
    checks++; if (bg != 0) begin failures++; $display("%0d bad strobe gaps", bg); end
    checks++; if (bd != 0) begin failures++; $display("%0d strobes with wrong data", bd); end
    // 2
    k1 = -2000000; k2 = 0;
    rst <= 1; @(posedge clk); rst <= 0;
    run(3000, 1, st_pos, bg, bd);
    checks++; if (loop_v != ((-2000000 * 400) >>> 11)) begin failures++; $display("loop_v %0d expected %0d", loop_v, (-2000000 * 400) >>> 11); end
    rst <= 1; @(posedge clk); rst <= 0;
    run(3000, -1, st_neg, bg, bd);
    $display("strobes per 3000 samples: nominal %0d, positive error %0d, negative error %0d", 3000 * 1000 / 9562, st_pos, st_neg);
    checks++; if (!(st_pos < 3000 * 1000 / 9562 - 10)) begin failures++; $display("positive error did not slow the strobes"); end
    checks++; if (!(st_neg > 3000 * 1000 / 9562 + 10)) begin failures++; $display("negative error did not speed up the strobes"); end
    // 3
    k1 = 0; k2 = -20;
    rst <= 1; @(posedge clk); rst <= 0;
    begin
      int prev, grow;
      prev = 0; grow = 0;
      for (int b = 0; b < 20; b++) begin
        run(10, 1, st, bg, bd);
        if (loop_v < prev) grow++;
        prev = loop_v;
      end
      checks++; if (grow < 15) begin failures++; $display("integrator output did not grow (%0d of 20)", grow); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
