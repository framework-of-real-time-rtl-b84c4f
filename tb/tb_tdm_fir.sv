// tb_tdm_fir: two instances, the 100-tap 4x interpolating matched-filter
// configuration (4 multipliers) and the 50-tap plain derivative
// configuration (7 multipliers), each fed one random sample every 32 clocks
// with random coefficients. Every output is compared with a direct
// polyphase convolution (y[4m+p] = sum h[p+4k] x[m-k], >>> 16, saturated)
// and its cycle is checked: outputs 8, 16, 24, 32 clocks after the input
// (25 MHz interpolated rate from 6.25 MHz input on a 200 MHz clock). Prints
// TB_RESULT.
module tb_tdm_fir;
  logic clk = 0, rst = 1, in_valid = 0;
  logic signed [11:0] din;
  logic signed [17:0] coef_a [100], coef_b [50];
  logic va, vb;
  logic signed [11:0] ya, yb;
  int checks = 0, failures = 0;
  tdm_fir #(.TAPS(100), .L(4), .MACS(4), .OUT_CYCLES(8)) dut_a (
    .clk, .rst, .coef(coef_a), .in_valid, .din, .out_valid(va), .dout(ya));
  tdm_fir #(.TAPS(50), .L(1), .MACS(7), .OUT_CYCLES(8)) dut_b (
    .clk, .rst, .coef(coef_b), .in_valid, .din, .out_valid(vb), .dout(yb));
  always #2.5 clk = ~clk;
  initial begin #5ms; $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures + 1); $finish; end

  int xs [$];            // input history, newest last
  int exp_a [$], exp_b [$];
  longint t_exp [$];

  function automatic int satq(longint acc);
    longint s = acc >>> 16;
    if (s > 2047) s = 2047;
    if (s < -2047) s = -2047;
    return int'(s);
  endfunction

  always @(posedge clk) begin
    if (va && !rst) begin
      int e;
      e = exp_a.pop_front();
      checks++;
      if (int'(ya) != e) begin failures++; if (failures < 6 || checks < 40) $display("A out %0d expected %0d", ya, e); end
      checks++;
      // output k (1..4) of an input driven at t_in (sampled at t_in+5) is
      // registered 8*k clocks after the sampling edge, seen one edge later
      begin
        longint te;
        te = t_exp.pop_front();
        if ($time != te) begin failures++; if (failures < 6) $display("A output at %0t expected %0t", $time, te); end
      end
    end
    if (vb && !rst) begin
      int e;
      e = exp_b.pop_front();
      checks++;
      if (int'(yb) != e) begin failures++; if (failures < 6) $display("B out %0d expected %0d", yb, e); end
    end
  end

  initial begin
    for (int k = 0; k < 100; k++) coef_a[k] = 18'(int'($urandom % 40001) - 20000);
    for (int k = 0; k < 50; k++)  coef_b[k] = 18'(int'($urandom % 60001) - 30000);
    coef_a[0] = 18'sd131071;       // one large tap so saturation happens
    repeat (4) @(posedge clk); rst <= 0;
    for (int m = 0; m < 1500; m++) begin
      int x;
      x = (m % 300 < 20) ? 2047 : int'($urandom % 4095) - 2047;
      xs.push_back(x);
      for (int p = 0; p < 4; p++) begin
        longint acc; acc = 0;
        for (int k = 0; k < 25; k++)
          if (m - k >= 0) acc += longint'(coef_a[p + 4 * k]) * xs[m - k];
        exp_a.push_back(satq(acc));
      end
      begin
        longint acc; acc = 0;
        for (int k = 0; k < 50; k++)
          if (m - k >= 0) acc += longint'(coef_b[k]) * xs[m - k];
        exp_b.push_back(satq(acc));
      end
      @(posedge clk); in_valid <= 1; din <= 12'(x);
      // sampled at the next edge; output k (1..4) registered 8*k edges
      // after that and seen by the monitor one edge later
      for (int k = 1; k <= 4; k++) t_exp.push_back($time + 5 + 8 * 5 * k + 5);
      @(posedge clk); in_valid <= 0;
      repeat (30) @(posedge clk);
    end
    repeat (40) @(posedge clk);
    checks++; if (exp_a.size() != 0 || exp_b.size() != 0) begin failures++; $display("missing outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
