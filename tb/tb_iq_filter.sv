// tb_iq_filter: feeds random I and Q samples, one every 32 clocks, with
// random matched-filter (100 taps) and derivative (50 taps) coefficients.
// A model computes the matched-filter stream y (4 outputs per input) and
// the derivative stream d of y; every output must be i1 = y[n - 25] and
// ideriv1 = d[n] (likewise for Q), the pairing given by the 27-sample delay
// line and the pipeline, and outputs must come 4 per input (25 MHz from
// 6.25 MHz). Prints TB_RESULT.
module tb_iq_filter;
  import rx_pkg::*;
  logic clk = 0, rst = 1, in_valid = 0;
  sample_t i_in, q_in, i1, q1, ideriv1, qderiv1;
  coef_t mf_coef [100], df_coef [50];
  logic out_valid;
  int checks = 0, failures = 0;
  iq_filter dut (.*);
  always #2.5 clk = ~clk;
  initial begin #5ms; $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures + 1); $finish; end

  int xi [$], xq [$], yi [$], yq [$], di [$], dq [$];
  int nout = 0;

  function automatic int satq(longint acc);
    longint s;
    s = acc >>> 16;
    if (s > 2047) s = 2047;
    if (s < -2047) s = -2047;
    return int'(s);
  endfunction

  task automatic model_in(ref int x [$], ref int y [$], ref int d [$]);
    int m;
    m = x.size() - 1;
    for (int p = 0; p < 4; p++) begin
      longint acc;
      int n;
      acc = 0;
      for (int k = 0; k < 25; k++) if (m - k >= 0) acc += longint'(mf_coef[p + 4 * k]) * x[m - k];
      y.push_back(satq(acc));
      n = y.size() - 1;
      acc = 0;
      for (int k = 0; k < 50; k++) if (n - k >= 0) acc += longint'(df_coef[k]) * y[n - k];
      d.push_back(satq(acc));
    end
  endtask

  // the final output has no later input behind it and is not compared
  always @(posedge clk) if (out_valid && nout < 4 * 600 - 1) begin
    int ei, eq;
    ei = (nout >= 25) ? yi[nout - 25] : 0;
    eq = (nout >= 25) ? yq[nout - 25] : 0;
    checks++;
    if (int'(i1) != ei || int'(q1) != eq || int'(ideriv1) != di[nout] || int'(qderiv1) != dq[nout]) begin
      failures++;
      if (failures < 6) $display("out %0d: %0d %0d %0d %0d expected %0d %0d %0d %0d", nout,
                                 i1, q1, ideriv1, qderiv1, ei, eq, di[nout], dq[nout]);
    end
    nout++;
  end
  always @(posedge clk) if (out_valid && nout == 4 * 600 - 1) nout++;

  initial begin
    for (int k = 0; k < 100; k++) mf_coef[k] = coef_t'(int'($urandom % 30001) - 15000);
    for (int k = 0; k < 50; k++)  df_coef[k] = coef_t'(int'($urandom % 30001) - 15000);
    repeat (4) @(posedge clk); rst <= 0;
    for (int m = 0; m < 600; m++) begin
      xi.push_back(int'($urandom % 4095) - 2047);
      xq.push_back(int'($urandom % 4095) - 2047);
      model_in(xi, yi, di);
      model_in(xq, yq, dq);
      @(posedge clk); in_valid <= 1; i_in <= sample_t'(xi[m]); q_in <= sample_t'(xq[m]);
      @(posedge clk); in_valid <= 0;
      repeat (30) @(posedge clk);
    end
    repeat (60) @(posedge clk);
    checks++;
    if (nout != 4 * 600) begin failures++; $display("%0d outputs, expected %0d", nout, 4 * 600); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
