// tb_normalizer: random signed samples at random amplitudes (the maximum
// grows in steps, so the ratio is recomputed several times); checks every
// output against an arithmetic model (ratio = floor(2047 * 4096 / max), out =
// floor(x * ratio / 4096) saturated at +/-2047, 0 before a positive
// maximum), the two-clock latency, that the running maximum reaches 2047 and
// that a reset clears the maximum. Prints TB_RESULT.
module tb_normalizer;
  logic clk = 0, rst = 1, in_valid = 0;
  logic signed [11:0] din, dout;
  logic out_valid;
  int checks = 0, failures = 0;
  normalizer #(.W(12), .FULL_SCALE(2047)) dut (.*);
  always #2.5 clk = ~clk;
  initial begin #2ms; $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures + 1); $finish; end

  int mx, exp_q [$], tin [$], seen_full;
  always @(posedge clk) begin
    if (out_valid) begin
      int e;
      e = exp_q.pop_front();
      checks++;
      if (int'(dout) != e) begin failures++; if (failures < 8) $display("out %0d expected %0d", dout, e); end
      checks++;
      // din is driven after edge tin, sampled at tin+5, result registered at
      // tin+10 (second edge) and seen here at the following edge
      if ($time - tin.pop_front() != 3 * 5) begin failures++; $display("latency"); end
      if (dout >= 2040) seen_full++;
    end
  end

  task automatic send(int x);
    int e;
    if (x > mx) mx = x;
    if (mx > 0) begin
      longint r, p;
      r = (2047 * 4096) / mx;
      p = longint'(x) * r;
      e = int'(p >>> 12);
      if (e > 2047) e = 2047;
      if (e < -2047) e = -2047;
    end else e = 0;
    exp_q.push_back(e);
    @(posedge clk); in_valid <= 1; din <= 12'(x); tin.push_back($time);
    @(posedge clk); in_valid <= 0;
    repeat ($urandom % 3) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk); rst <= 0;
    for (int run = 0; run < 2; run++) begin
      int amp;
      mx = 0; seen_full = 0;
      send(-300);                              // before any positive maximum
      amp = 100;
      for (int n = 0; n < 3000; n++) begin
        if (n % 500 == 499) amp = amp * 2 > 2047 ? 2047 : amp * 2;
        send(int'($urandom % (2 * amp + 1)) - amp);
      end
      repeat (5) @(posedge clk);
      checks++; if (seen_full == 0) begin failures++; $display("maximum never scaled to full"); end
      rst <= 1; @(posedge clk); rst <= 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
