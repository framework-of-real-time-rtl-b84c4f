// tb_generic_counter: checks that the counter advances once every second
// clock, wraps at 2^N, and that clear zeroes it at the next edge.
// Self-checking against a cycle-by-cycle model; prints TB_RESULT.
module tb_generic_counter;
  logic clk = 0, clr = 1;
  logic [7:0] count;
  int checks = 0, failures = 0;
  generic_counter #(.N(8)) dut (.clk, .clr, .count);
  always #5 clk = ~clk;
  initial begin #200000; $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures + 1); $finish; end

  initial begin
    int model, phase;
    repeat (3) @(posedge clk);
    clr <= 0;
    model = 0; phase = 0;
    for (int c = 0; c < 1200; c++) begin
      @(posedge clk); #1;
      // first edge after clear sets the enable, the second counts
      if (phase == 1) model = (model + 1) % 256;
      phase ^= 1;
      checks++;
      if (int'(count) != model) begin
        failures++;
        if (failures < 5) $display("cycle %0d: count %0d, expected %0d", c, count, model);
      end
      if (c == 700) begin
        clr <= 1; @(posedge clk); #1; clr <= 0;
        checks++; if (count != 0) begin failures++; $display("clear failed"); end
        model = 0; phase = 0;
      end
    end
    // bit 3 has a period of 32 clocks
    begin
      int t0, t1;
      @(posedge count[3]); t0 = $time; @(posedge count[3]); t1 = $time;
      checks++; if (t1 - t0 != 32 * 10) begin failures++; $display("bit 3 period %0d", t1 - t0); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
